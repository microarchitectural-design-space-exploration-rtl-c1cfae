// Pre-decoder (Fetch 3).
//
// Looks at the instruction leaving the re-aligner and predicts where it
// goes: JAL to PC + J-immediate, a conditional branch to PC + B-immediate
// if the BHT says taken, JALR to the BTB target found for its parcel in
// Fetch 2 (its real target depends on a register; without a BTB hit it is
// guessed not taken), anything else to the next instruction, PC + 2 for a
// compressed one and PC + 4 otherwise. pred_npc travels with the
// instruction to Execute, where the misprediction unit checks it.
//
// It also checks the fetch stream. Fetch 2 already chose the address of the
// parcel after this one (f2_pred_npc: the BTB target, or the next sequential
// parcel seq_fetch). That choice matters once the current parcel is left:
// after the last instruction in it (parcel_end), or after a predicted-taken
// one (taken; the core then drops the rest of the parcel). If the address
// the pre-decoder wants differs from Fetch 2's, redirect asks Fetch 1 to
// restart at redirect_pc. A parcel that only starts a 32-bit instruction
// (valid without instr_valid) is checked as well, against seq_fetch.
// Purely combinational. The document names the pre-decoder and the BHT in
// Fetch 3 and the BTB in Fetch 2; this division of work is this design's
// reading of the figure.
module predecoder
  import riscy_pkg::*;
(
  input  logic        valid,        // a parcel with its data is in Fetch 3
  input  logic        instr_valid,  // the re-aligner sends an instruction
  input  logic [31:0] instr,
  input  logic        is_c,
  input  xlen_t       pc,
  input  logic        parcel_end,   // the parcel is used up after this one
  input  xlen_t       seq_fetch,    // the parcel that follows sequentially
  input  xlen_t       f2_pred_npc,  // the parcel Fetch 2 fetched next
  input  logic        f2_btb_hit,
  input  logic        bht_taken,
  output logic        is_branch,    // conditional branch (BHT is consulted)
  output logic        taken,        // predicted taken
  output xlen_t       pred_npc,
  output logic        redirect,
  output xlen_t       redirect_pc
);
  xlen_t seq, tgt;
  logic  tk;

  assign seq = pc + (is_c ? 64'd2 : 64'd4);

  always_comb begin
    is_branch = 1'b0;
    tk        = 1'b0;
    tgt       = seq;
    unique case (instr[6:0])
      OPC_JAL:    begin tk = 1'b1; tgt = pc + imm_j(instr); end
      OPC_BRANCH: begin is_branch = instr_valid; tk = bht_taken; tgt = pc + imm_b(instr); end
      OPC_JALR:   begin tk = f2_btb_hit; tgt = f2_pred_npc; end
      default:    ;
    endcase
  end

  assign taken       = instr_valid && tk;
  assign pred_npc    = taken ? tgt : seq;
  assign redirect_pc = taken ? tgt : seq_fetch;
  assign redirect    = valid && (taken || parcel_end) && (redirect_pc != f2_pred_npc);
endmodule
