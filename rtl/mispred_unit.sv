// Misprediction unit (Execute).
//
// Resolves the control-flow instruction in Execute: evaluates the branch
// condition on the two register operands, forms the real next PC (branch or
// JAL target PC + immediate, JALR target (rs1 + immediate) with bit 0
// cleared, or the next instruction: PC + 2 after a compressed instruction,
// PC + 4 otherwise), and compares it with the next PC that the front end
// predicted and fetched. A difference raises mispredict and gives the
// redirect PC; the core then squashes the younger instructions in Fetch 1
// to Decode. It also produces the training of the predictors: a BTB write
// for every taken jump or branch and a BHT update for every conditional
// branch. Purely combinational. The document gives the unit's place and its
// redirect and update outputs; the resolution rules follow the RISC-V ISA.
module mispred_unit
  import riscy_pkg::*;
(
  input  logic   valid,
  input  br_op_e br_op,
  input  logic   is_jal,
  input  logic   is_jalr,
  input  logic   is_c,      // the instruction was 16 bits long
  input  xlen_t  pc,
  input  xlen_t  rs1,
  input  xlen_t  rs2,
  input  xlen_t  imm,
  input  xlen_t  pred_npc,
  output logic   mispredict,
  output xlen_t  redirect_pc,
  output logic   btb_up_en,
  output xlen_t  btb_up_target,
  output logic   bht_up_en,
  output logic   bht_up_taken
);
  logic  cond, taken;
  xlen_t target, npc;

  always_comb begin
    unique case (br_op)
      BR_EQ:   cond = (rs1 == rs2);
      BR_NE:   cond = (rs1 != rs2);
      BR_LT:   cond = ($signed(rs1) < $signed(rs2));
      BR_GE:   cond = ($signed(rs1) >= $signed(rs2));
      BR_LTU:  cond = (rs1 < rs2);
      BR_GEU:  cond = (rs1 >= rs2);
      default: cond = 1'b0;
    endcase
    taken  = is_jal || is_jalr || cond;
    target = is_jalr ? ((rs1 + imm) & ~64'd1) : (pc + imm);
    npc    = taken ? target : (pc + (is_c ? 64'd2 : 64'd4));
  end

  assign mispredict    = valid && (npc != pred_npc);
  assign redirect_pc   = npc;
  assign btb_up_en     = valid && taken;
  assign btb_up_target = target;
  assign bht_up_en     = valid && (br_op != BR_NONE);
  assign bht_up_taken  = cond;
endmodule
