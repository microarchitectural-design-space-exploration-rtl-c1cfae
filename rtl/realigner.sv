// Re-aligner (Fetch 3).
//
// With the C extension, instructions are 16 or 32 bits long and sit on any
// 2-byte boundary, while the instruction cache hands Fetch 3 one aligned
// 32-bit parcel per fetch address. The re-aligner cuts the parcel stream
// into whole instructions, one per cycle, and expands compressed ones to
// their 32-bit form (rvc_expand), so that Decode only sees 32-bit words.
//
// A parcel holds two halfwords, lo (address A) and hi (A + 2). The stream
// enters a parcel at lo, or at hi when a jump landed on A + 2 (in_start_hi).
// State kept between cycles:
//   pend  - the lower half of a 32-bit instruction that began in the hi
//           half of the previous parcel (it is completed by this parcel's lo)
//   sub   - lo of the current parcel held a 16-bit instruction that was
//           already sent on; hi is a 16-bit instruction still to be sent
// A parcel gives zero instructions (hi only starts a 32-bit one), one, or
// two (two 16-bit ones, or a completed 32-bit one followed by a 16-bit one).
// In the two-instruction case out_last is low for the first cycle and the
// core must hold the fetch stages for one cycle while it takes the second.
//
// Interface and timing: everything is combinational from in_* and the state
// to out_*. The state changes at the clock edge when adv is high (Decode
// takes out_* this cycle): with cut (out_* is a predicted-taken jump or
// branch, so the rest of the parcel is not on the path) the state is
// cleared, otherwise the parcel moves on. flush (a redirect from Execute)
// clears the state and has priority. in_valid must be low for an empty
// Fetch 3 slot. The document places a re-aligner in Fetch 3 in front of the
// pre-decoder; the parcel size, the pend/sub scheme and the one-instruction-
// per-cycle output are this design's choices.
module realigner
  import riscy_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [31:0] in_parcel,
  input  xlen_t       in_addr,      // parcel address, bits [1:0] are zero
  input  logic        in_start_hi,  // the stream enters this parcel at A + 2
  input  logic        adv,
  input  logic        cut,
  input  logic        flush,
  output logic        out_valid,    // an instruction is sent this cycle
  output logic [31:0] out_instr,    // always a 32-bit encoding
  output logic        out_is_c,     // it came from a 16-bit instruction
  output xlen_t       out_pc,
  output logic        out_last      // the parcel is used up after this cycle
);
  logic        pend_v, sub_q;
  logic [15:0] pend_h, lo, hi, c_half;
  logic        at_hi, lo_c, hi_c, new_pend;
  logic [31:0] c_exp;

  assign lo    = in_parcel[15:0];
  assign hi    = in_parcel[31:16];
  assign lo_c  = (lo[1:0] != 2'b11);
  assign hi_c  = (hi[1:0] != 2'b11);
  assign at_hi = sub_q || in_start_hi;

  assign c_half = at_hi ? hi : lo;
  rvc_expand u_expand (.c_instr(c_half), .instr(c_exp));

  always_comb begin
    out_valid = 1'b0;
    out_instr = INSTR_NOP;
    out_is_c  = 1'b0;
    out_pc    = in_addr;
    out_last  = 1'b1;
    new_pend  = 1'b0;
    if (in_valid) begin
      if (at_hi) begin
        // only hi is left: a 16-bit instruction, or the start of a 32-bit one
        out_valid = hi_c;
        out_instr = c_exp;
        out_is_c  = 1'b1;
        out_pc    = in_addr + 64'd2;
        new_pend  = !hi_c;
      end else if (pend_v) begin
        // finish the 32-bit instruction begun in the previous parcel
        out_valid = 1'b1;
        out_instr = {lo, pend_h};
        out_pc    = in_addr - 64'd2;
        out_last  = !hi_c;
        new_pend  = !hi_c;
      end else if (lo_c) begin
        out_valid = 1'b1;
        out_instr = c_exp;
        out_is_c  = 1'b1;
        out_last  = !hi_c;
        new_pend  = !hi_c;
      end else begin
        out_valid = 1'b1;
        out_instr = in_parcel;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_v <= 1'b0;
      pend_h <= '0;
      sub_q  <= 1'b0;
    end else if (flush) begin
      pend_v <= 1'b0;
      sub_q  <= 1'b0;
    end else if (adv && in_valid) begin
      if (cut && out_valid) begin
        pend_v <= 1'b0;
        sub_q  <= 1'b0;
      end else if (out_last) begin
        pend_v <= new_pend;
        pend_h <= hi;
        sub_q  <= 1'b0;
      end else begin
        pend_v <= 1'b0;
        sub_q  <= 1'b1;
      end
    end
  end
endmodule
