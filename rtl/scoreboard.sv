// Register scoreboard.
//
// Keeps, for every integer register, a count of the instructions in flight
// (issued from Decode, not yet written back) that will write it. The count
// is incremented when Decode issues a writer (set_en/set_rd) and
// decremented when Write Back writes the register (clr_en/clr_rd); both may
// happen in the same cycle. Decode reads pending(rs) to know that the
// register file value is stale and the operand must come from the bypass
// network or wait. The document places the scoreboard in Decode and Write
// Back; using a counter instead of a single bit (so that two writers of one
// register may be in flight) is this design's choice. With the 3 stages
// after Decode at most 3 writers are in flight, so 2 bits suffice.
module scoreboard
  import riscy_pkg::*;
#(
  parameter int unsigned CNT_W = 2
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     set_en,
  input  reg_idx_t set_rd,
  input  logic     clr_en,
  input  reg_idx_t clr_rd,
  input  reg_idx_t rs1,
  input  reg_idx_t rs2,
  output logic     pend1,
  output logic     pend2
);
  logic [CNT_W-1:0] cnt [32];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 32; i++) cnt[i] <= '0;
    end else begin
      for (int i = 1; i < 32; i++) begin
        if (set_en && set_rd == reg_idx_t'(i) && !(clr_en && clr_rd == reg_idx_t'(i)))
          cnt[i] <= cnt[i] + 1'b1;
        else if (clr_en && clr_rd == reg_idx_t'(i) && !(set_en && set_rd == reg_idx_t'(i)))
          cnt[i] <= cnt[i] - 1'b1;
      end
    end
  end

  assign pend1 = (rs1 != '0) && (cnt[rs1] != '0);
  assign pend2 = (rs2 != '0) && (cnt[rs2] != '0);
endmodule
