// Self-checking test of the scoreboard: random issue (set) and write-back
// (clear) events, with up to three writers per register in flight, checked
// against pending counts kept here.
module tb_scoreboard;
  import riscy_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic set_en, clr_en, pend1, pend2;
  reg_idx_t set_rd, clr_rd, rs1, rs2;
  int cnt [32];
  reg_idx_t inflight [$];
  int checks = 0, failures = 0;

  scoreboard dut (.clk, .rst_n, .set_en, .set_rd, .clr_en, .clr_rd, .rs1, .rs2, .pend1, .pend2);

  initial begin
    for (int i = 0; i < 32; i++) cnt[i] = 0;
    set_en = 0; clr_en = 0; set_rd = 0; clr_rd = 0; rs1 = 0; rs2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      set_en = (inflight.size() < 3) && $urandom_range(1);
      set_rd = 5'($urandom_range(7));        // few registers: many collisions
      clr_en = (inflight.size() > 0) && $urandom_range(1);
      clr_rd = clr_en ? inflight[0] : 5'd0;
      rs1 = 5'($urandom_range(7)); rs2 = 5'($urandom_range(7));
      #1;
      checks += 2;
      if (pend1 !== (rs1 != 0 && cnt[rs1] != 0)) begin failures++; $display("FAIL pend1 x%0d", rs1); end
      if (pend2 !== (rs2 != 0 && cnt[rs2] != 0)) begin failures++; $display("FAIL pend2 x%0d", rs2); end
      @(posedge clk);
      if (clr_en) begin void'(inflight.pop_front()); if (clr_rd != 0) cnt[clr_rd]--; end
      if (set_en) begin inflight.push_back(set_rd); if (set_rd != 0) cnt[set_rd]++; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
