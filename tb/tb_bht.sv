// Self-checking test of the BHT: random taken/not-taken training of a few
// PCs against 2-bit saturating counters kept here (reset: weakly not
// taken), and a check that a branch trained taken twice is predicted taken.
module tb_bht;
  import riscy_pkg::*;
  localparam int N = 512;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  xlen_t lk_pc, up_pc;
  logic lk_taken, up_en, up_taken;
  int ctr [N];
  int checks = 0, failures = 0;

  bht #(.ENTRIES(N)) dut (.clk, .rst_n, .lk_pc, .lk_taken, .up_en, .up_pc, .up_taken);

  task automatic chk();
    automatic int k = int'(lk_pc[10:2]);
    checks++;
    if (lk_taken !== (ctr[k] >= 2)) begin
      failures++;
      if (failures < 10) $display("FAIL pc=%h taken=%0d ctr=%0d", lk_pc, lk_taken, ctr[k]);
    end
  endtask

  initial begin
    for (int i = 0; i < N; i++) ctr[i] = 1;
    up_en = 0; up_pc = 0; up_taken = 0; lk_pc = 64'h8000_0100;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // directed: two taken updates flip the prediction
    @(negedge clk); #1; chk();
    repeat (2) begin
      @(negedge clk); up_en = 1; up_pc = lk_pc; up_taken = 1;
      @(posedge clk); ctr[lk_pc[10:2]] = (ctr[lk_pc[10:2]] < 3) ? ctr[lk_pc[10:2]] + 1 : 3;
    end
    @(negedge clk); up_en = 0; #1; chk();
    checks++; if (lk_taken !== 1'b1) begin failures++; $display("FAIL: not taken after two taken updates"); end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      up_en = $urandom_range(1);
      up_pc = 64'h8000_0000 + ($urandom_range(15) << 2) + ($urandom_range(1) << 11);
      up_taken = $urandom_range(3) != 0;
      lk_pc = 64'h8000_0000 + ($urandom_range(15) << 2);
      #1; chk();
      @(posedge clk);
      if (up_en) begin
        automatic int k = int'(up_pc[10:2]);
        if (up_taken && ctr[k] < 3) ctr[k]++;
        else if (!up_taken && ctr[k] > 0) ctr[k]--;
      end
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
