// Self-checking test of the BTB: random updates and lookups against a
// direct-mapped reference (index = PC word bits, full tag), including
// aliasing PCs that share an index and must miss.
module tb_btb;
  import riscy_pkg::*;
  localparam int N = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  xlen_t lk_pc, lk_target, up_pc, up_target;
  logic lk_hit, up_en;
  bit    v [N];
  xlen_t tpc [N], ttg [N];
  int checks = 0, failures = 0;

  btb #(.ENTRIES(N)) dut (.clk, .rst_n, .lk_pc, .lk_hit, .lk_target, .up_en, .up_pc, .up_target);

  function automatic xlen_t rpc();
    return 64'h8000_0000 + ($urandom_range(511) << 2) + (($urandom_range(3)) << 12);
  endfunction

  initial begin
    for (int i = 0; i < N; i++) v[i] = 0;
    up_en = 0; up_pc = 0; up_target = 0; lk_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      up_en = $urandom_range(2) == 0; up_pc = rpc(); up_target = {$urandom(), $urandom()} & ~64'd3;
      lk_pc = (i % 2) ? up_pc : rpc();
      #1;
      begin
        automatic int k = int'(lk_pc[7:2]);
        automatic bit eh = v[k] && tpc[k] == lk_pc;
        checks++;
        if (lk_hit !== eh || (eh && lk_target !== ttg[k])) begin
          failures++;
          if (failures < 10) $display("FAIL pc=%h hit=%0d exp=%0d tgt=%h exp=%h", lk_pc, lk_hit, eh, lk_target, ttg[k]);
        end
      end
      @(posedge clk);
      if (up_en) begin v[up_pc[7:2]] = 1; tpc[up_pc[7:2]] = up_pc; ttg[up_pc[7:2]] = up_target; end
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
