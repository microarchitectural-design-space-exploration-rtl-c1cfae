// Self-checking test of the register file: random writes and reads against
// a shadow array, x0 stays zero, same-cycle read returns the old value.
module tb_regfile;
  import riscy_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  reg_idx_t ra1, ra2, wa;
  xlen_t rd1, rd2, wd;
  logic we;
  xlen_t shadow [32];
  int checks = 0, failures = 0;

  regfile dut (.clk, .rst_n, .raddr1(ra1), .rdata1(rd1), .raddr2(ra2), .rdata2(rd2),
               .we, .waddr(wa), .wdata(wd));

  initial begin
    for (int i = 0; i < 32; i++) shadow[i] = '0;
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we = $urandom_range(1); wa = 5'($urandom()); wd = {$urandom(), $urandom()};
      ra1 = 5'($urandom()); ra2 = (i % 4 == 0) ? wa : 5'($urandom());
      #1;
      checks += 2;
      if (rd1 !== shadow[ra1]) begin failures++; $display("FAIL r1 x%0d=%h exp %h", ra1, rd1, shadow[ra1]); end
      if (rd2 !== shadow[ra2]) begin failures++; $display("FAIL r2 x%0d=%h exp %h", ra2, rd2, shadow[ra2]); end
      @(posedge clk);
      if (we && wa != 0) shadow[wa] = wd;
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
