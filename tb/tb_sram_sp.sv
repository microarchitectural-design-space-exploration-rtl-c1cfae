// Self-checking test of the single-port SRAM: masked writes and reads
// against a shadow array; read data appears one cycle after the request
// and holds while the SRAM is idle or writing.
module tb_sram_sp;
  localparam int D = 64, W = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en, we;
  logic [5:0] addr;
  logic [W-1:0] wdata, wmask, rdata, shadow [D], last;
  int checks = 0, failures = 0;
  bit have = 0;

  sram_sp #(.DEPTH(D), .WIDTH(W)) dut (.clk, .en, .we, .addr, .wdata, .wmask, .rdata);

  initial begin
    en = 1; we = 1; wmask = '1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk); addr = 6'(i); wdata = $urandom(); shadow[i] = wdata;
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom_range(3) != 0); we = $urandom_range(1);
      addr = 6'($urandom()); wdata = $urandom(); wmask = $urandom();
      @(posedge clk); #1;
      if (en && we) shadow[addr] = (shadow[addr] & ~wmask) | (wdata & wmask);
      if (en && !we) begin last = shadow[addr]; have = 1; end
      if (have) begin
        checks++;
        if (rdata !== last) begin
          failures++;
          if (failures < 10) $display("FAIL addr=%0d rdata=%h exp=%h", addr, rdata, last);
        end
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
