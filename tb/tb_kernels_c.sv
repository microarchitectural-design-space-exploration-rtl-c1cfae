// Workload test with compressed instructions: the CoreMark-style kernels of
// tb_kernels, compiled for RV64IMC, run on the full-size core.
//
// The C source, the start-up code, the memory map and the expected result
// are those of tb_kernels (the kernels and their data are the same; the
// data image is shared). Only the code differs: GCC at -O2 for rv64imc /
// lp64 with -mcmodel=medany, so about 40 % of the executed instructions are
// 16-bit and many 32-bit ones start at an address that is 2 mod 4.
// kernels_c_text.hex holds the .text section as 64-bit little-endian words.
//
// Checks: the stored result; that the core reaches the final loop within
// the watchdog; that compressed instructions were executed, that parcels
// holding two instructions and 32-bit instructions spread over two parcels
// both occurred, and that the redirect and stall mechanisms happened. The
// instructions per cycle are reported.
module tb_kernels_c;
  localparam longint unsigned CODE_BASE = 64'h8000_0000;
  localparam longint unsigned DATA_BASE = 64'h8001_0000;
  localparam logic [63:0]     EXPECTED  = 64'h0000_17e9_6ac5_81f5;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  // a falling reset edge at 1 ns, so the asynchronous reset acts at once and
  // no request from random start-up state reaches the memory models
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        imem_req_valid, imem_req_ready, imem_req_we, imem_resp_valid;
  logic [63:0] imem_req_addr, imem_req_wdata, imem_resp_data;
  logic [7:0]  imem_req_be;
  logic        dmem_req_valid, dmem_req_ready, dmem_req_we, dmem_resp_valid;
  logic [63:0] dmem_req_addr, dmem_req_wdata, dmem_resp_data;
  logic [7:0]  dmem_req_be;
  logic        rt_valid, rt_we;
  logic [63:0] rt_pc, rt_wdata;
  logic [31:0] rt_instr;
  logic [4:0]  rt_rd;

  riscy_v2 dut (.*);

  mem_model #(.BASE(CODE_BASE), .WORDS(1024), .LAT(6), .STALL_PCT(0)) u_imem (
    .clk, .req_valid(imem_req_valid), .req_ready(imem_req_ready), .req_we(imem_req_we),
    .req_addr(imem_req_addr), .req_wdata(imem_req_wdata), .req_be(imem_req_be),
    .resp_valid(imem_resp_valid), .resp_data(imem_resp_data));
  mem_model #(.BASE(DATA_BASE), .WORDS(8192), .LAT(6), .STALL_PCT(0)) u_dmem (
    .clk, .req_valid(dmem_req_valid), .req_ready(dmem_req_ready), .req_we(dmem_req_we),
    .req_addr(dmem_req_addr), .req_wdata(dmem_req_wdata), .req_be(dmem_req_be),
    .resp_valid(dmem_resp_valid), .resp_data(dmem_resp_data));

  int checks = 0, failures = 0;
  longint unsigned cycles = 0, retired = 0;
  int n_c = 0, n_two = 0, n_split = 0;
  int n_ex_redir = 0, n_f3_redir = 0, n_f2_redir = 0, n_hz = 0, n_md = 0;
  logic [63:0] end_pc = '1;
  bit finished = 0;

  always @(posedge clk) if (rst_n && !finished) begin
    cycles++;
    if (rt_valid) begin
      retired++;
      // the final "j ." is the first instruction that retires twice in a row
      if (rt_pc == end_pc) finished = 1;
      end_pc = rt_pc;
    end
    if (dut.ex_redirect) n_ex_redir++;
    if (dut.f3_redirect) n_f3_redir++;
    if (dut.f2_redirect) n_f2_redir++;
    if (dut.hz_stall_eff && !dut.gstall) n_hz++;
    if (dut.md_stall) n_md++;
    if (dut.issue && dut.d_is_c) n_c++;
    if (dut.issue && !dut.d_is_c && dut.d_pc[1]) n_split++;
    if (dut.ra_hold && !dut.d_stall) n_two++;
  end

  initial begin
    for (int i = 0; i < 1024; i++) u_imem.mem[i] = 64'h0000_0013_0000_0013;
    $readmemh("tb/kernels_c_text.hex", u_imem.mem);
    for (int i = 0; i < 8192; i++) u_dmem.mem[i] = '0;
    $readmemh("tb/kernels_data.hex", u_dmem.mem, 32);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished);
    repeat (20) @(posedge clk);
    checks++;
    if (u_dmem.mem[0] !== EXPECTED) begin
      failures++;
      $display("FAIL: result %h, expected %h", u_dmem.mem[0], EXPECTED);
    end else $display("result %h as expected", u_dmem.mem[0]);
    checks++;
    if (n_ex_redir == 0 || n_f3_redir == 0 || n_f2_redir == 0 || n_hz == 0 || n_md == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    checks++;
    if (n_c == 0 || n_two == 0 || n_split == 0) begin
      failures++;
      $display("FAIL: compressed code was not exercised");
    end
    $display("compressed issued=%0d, two-instruction parcels=%0d, split 32-bit=%0d",
             n_c, n_two, n_split);
    $display("retired=%0d cycles=%0d IPC=%0.3f", retired, cycles, real'(retired) / real'(cycles));
    $display("redirects EX=%0d F3=%0d F2=%0d, hazard stalls=%0d, mul/div stall cycles=%0d",
             n_ex_redir, n_f3_redir, n_f2_redir, n_hz, n_md);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d retired instructions", retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
