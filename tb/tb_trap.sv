// Full-core test of the machine-mode system instructions and traps.
//
// A short hand-assembled program, at the default core parameters, sets
// mtvec to a handler and then raises four traps in a row: ECALL, an
// illegal 32-bit word, a write to the read-only cycle CSR, and EBREAK. The
// handler counts the traps in a0, adds each mcause to a1, steps mepc over
// the trapping instruction and returns with MRET. Between the traps the
// program uses CSRRS, CSRRWI and reads mcause, mscratch, minstret, mepc,
// mtval and mstatus. The register values the trace shows at the end are
// compared with values worked out by hand from the RISC-V privileged
// specification (cause codes 11, 2, 2, 3; mtval of EBREAK is its PC;
// mstatus after MRET has MPIE set and MPP = machine). The bench also checks
// that no trapping instruction appears in the retirement trace and counts
// traps and MRETs seen in Execute.
module tb_trap;
  import rv_asm_pkg::*;
  localparam longint unsigned CODE_BASE = 64'h8000_0000;
  localparam logic [6:0] SYS = 7'b1110011;

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

  mem_model #(.BASE(CODE_BASE), .WORDS(256), .LAT(3), .STALL_PCT(0)) u_imem (
    .clk, .req_valid(imem_req_valid), .req_ready(imem_req_ready), .req_we(imem_req_we),
    .req_addr(imem_req_addr), .req_wdata(imem_req_wdata), .req_be(imem_req_be),
    .resp_valid(imem_resp_valid), .resp_data(imem_resp_data));
  mem_model #(.BASE(64'h8001_0000), .WORDS(256), .LAT(3), .STALL_PCT(0)) u_dmem (
    .clk, .req_valid(dmem_req_valid), .req_ready(dmem_req_ready), .req_we(dmem_req_we),
    .req_addr(dmem_req_addr), .req_wdata(dmem_req_wdata), .req_be(dmem_req_be),
    .resp_valid(dmem_resp_valid), .resp_data(dmem_resp_data));

  int checks = 0, failures = 0, n_trap = 0, n_mret = 0;
  logic [63:0] regs [32];
  logic [63:0] end_pc = '1;
  bit finished = 0;
  logic [31:0] prog [$];

  function automatic logic [31:0] csr(input int addr, input int rs1, input logic [2:0] f3,
                                      input int rd);
    return i_t(addr, rs1, f3, rd, SYS);
  endfunction

  always @(posedge clk) if (rst_n && !finished) begin
    if (rt_valid) begin
      if (rt_we && rt_rd != 0) regs[rt_rd] = rt_wdata;
      if (rt_instr == 32'h0000_0073 || rt_instr == 32'h0010_0073 || rt_instr == 32'hFFFF_FFFF) begin
        failures++;
        $display("FAIL: trapping instruction at %h retired", rt_pc);
      end
      if (rt_pc == end_pc) finished = 1;
      end_pc = rt_pc;
    end
    if (dut.csr_trap && !dut.gstall) n_trap++;
    if (dut.ex_valid && dut.ex_ctrl.sys_op == riscy_pkg::SYS_MRET && !dut.gstall) n_mret++;
  end

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h, expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 32; i++) regs[i] = '0;
    // main program (word index: address CODE_BASE + 4 * index)
    prog.push_back(u_t(0, 5, 7'b0010111));            //  0 auipc t0, 0
    prog.push_back(addi(5, 5, 17 * 4));                 //  1 addi  t0, t0, handler
    prog.push_back(csr(12'h305, 5, 3'b001, 0));         //  2 csrw  mtvec, t0
    prog.push_back(addi(10, 0, 0));                     //  3 li    a0, 0
    prog.push_back(addi(11, 0, 0));                     //  4 li    a1, 0
    prog.push_back(32'h0000_0073);                      //  5 ecall
    prog.push_back(32'hFFFF_FFFF);                      //  6 illegal
    prog.push_back(csr(12'h342, 0, 3'b010, 12));        //  7 csrr  a2, mcause
    prog.push_back(csr(12'h340, 5, 3'b101, 0));         //  8 csrwi mscratch, 5
    prog.push_back(csr(12'h340, 0, 3'b010, 14));        //  9 csrr  a4, mscratch
    prog.push_back(csr(12'hB02, 0, 3'b010, 13));        // 10 csrr  a3, minstret
    prog.push_back(csr(12'h341, 0, 3'b010, 15));        // 11 csrr  a5, mepc
    prog.push_back(csr(12'hC00, 10, 3'b001, 0));        // 12 csrw  cycle, a0 (read-only)
    prog.push_back(32'h0010_0073);                      // 13 ebreak
    prog.push_back(csr(12'h343, 0, 3'b010, 16));        // 14 csrr  a6, mtval
    prog.push_back(csr(12'h300, 0, 3'b010, 17));        // 15 csrr  a7, mstatus
    prog.push_back(jal(0, 0));                          // 16 j     .
    // handler
    prog.push_back(addi(10, 10, 1));                    // 17 addi  a0, a0, 1
    prog.push_back(csr(12'h342, 0, 3'b010, 6));         // 18 csrr  t1, mcause
    prog.push_back(r_t(7'h00, 6, 11, 3'b000, 11, 7'b0110011)); // 19 add a1, a1, t1
    prog.push_back(csr(12'h341, 0, 3'b010, 7));         // 20 csrr  t2, mepc
    prog.push_back(addi(7, 7, 4));                      // 21 addi  t2, t2, 4
    prog.push_back(csr(12'h341, 7, 3'b001, 0));         // 22 csrw  mepc, t2
    prog.push_back(32'h3020_0073);                      // 23 mret
    for (int i = 0; i < 256; i++) u_imem.mem[i] = 64'h0000_0013_0000_0013;
    for (int i = 0; i < 256; i++) u_dmem.mem[i] = '0;
    for (int i = 0; i < prog.size(); i++) u_imem.mem[i / 2][32 * (i % 2) +: 32] = prog[i];
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished);
    repeat (5) @(posedge clk);
    check("a0 trap count", regs[10], 64'd4);
    check("a1 cause sum", regs[11], 64'd18);
    check("a2 mcause after illegal", regs[12], 64'd2);
    check("a4 mscratch", regs[14], 64'd5);
    check("a5 mepc", regs[15], CODE_BASE + 6 * 4 + 4);
    check("a6 mtval of ebreak", regs[16], CODE_BASE + 13 * 4);
    check("a7 mstatus", regs[17], 64'h1880);
    checks++;
    if (regs[13] < 10 || regs[13] > 40) begin
      failures++;
      $display("FAIL minstret read %0d out of range", regs[13]);
    end
    check("traps seen", 64'(n_trap), 64'd4);
    check("mret seen", 64'(n_mret), 64'd4);
    $display("minstret read=%0d traps=%0d mret=%0d", regs[13], n_trap, n_mret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
