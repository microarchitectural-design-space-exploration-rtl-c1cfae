// End-to-end test of the Riscy v2 core with its caches, at the default
// (full-size) parameters.
//
// A random RV64IM program is generated at time zero: a loop whose body
// mixes ALU, immediate, 32-bit word, multiply/divide, load and store
// instructions on registers x1..x15 with data-dependent forward branches,
// a call to and return from a subroutine (JAL/JALR) and five accesses to
// addresses 4 KB apart, which map to one cache set and force evictions.
// Each pass also makes an ECALL; its handler (x26, x27) steps mepc over it,
// adds mcause to x27 and returns with MRET. The trapping ECALL itself is
// not traced, so the reference model leaves it out.
// An instruction-set reference model in this file executes the same
// program first and records every register write; each instruction the
// core retires is compared with it in order (PC, destination, value), and
// the data memory is compared at the end. The test also counts the
// mechanisms of the pipeline (each redirect kind, hazard stalls, each bypass
// source, cache refills, evictions and stores, multiply/divide stalls, traps
// and MRETs) and fails if one never happened.
module tb_riscy_v2;
  import rv_asm_pkg::*;

  localparam longint unsigned CODE_BASE = 64'h8000_0000;
  localparam longint unsigned DATA_BASE = 64'h8001_0000;
  localparam int unsigned     DWORDS    = 8192;
  localparam int unsigned     ITER      = 40;
  localparam int unsigned     BODY      = 80;

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

  mem_model #(.BASE(CODE_BASE), .WORDS(4096), .LAT(6)) u_imem (
    .clk, .req_valid(imem_req_valid), .req_ready(imem_req_ready), .req_we(imem_req_we),
    .req_addr(imem_req_addr), .req_wdata(imem_req_wdata), .req_be(imem_req_be),
    .resp_valid(imem_resp_valid), .resp_data(imem_resp_data));
  mem_model #(.BASE(DATA_BASE), .WORDS(DWORDS), .LAT(5)) u_dmem (
    .clk, .req_valid(dmem_req_valid), .req_ready(dmem_req_ready), .req_we(dmem_req_we),
    .req_addr(dmem_req_addr), .req_wdata(dmem_req_wdata), .req_be(dmem_req_be),
    .resp_valid(dmem_resp_valid), .resp_data(dmem_resp_data));

  int checks = 0, failures = 0;

  // ------------------------------------------------------------ program
  logic [31:0] prog [$];
  int          end_idx;

  function automatic int rreg();  return 1 + $urandom_range(14); endfunction
  function automatic int rsrc();  return $urandom_range(15);     endfunction

  task automatic emit(input logic [31:0] w); prog.push_back(w); endtask

  task automatic gen_random_instr();
    int k, rd, rs1, rs2, sz, off;
    logic [2:0] f3;
    k  = $urandom_range(99);
    rd = rreg(); rs1 = rsrc(); rs2 = rsrc();
    if (k < 30) begin                      // register-register ALU
      int s = $urandom_range(9);
      logic [2:0] f3s [10] = '{3'd0, 3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd5, 3'd6, 3'd7};
      logic [6:0] f7s [10] = '{7'h00, 7'h20, 7'h00, 7'h00, 7'h00, 7'h00, 7'h00, 7'h20, 7'h00, 7'h00};
      emit(r_t(f7s[s], rs2, rs1, f3s[s], rd, 7'b0110011));
    end else if (k < 38) begin             // 32-bit register-register
      int s = $urandom_range(4);
      logic [2:0] f3s [5] = '{3'd0, 3'd0, 3'd1, 3'd5, 3'd5};
      logic [6:0] f7s [5] = '{7'h00, 7'h20, 7'h00, 7'h00, 7'h20};
      emit(r_t(f7s[s], rs2, rs1, f3s[s], rd, 7'b0111011));
    end else if (k < 52) begin             // immediates
      int s = $urandom_range(8);
      int imm = int'($urandom_range(4095)) - 2048;
      case (s)
        0: emit(i_t(imm, rs1, 3'd0, rd, 7'b0010011));
        1: emit(i_t(imm, rs1, 3'd2, rd, 7'b0010011));
        2: emit(i_t(imm, rs1, 3'd3, rd, 7'b0010011));
        3: emit(i_t(imm, rs1, 3'd4, rd, 7'b0010011));
        4: emit(i_t(imm, rs1, 3'd6, rd, 7'b0010011));
        5: emit(i_t(imm, rs1, 3'd7, rd, 7'b0010011));
        6: emit(i_t(int'({($urandom_range(1) ? 6'b010000 : 6'b0), 6'($urandom_range(63))}),
                    rs1, 3'd5, rd, 7'b0010011));     // srli / srai
        7: emit(i_t(int'($urandom_range(63)), rs1, 3'd1, rd, 7'b0010011));
        default: emit(i_t(imm, rs1, 3'd0, rd, 7'b0011011));
      endcase
    end else if (k < 60) begin             // multiply / divide
      int s = $urandom_range(12);
      if (s < 8) emit(r_t(7'h01, rs2, rs1, 3'(s), rd, 7'b0110011));
      else begin
        logic [2:0] f3w [5] = '{3'd0, 3'd4, 3'd5, 3'd6, 3'd7};
        emit(r_t(7'h01, rs2, rs1, f3w[s-8], rd, 7'b0111011));
      end
    end else if (k < 74) begin             // loads
      int s = $urandom_range(6);
      logic [2:0] f3l [7] = '{3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5, 3'd6};
      sz  = 1 << f3l[s][1:0];
      off = int'($urandom_range(2047 / sz)) * sz;
      emit(i_t(off, 16, f3l[s], rd, 7'b0000011));
    end else if (k < 86) begin             // stores
      f3  = 3'($urandom_range(3));
      sz  = 1 << f3[1:0];
      off = int'($urandom_range(2047 / sz)) * sz;
      emit(s_t(off, rs2, 16, f3));
    end else if (k < 96) begin             // forward branch over one instruction
      logic [2:0] f3b [6] = '{3'd0, 3'd1, 3'd4, 3'd5, 3'd6, 3'd7};
      emit(b_t(8, rs2, rs1, f3b[$urandom_range(5)]));
      emit(addi(rd, rs1, int'($urandom_range(255))));
    end else if (k < 98) begin
      emit(lui(rd, int'($urandom())));
    end else begin
      emit(u_t(int'($urandom_range(255)), rd, 7'b0010111));   // auipc
    end
  endtask

  task automatic build_program();
    int loop_idx, call_idx, sub_idx, vec_idx, hnd_idx;
    // data base in x16, 4 KB-strided bases in x21..x25, loop counter x20
    emit(u_t(16, 16, 7'b0010111));            // auipc x16, 0x10 -> DATA_BASE
    emit(lui(17, 1));                          // x17 = 4096
    emit(addi(21, 16, 64));
    for (int k = 22; k <= 25; k++)
      emit(r_t(7'h00, 17, k - 1, 3'd0, k, 7'b0110011));   // add xk, x(k-1), x17
    emit(addi(20, 0, ITER));
    // trap handler address into mtvec (x26 and x27 belong to the handler)
    vec_idx = prog.size();
    emit(u_t(0, 26, 7'b0010111));             // auipc x26, 0
    emit(32'h0);                               // patched: addi x26, x26, handler
    emit(i_t(12'h305, 26, 3'd1, 0, 7'b1110011));   // csrw mtvec, x26
    for (int r = 1; r <= 15; r++) begin
      emit(lui(r, int'($urandom())));
      emit(addi(r, r, int'($urandom_range(4095)) - 2048));
      emit(i_t(int'($urandom_range(31)), r, 3'd1, r, 7'b0010011));   // slli
      emit(i_t(int'($urandom_range(4095)) - 2048, r, 3'd4, r, 7'b0010011)); // xori
    end
    loop_idx = prog.size();
    for (int i = 0; i < BODY; i++) gen_random_instr();
    // call
    call_idx = prog.size();
    emit(32'h0);                               // patched: jal x18, sub
    emit(32'h0000_0073);                       // ecall
    // conflicting accesses, 4 KB apart
    for (int k = 21; k <= 25; k++) emit(sd(k - 20, k, 0));
    for (int k = 21; k <= 25; k++) emit(ld(k - 20, k, 8));
    emit(addi(20, 20, -1));
    emit(bne(20, 0, (loop_idx - int'(prog.size())) * 4));
    end_idx = prog.size();
    emit(jal(0, 0));
    sub_idx = prog.size();
    emit(addi(3, 3, 5));
    emit(r_t(7'h00, 4, 3, 3'd4, 5, 7'b0110011));   // xor x5, x3, x4
    emit(jalr(0, 18, 0));
    // handler: step mepc over the ECALL, add mcause to x27, return
    hnd_idx = prog.size();
    emit(i_t(12'h341, 0, 3'd2, 26, 7'b1110011));   // csrr x26, mepc
    emit(addi(26, 26, 4));
    emit(i_t(12'h341, 26, 3'd1, 0, 7'b1110011));   // csrw mepc, x26
    emit(i_t(12'h342, 0, 3'd2, 26, 7'b1110011));   // csrr x26, mcause
    emit(r_t(7'h00, 26, 27, 3'd0, 27, 7'b0110011));  // add x27, x27, x26
    emit(32'h3020_0073);                       // mret
    prog[call_idx] = jal(18, (sub_idx - call_idx) * 4);
    prog[vec_idx + 1] = addi(26, 26, (hnd_idx - vec_idx) * 4);
  endtask

  // ------------------------------------------------------------ reference model
  typedef struct { longint unsigned pc; bit we; int rd; longint unsigned val; } retire_t;
  retire_t exp_q [$];
  logic [63:0] ref_mem [DWORDS];

  function automatic longint unsigned sx32(input logic [31:0] v);
    return {{32{v[31]}}, v};
  endfunction

  task automatic run_reference();
    longint unsigned x [32];
    longint unsigned pc, npc, a, b, res, addr, imm;
    logic [31:0] ins;
    logic [6:0] opc; logic [2:0] f3; logic [6:0] f7; int rd;
    bit we, trapped;
    longint unsigned mtvec = 0, mepc = 0, mcause = 0;
    int steps = 0;
    for (int i = 0; i < 32; i++) x[i] = 0;
    pc = CODE_BASE;
    while (steps < 200000) begin
      int idx = int'((pc - CODE_BASE) >> 2);
      ins = prog[idx];
      opc = ins[6:0]; f3 = ins[14:12]; f7 = ins[31:25]; rd = ins[11:7];
      a = x[ins[19:15]]; b = x[ins[24:20]];
      npc = pc + 4; we = 0; res = 0; trapped = 0;
      case (opc)
        7'b1110011: begin                      // ECALL, MRET, CSRRW, CSRRS
          if (ins == 32'h0000_0073) begin
            trapped = 1; mepc = pc; mcause = 11; npc = mtvec;
          end else if (ins == 32'h3020_0073) begin
            npc = mepc;
          end else begin
            longint unsigned old, nv;
            case (ins[31:20])
              12'h305: old = mtvec;
              12'h341: old = mepc;
              default: old = mcause;
            endcase
            we = 1; res = old;
            nv = (f3 == 3'd1) ? a : (old | a);
            if (f3 == 3'd1 || ins[19:15] != 0)
              case (ins[31:20])
                12'h305: mtvec = nv;
                12'h341: mepc = nv;
                default: mcause = nv;
              endcase
          end
        end
        7'b0110111: begin we = 1; res = sx32({ins[31:12], 12'b0}); end
        7'b0010111: begin we = 1; res = pc + sx32({ins[31:12], 12'b0}); end
        7'b1101111: begin
          we = 1; res = pc + 4;
          npc = pc + {{44{ins[31]}}, ins[19:12], ins[20], ins[30:21], 1'b0};
        end
        7'b1100111: begin we = 1; res = pc + 4; npc = (a + {{52{ins[31]}}, ins[31:20]}) & ~64'd1; end
        7'b1100011: begin
          bit t;
          case (f3)
            3'd0: t = (a == b);
            3'd1: t = (a != b);
            3'd4: t = ($signed(a) < $signed(b));
            3'd5: t = ($signed(a) >= $signed(b));
            3'd6: t = (a < b);
            default: t = (a >= b);
          endcase
          if (t) npc = pc + {{51{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
        end
        7'b0000011: begin
          logic [63:0] w;
          addr = a + {{52{ins[31]}}, ins[31:20]};
          w = ref_mem[(addr - DATA_BASE) >> 3] >> (8 * addr[2:0]);
          we = 1;
          case (f3)
            3'd0: res = {{56{w[7]}}, w[7:0]};
            3'd1: res = {{48{w[15]}}, w[15:0]};
            3'd2: res = sx32(w[31:0]);
            3'd3: res = w;
            3'd4: res = {56'b0, w[7:0]};
            3'd5: res = {48'b0, w[15:0]};
            default: res = {32'b0, w[31:0]};
          endcase
        end
        7'b0100011: begin
          int n = 1 << f3[1:0];
          addr = a + {{52{ins[31]}}, ins[31:25], ins[11:7]};
          for (int i = 0; i < n; i++)
            ref_mem[(addr - DATA_BASE) >> 3][8 * (addr[2:0] + i) +: 8] = b[8 * i +: 8];
        end
        7'b0010011, 7'b0011011: begin
          bit w32 = (opc == 7'b0011011);
          imm = {{52{ins[31]}}, ins[31:20]};
          we = 1;
          case (f3)
            3'd0: res = a + imm;
            3'd1: res = w32 ? a << ins[24:20] : a << ins[25:20];
            3'd2: res = ($signed(a) < $signed(imm)) ? 1 : 0;
            3'd3: res = (a < imm) ? 1 : 0;
            3'd4: res = a ^ imm;
            3'd5: if (w32) res = ins[30] ? sx32($signed(a[31:0]) >>> ins[24:20]) : sx32(a[31:0] >> ins[24:20]);
                  else if (ins[30]) res = $signed(a) >>> ins[25:20];
                  else     res = a >> ins[25:20];
            3'd6: res = a | imm;
            default: res = a & imm;
          endcase
          if (w32) res = sx32(res[31:0]);
        end
        7'b0110011, 7'b0111011: begin
          bit w32 = (opc == 7'b0111011);
          we = 1;
          if (f7 == 7'h01) res = ref_muldiv(f3, w32, a, b);
          else begin
            case (f3)
              3'd0: res = f7[5] ? a - b : a + b;
              3'd1: res = w32 ? a << b[4:0] : a << b[5:0];
              3'd2: res = ($signed(a) < $signed(b)) ? 1 : 0;
              3'd3: res = (a < b) ? 1 : 0;
              3'd4: res = a ^ b;
              3'd5: if (w32) res = f7[5] ? sx32($signed(a[31:0]) >>> b[4:0]) : sx32(a[31:0] >> b[4:0]);
                    else if (f7[5]) res = $signed(a) >>> b[5:0];
                    else     res = a >> b[5:0];
              3'd6: res = a | b;
              default: res = a & b;
            endcase
            if (w32) res = sx32(res[31:0]);
          end
        end
        default: ;
      endcase
      if (we && rd != 0) x[rd] = res;
      if (!trapped) exp_q.push_back('{pc: pc, we: (we && rd != 0), rd: rd, val: res});
      if (idx == end_idx) break;
      pc = npc;
      steps++;
    end
  endtask

  function automatic longint unsigned ref_muldiv(input logic [2:0] f3, input bit w32,
                                                 input longint unsigned a, input longint unsigned b);
    logic signed [127:0] p;
    longint signed sa, sb;
    int signed wa, wb;
    int unsigned ua, ub;
    if (w32) begin
      wa = a[31:0]; wb = b[31:0]; ua = a[31:0]; ub = b[31:0];
      case (f3)
        3'd0: return sx32(32'(wa * wb));
        3'd4: return (wb == 0) ? '1 : (wa == 32'sh8000_0000 && wb == -1) ? sx32(32'h8000_0000) : sx32(32'(wa / wb));
        3'd5: return (ub == 0) ? '1 : sx32(ua / ub);
        3'd6: return (wb == 0) ? sx32(32'(wa)) : (wa == 32'sh8000_0000 && wb == -1) ? 0 : sx32(32'(wa % wb));
        default: return (ub == 0) ? sx32(ua) : sx32(ua % ub);
      endcase
    end
    sa = a; sb = b;
    case (f3)
      3'd0: return a * b;
      3'd1: begin p = 128'(sa) * 128'(sb); return p[127:64]; end
      3'd2: begin p = 128'(sa) * $signed({64'b0, b}); return p[127:64]; end
      3'd3: begin p = {64'b0, a} * {64'b0, b}; return p[127:64]; end
      3'd4: return (b == 0) ? '1 : (a == 64'h8000_0000_0000_0000 && sb == -1) ? a : 64'(sa / sb);
      3'd5: return (b == 0) ? '1 : a / b;
      3'd6: return (b == 0) ? a : (a == 64'h8000_0000_0000_0000 && sb == -1) ? 0 : 64'(sa % sb);
      default: return (b == 0) ? a : a % b;
    endcase
  endfunction

  // ------------------------------------------------------------ mechanism counters
  int n_ex_redir, n_f3_redir, n_f2_redir, n_hz, n_byp_ex, n_byp_mem, n_byp_wb;
  int n_ic_refill, n_dc_refill, n_dc_store, n_evict, n_md_stall, n_retired, n_trap, n_mret;
  longint unsigned cycles;

  always @(posedge clk) if (rst_n) begin
    cycles++;
    if (dut.ex_redirect) n_ex_redir++;
    if (dut.f3_redirect) n_f3_redir++;
    if (dut.f2_redirect) n_f2_redir++;
    if (dut.hz_stall_eff && !dut.gstall) n_hz++;
    if (dut.md_stall) n_md_stall++;
    if (dut.csr_trap && !dut.gstall) n_trap++;
    if (dut.ex_valid && dut.ex_ctrl.sys_op == riscy_pkg::SYS_MRET && !dut.gstall) n_mret++;
    if (dut.issue) begin
      if (dut.d_ctrl.uses_rs1 && dut.src1 == dut.SRC_EX  || dut.d_ctrl.uses_rs2 && dut.src2 == dut.SRC_EX)  n_byp_ex++;
      if (dut.d_ctrl.uses_rs1 && dut.src1 == dut.SRC_MEM || dut.d_ctrl.uses_rs2 && dut.src2 == dut.SRC_MEM) n_byp_mem++;
      if (dut.d_ctrl.uses_rs1 && dut.src1 == dut.SRC_WB  || dut.d_ctrl.uses_rs2 && dut.src2 == dut.SRC_WB)  n_byp_wb++;
    end
    if (imem_req_valid && imem_req_ready) n_ic_refill++;
    if (dmem_req_valid && dmem_req_ready && !dmem_req_we) begin
      n_dc_refill++;
      if (&dut.u_dcache.s2_v) n_evict++;
    end
    if (dmem_req_valid && dmem_req_ready && dmem_req_we) n_dc_store++;
  end

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL: mechanism never happened: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  // ------------------------------------------------------------ retirement check
  bit done = 0;
  always @(posedge clk) if (rst_n && rt_valid && !done) begin
    retire_t e;
    n_retired++;
    if (exp_q.size() == 0) begin
      failures++; checks++;
      $display("FAIL: retired more instructions than expected, pc=%h", rt_pc);
      done = 1;
    end else begin
      e = exp_q.pop_front();
      checks++;
      if (rt_pc != e.pc || rt_we != e.we || (e.we && (rt_rd != 5'(e.rd) || rt_wdata != e.val))) begin
        failures++;
        if (failures < 10)
          $display("FAIL: retire #%0d instr=%h pc=%h we=%0d rd=%0d val=%h, expected pc=%h we=%0d rd=%0d val=%h",
                   n_retired, rt_instr, rt_pc, rt_we, rt_rd, rt_wdata, e.pc, e.we, e.rd, e.val);
      end
      if (exp_q.size() == 0) done = 1;
    end
  end

  initial begin
    n_ex_redir = 0; n_f3_redir = 0; n_f2_redir = 0; n_hz = 0; n_byp_ex = 0; n_byp_mem = 0;
    n_byp_wb = 0; n_ic_refill = 0; n_dc_refill = 0; n_dc_store = 0; n_evict = 0;
    n_md_stall = 0; n_retired = 0; cycles = 0;
    void'($urandom(7));
    build_program();
    for (int i = 0; i < prog.size(); i++)
      u_imem.mem[i / 2][32 * (i % 2) +: 32] = prog[i];
    for (int i = 0; i < DWORDS; i++) begin
      automatic logic [63:0] v = {$urandom(), $urandom()};
      u_dmem.mem[i] = v;
      ref_mem[i]    = v;
    end
    run_reference();
    $display("program: %0d instructions, %0d dynamic", prog.size(), exp_q.size());
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (5) @(posedge clk);
    for (int i = 0; i < DWORDS; i++) begin
      checks++;
      if (u_dmem.mem[i] !== ref_mem[i]) begin
        failures++;
        if (failures < 20) $display("FAIL: mem[%0d]=%h expected %h", i, u_dmem.mem[i], ref_mem[i]);
      end
    end
    $display("cycles=%0d retired=%0d", cycles, n_retired);
    need("EX misprediction redirect", n_ex_redir);
    need("F3 (BHT/JAL) redirect", n_f3_redir);
    need("F2 (BTB) redirect", n_f2_redir);
    need("Decode hazard stall", n_hz);
    need("bypass from EX", n_byp_ex);
    need("bypass from MEM", n_byp_mem);
    need("bypass from WB", n_byp_wb);
    need("I-cache refill", n_ic_refill);
    need("D-cache refill", n_dc_refill);
    need("D-cache eviction", n_evict);
    need("write-through store", n_dc_store);
    need("mul/div stall cycles", n_md_stall);
    need("trap (ECALL)", n_trap);
    need("MRET", n_mret);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d instructions retired", n_retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
