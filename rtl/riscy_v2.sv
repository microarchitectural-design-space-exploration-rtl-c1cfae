// Riscy v2: seven-stage in-order RV64IMC core with L1 instruction and data
// caches.
//
// The point of the design is clock frequency: the outputs of the cache
// SRAMs are registered before anything else is done with them, so that the
// slow SRAM access and the tag comparison never share a cycle. The front end
// therefore has three stages and the data cache is started one stage early,
// in Execute:
//
//   F1  PC register, next parcel address and the next-PC mux; instruction
//       cache S0. Fetch works on aligned 32-bit parcels.
//   F2  instruction SRAM outputs are registered; BTB lookup per parcel, a
//       hit redirects F1 to the BTB target (1 bubble)
//   F3  tag compare and way select; re-aligner (cuts parcels into 16- and
//       32-bit instructions and expands the 16-bit ones); pre-decoder and
//       BHT: a direction or JAL target differing from F2's guess redirects
//       F1 (2 bubbles). A parcel holding two instructions keeps F1 to F3
//       for one extra cycle.
//   D   decoder, register file read, scoreboard, operand bypass
//   EX  ALU, misprediction unit (redirect, BTB/BHT training), CSR unit
//       (CSR accesses, traps, MRET; redirects like a misprediction),
//       multiply/divide start, data cache S0 (the address is the ALU sum)
//   MEM data SRAM outputs registered; multiply/divide result carried
//   WB  data tag compare, load alignment, write-back mux, register write,
//       scoreboard clear
//
// Bypassing: Decode takes each source operand from the youngest in-flight
// writer that has its value (EX for ALU results, MEM for ALU and mul/div
// results, WB for everything including loads), or from the register file
// when the scoreboard says nothing is pending. A source whose youngest
// writer is a load in EX or MEM, or a mul/div in EX, stalls Decode and the
// stages in front of it; a bubble goes into EX ("hazard stall").
//
// Global stall: an instruction cache miss, a data cache miss or store, or a
// multiply/divide in progress freeze every stage. Redirects take effect
// only in cycles without a global stall; a misprediction in EX has priority
// over F3's and F3's over F2's.
//
// Ports: a memory port per cache (see l1_cache) and a retirement trace
// (rt_*) giving every instruction leaving WB, in program order, with its
// register write; rt_instr is the 32-bit form of compressed instructions.
// A trapped instruction goes on to WB as a bubble that writes nothing and
// is not traced. Outside the document: the ISA subset is RV64IMC with
// machine-mode CSRs and traps (no F/D, A, supervisor or user mode,
// interrupts or TLB); accesses that cross an 8-byte boundary are not
// supported; the place of traps in Execute, the 32-bit fetch parcel, predictor
// sizes, the reset PC and the way multiply/divide stalls the pipeline are
// this design's choices.
module riscy_v2
  import riscy_pkg::*;
#(
  parameter xlen_t       RESET_PC     = 64'h0000_0000_8000_0000,
  parameter int unsigned ICACHE_BYTES = 16384,
  parameter int unsigned DCACHE_BYTES = 16384,
  parameter int unsigned CACHE_WAYS   = 4,
  parameter int unsigned LINE_BYTES   = 64,
  parameter int unsigned BTB_ENTRIES  = 64,
  parameter int unsigned BHT_ENTRIES  = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory port
  output logic        imem_req_valid,
  input  logic        imem_req_ready,
  output logic        imem_req_we,
  output xlen_t       imem_req_addr,
  output xlen_t       imem_req_wdata,
  output logic [7:0]  imem_req_be,
  input  logic        imem_resp_valid,
  input  xlen_t       imem_resp_data,
  // data memory port
  output logic        dmem_req_valid,
  input  logic        dmem_req_ready,
  output logic        dmem_req_we,
  output xlen_t       dmem_req_addr,
  output xlen_t       dmem_req_wdata,
  output logic [7:0]  dmem_req_be,
  input  logic        dmem_resp_valid,
  input  xlen_t       dmem_resp_data,
  // retirement trace
  output logic        rt_valid,
  output xlen_t       rt_pc,
  output logic [31:0] rt_instr,
  output logic        rt_we,
  output reg_idx_t    rt_rd,
  output xlen_t       rt_wdata
);

  // ================================================================ control
  logic gstall, hz_stall, hz_stall_eff, d_stall, fe_stall, ra_hold;
  logic ic_busy, dc_busy, md_stall;
  logic ex_redirect, f3_redirect, f2_redirect;
  xlen_t ex_redirect_pc, mp_redirect_pc, f3_npc, f3_rpc;

  // ================================================================ F1
  xlen_t pc_q, seq_pc;

  // ================================================================ F2
  logic  f2_valid;
  xlen_t f2_pc, f2_pred_npc, btb_target;
  logic  btb_hit;

  // ================================================================ F3
  logic  f3_valid, f3_btb_hit;
  xlen_t f3_pc, f3_pred_npc, f3_parcel_addr, f3_ipc;
  logic  ic_resp_valid;
  xlen_t ic_resp_data;
  logic [31:0] f3_parcel, f3_instr;
  logic  ra_valid, ra_last, f3_is_c;
  logic  bht_taken, f3_is_branch, pd_taken, pd_redirect;

  // ================================================================ D
  logic        d_valid, d_is_c;
  xlen_t       d_pc, d_pred_npc;
  logic [31:0] d_instr;
  ctrl_t       d_ctrl;
  xlen_t       rf_rd1, rf_rd2, d_op1, d_op2;
  logic        pend1, pend2;

  // ================================================================ EX
  logic        ex_valid, ex_is_c;
  xlen_t       ex_pc, ex_pred_npc, ex_rs1v, ex_rs2v;
  logic [31:0] ex_instr;
  ctrl_t       ex_ctrl;
  xlen_t       ex_opa, ex_opb, ex_alu_y, ex_result;
  logic        mp_mispredict, btb_up_en, bht_up_en, bht_up_taken;
  xlen_t       btb_up_target, btb_up_pc, ex_next_pc;
  logic        md_done;
  xlen_t       md_result;
  logic        csr_trap, csr_redirect;
  xlen_t       csr_rdata, csr_redirect_pc;

  // ================================================================ MEM / WB
  typedef struct packed {
    logic        valid;
    xlen_t       pc;
    logic [31:0] instr;
    logic        writes_rd;
    reg_idx_t    rd;
    mem_op_e     mem_op;
    mem_size_e   mem_size;
    logic        mem_unsigned;
    logic [2:0]  byte_off;
    logic        is_muldiv;
    logic        trapped;     // took a trap in Execute: no register write
    xlen_t       result;
  } late_t;

  late_t m_q, w_q;
  logic  dc_resp_valid;
  xlen_t dc_resp_data, wb_value;
  logic  wb_write;

  // ============================================================ stalls
  assign gstall       = ic_busy || dc_busy || md_stall;
  assign hz_stall_eff = hz_stall && !ex_redirect;
  assign d_stall      = gstall || hz_stall_eff;
  assign fe_stall     = d_stall || ra_hold;

  // ============================================================ F1: PC
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             pc_q <= RESET_PC;
    else if (ex_redirect)   pc_q <= ex_redirect_pc;
    else if (!fe_stall) begin
      if (f3_redirect)      pc_q <= f3_rpc;
      else if (f2_redirect) pc_q <= btb_target;
      else                  pc_q <= seq_pc;
    end
  end
  // the next parcel; pc_q[1] is set only right after a jump to A + 2
  assign seq_pc = {pc_q[63:2], 2'b00} + 64'd4;

  // ============================================================ F2: BTB
  btb #(.ENTRIES(BTB_ENTRIES)) u_btb (
    .clk, .rst_n,
    .lk_pc(f2_pc), .lk_hit(btb_hit), .lk_target(btb_target),
    .up_en(btb_up_en && !gstall), .up_pc(btb_up_pc), .up_target(btb_up_target)
  );
  assign f2_pred_npc = btb_hit ? btb_target : {f2_pc[63:2], 2'b00} + 64'd4;
  assign f2_redirect = f2_valid && btb_hit && !fe_stall && !ex_redirect && !f3_redirect;

  // ============================================================ I-cache
  l1_cache #(.SIZE_BYTES(ICACHE_BYTES), .WAYS(CACHE_WAYS), .LINE_BYTES(LINE_BYTES)) u_icache (
    .clk, .rst_n,
    .stall_i(fe_stall),
    .req_valid(1'b1), .req_addr(pc_q), .req_we(1'b0), .req_wdata('0), .req_be('0),
    .kill_s0(ex_redirect || f3_redirect || f2_redirect),
    .kill_s1(ex_redirect || f3_redirect),
    .resp_valid(ic_resp_valid), .resp_data(ic_resp_data), .busy(ic_busy),
    .mem_req_valid(imem_req_valid), .mem_req_ready(imem_req_ready), .mem_req_we(imem_req_we),
    .mem_req_addr(imem_req_addr), .mem_req_wdata(imem_req_wdata), .mem_req_be(imem_req_be),
    .mem_resp_valid(imem_resp_valid), .mem_resp_data(imem_resp_data)
  );

  // ============================================================ F3: re-align, pre-decode, BHT
  assign f3_parcel_addr = {f3_pc[63:2], 2'b00};
  assign f3_parcel      = f3_pc[2] ? ic_resp_data[63:32] : ic_resp_data[31:0];

  realigner u_realigner (
    .clk, .rst_n,
    .in_valid(f3_valid && ic_resp_valid), .in_parcel(f3_parcel), .in_addr(f3_parcel_addr),
    .in_start_hi(f3_pc[1]), .adv(!d_stall), .cut(pd_taken), .flush(ex_redirect),
    .out_valid(ra_valid), .out_instr(f3_instr), .out_is_c(f3_is_c), .out_pc(f3_ipc),
    .out_last(ra_last)
  );
  // a parcel holding two instructions keeps Fetch 1 to Fetch 3 for a cycle
  assign ra_hold = f3_valid && ic_resp_valid && !ra_last && !pd_taken;

  bht #(.ENTRIES(BHT_ENTRIES)) u_bht (
    .clk, .rst_n,
    .lk_pc(f3_ipc), .lk_taken(bht_taken),
    .up_en(bht_up_en && !gstall), .up_pc(ex_pc), .up_taken(bht_up_taken)
  );

  predecoder u_predecoder (
    .valid(f3_valid && ic_resp_valid), .instr_valid(ra_valid), .instr(f3_instr),
    .is_c(f3_is_c), .pc(f3_ipc), .parcel_end(ra_last), .seq_fetch(f3_parcel_addr + 64'd4),
    .f2_pred_npc(f3_pred_npc), .f2_btb_hit(f3_btb_hit), .bht_taken(bht_taken),
    .is_branch(f3_is_branch), .taken(pd_taken), .pred_npc(f3_npc),
    .redirect(pd_redirect), .redirect_pc(f3_rpc)
  );
  assign f3_redirect = pd_redirect && !d_stall && !ex_redirect;

  // ============================================================ front-end registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f2_valid    <= 1'b0;
      f2_pc       <= '0;
      f3_valid    <= 1'b0;
      f3_btb_hit  <= 1'b0;
      f3_pc       <= '0;
      f3_pred_npc <= '0;
      d_valid     <= 1'b0;
      d_is_c      <= 1'b0;
      d_pc        <= '0;
      d_pred_npc  <= '0;
      d_instr     <= INSTR_NOP;
    end else begin
      if (!fe_stall || ex_redirect) begin
        f2_valid    <= !(ex_redirect || f3_redirect || f2_redirect);
        f2_pc       <= pc_q;
        f3_valid    <= f2_valid && !(ex_redirect || f3_redirect);
        f3_btb_hit  <= btb_hit;
        f3_pc       <= f2_pc;
        f3_pred_npc <= f2_pred_npc;
      end
      if (!d_stall || ex_redirect) begin
        d_valid     <= ra_valid && !ex_redirect;
        d_is_c      <= f3_is_c;
        d_pc        <= f3_ipc;
        d_pred_npc  <= f3_npc;
        d_instr     <= f3_instr;
      end
    end
  end

  // ============================================================ D: decode, RF, scoreboard, bypass
  decoder u_decoder (.instr(d_instr), .ctrl(d_ctrl));

  regfile u_regfile (
    .clk, .rst_n,
    .raddr1(d_ctrl.rs1), .rdata1(rf_rd1),
    .raddr2(d_ctrl.rs2), .rdata2(rf_rd2),
    .we(wb_write && !w_q.trapped), .waddr(w_q.rd), .wdata(wb_value)
  );

  logic issue;
  assign issue = d_valid && !d_stall && !ex_redirect;

  scoreboard u_scoreboard (
    .clk, .rst_n,
    .set_en(issue && d_ctrl.writes_rd), .set_rd(d_ctrl.rd),
    .clr_en(wb_write), .clr_rd(w_q.rd),
    .rs1(d_ctrl.rs1), .rs2(d_ctrl.rs2), .pend1, .pend2
  );

  // Which stage a pending operand comes from
  typedef enum logic [1:0] { SRC_RF, SRC_EX, SRC_MEM, SRC_WB } src_e;

  function automatic void pick_source(
      input reg_idx_t rs, input logic pend,
      input logic ex_w, input reg_idx_t ex_rd, input logic ex_ready,
      input logic m_w,  input reg_idx_t m_rd,  input logic m_ready,
      input logic w_w,  input reg_idx_t w_rd,
      output src_e src, output logic ready);
    src = SRC_RF; ready = 1'b1;
    if (pend) begin
      if (ex_w && ex_rd == rs)     begin src = SRC_EX;  ready = ex_ready; end
      else if (m_w && m_rd == rs)  begin src = SRC_MEM; ready = m_ready;  end
      else if (w_w && w_rd == rs)  begin src = SRC_WB;  ready = 1'b1;     end
      else                         begin src = SRC_RF;  ready = 1'b1;     end
    end
  endfunction

  src_e  src1, src2;
  logic  rdy1, rdy2;
  logic  ex_w, m_w, w_w, ex_ready, m_ready;

  assign ex_w     = ex_valid && ex_ctrl.writes_rd;
  assign m_w      = m_q.valid && m_q.writes_rd;
  assign w_w      = w_q.valid && w_q.writes_rd;
  assign ex_ready = (ex_ctrl.mem_op != MEM_LOAD) && !ex_ctrl.is_muldiv;
  assign m_ready  = (m_q.mem_op != MEM_LOAD);

  always_comb begin
    pick_source(d_ctrl.rs1, pend1, ex_w, ex_ctrl.rd, ex_ready, m_w, m_q.rd, m_ready,
                w_w, w_q.rd, src1, rdy1);
    pick_source(d_ctrl.rs2, pend2, ex_w, ex_ctrl.rd, ex_ready, m_w, m_q.rd, m_ready,
                w_w, w_q.rd, src2, rdy2);
    unique case (src1)
      SRC_EX:  d_op1 = ex_result;
      SRC_MEM: d_op1 = m_q.result;
      SRC_WB:  d_op1 = wb_value;
      default: d_op1 = rf_rd1;
    endcase
    unique case (src2)
      SRC_EX:  d_op2 = ex_result;
      SRC_MEM: d_op2 = m_q.result;
      SRC_WB:  d_op2 = wb_value;
      default: d_op2 = rf_rd2;
    endcase
  end

  assign hz_stall = d_valid && ((d_ctrl.uses_rs1 && !rdy1) || (d_ctrl.uses_rs2 && !rdy2));

  // ============================================================ D -> EX
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid    <= 1'b0;
      ex_is_c     <= 1'b0;
      ex_pc       <= '0;
      ex_pred_npc <= '0;
      ex_instr    <= INSTR_NOP;
      ex_ctrl     <= '0;
      ex_rs1v     <= '0;
      ex_rs2v     <= '0;
    end else if (!gstall) begin
      ex_valid    <= issue;
      ex_is_c     <= d_is_c;
      ex_pc       <= d_pc;
      ex_pred_npc <= d_pred_npc;
      ex_instr    <= d_instr;
      ex_ctrl     <= d_ctrl;
      ex_rs1v     <= d_op1;
      ex_rs2v     <= d_op2;
    end
  end

  // ============================================================ EX
  always_comb begin
    unique case (ex_ctrl.opa_sel)
      OPA_PC:   ex_opa = ex_pc;
      OPA_ZERO: ex_opa = '0;
      default:  ex_opa = ex_rs1v;
    endcase
    ex_opb = (ex_ctrl.opb_sel == OPB_IMM) ? ex_ctrl.imm : ex_rs2v;
  end

  alu u_alu (.op(ex_ctrl.alu_op), .word_op(ex_ctrl.word_op), .a(ex_opa), .b(ex_opb), .y(ex_alu_y));

  assign ex_next_pc = ex_pc + (ex_is_c ? 64'd2 : 64'd4);
  assign ex_result  = (ex_ctrl.is_jal || ex_ctrl.is_jalr) ? ex_next_pc
                    : (ex_ctrl.sys_op != SYS_NONE)        ? csr_rdata : ex_alu_y;
  // the BTB is looked up per parcel: train the parcel holding the last
  // halfword of the jump (a 32-bit jump at A + 2 ends in the next parcel)
  assign btb_up_pc  = ex_pc + (ex_is_c ? 64'd0 : 64'd2);

  mispred_unit u_mispred (
    .valid(ex_valid), .br_op(ex_ctrl.br_op), .is_jal(ex_ctrl.is_jal), .is_jalr(ex_ctrl.is_jalr),
    .is_c(ex_is_c), .pc(ex_pc), .rs1(ex_rs1v), .rs2(ex_rs2v), .imm(ex_ctrl.imm), .pred_npc(ex_pred_npc),
    .mispredict(mp_mispredict), .redirect_pc(mp_redirect_pc),
    .btb_up_en, .btb_up_target, .bht_up_en, .bht_up_taken
  );
  // system instructions and traps (machine mode only)
  csr_unit u_csr (
    .clk, .rst_n,
    .valid(ex_valid), .stall(gstall), .legal(ex_ctrl.valid_instr), .sys_op(ex_ctrl.sys_op),
    .csr_addr(ex_ctrl.imm[11:0]),
    .wdata(ex_ctrl.csr_imm ? {59'd0, ex_ctrl.rs1} : ex_rs1v), .src_nz(ex_ctrl.rs1 != '0),
    .pc(ex_pc), .instr(ex_instr), .retire(rt_valid),
    .rdata(csr_rdata), .trap(csr_trap), .redirect(csr_redirect), .redirect_pc(csr_redirect_pc)
  );

  assign ex_redirect    = (mp_mispredict || csr_redirect) && !gstall;
  assign ex_redirect_pc = csr_redirect ? csr_redirect_pc : mp_redirect_pc;

  logic md_req;
  assign md_req   = ex_valid && ex_ctrl.is_muldiv;
  assign md_stall = md_req && !md_done;

  muldiv u_muldiv (
    .clk, .rst_n, .req(md_req), .ack(!gstall), .op(ex_ctrl.md_op), .word_op(ex_ctrl.word_op),
    .a(ex_rs1v), .b(ex_rs2v), .done(md_done), .result(md_result)
  );

  // data cache request: address from the ALU, store data and byte enables
  logic [2:0] ex_off;
  logic [7:0] ex_be;
  xlen_t      ex_wdata;
  assign ex_off = ex_alu_y[2:0];
  always_comb begin
    unique case (ex_ctrl.mem_size)
      SZ_B:    ex_be = 8'b0000_0001 << ex_off;
      SZ_H:    ex_be = 8'b0000_0011 << ex_off;
      SZ_W:    ex_be = 8'b0000_1111 << ex_off;
      default: ex_be = 8'b1111_1111;
    endcase
    ex_wdata = ex_rs2v << {ex_off, 3'b000};
  end

  l1_cache #(.SIZE_BYTES(DCACHE_BYTES), .WAYS(CACHE_WAYS), .LINE_BYTES(LINE_BYTES)) u_dcache (
    .clk, .rst_n,
    .stall_i(gstall),
    .req_valid(ex_valid && ex_ctrl.mem_op != MEM_NONE), .req_addr(ex_alu_y),
    .req_we(ex_ctrl.mem_op == MEM_STORE), .req_wdata(ex_wdata), .req_be(ex_be),
    .kill_s0(1'b0), .kill_s1(1'b0),
    .resp_valid(dc_resp_valid), .resp_data(dc_resp_data), .busy(dc_busy),
    .mem_req_valid(dmem_req_valid), .mem_req_ready(dmem_req_ready), .mem_req_we(dmem_req_we),
    .mem_req_addr(dmem_req_addr), .mem_req_wdata(dmem_req_wdata), .mem_req_be(dmem_req_be),
    .mem_resp_valid(dmem_resp_valid), .mem_resp_data(dmem_resp_data)
  );

  // ============================================================ EX -> MEM -> WB
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m_q <= '0;
      w_q <= '0;
    end else if (!gstall) begin
      m_q.valid        <= ex_valid;
      m_q.pc           <= ex_pc;
      m_q.instr        <= ex_instr;
      m_q.writes_rd    <= ex_ctrl.writes_rd;
      m_q.rd           <= ex_ctrl.rd;
      m_q.mem_op       <= ex_ctrl.mem_op;
      m_q.mem_size     <= ex_ctrl.mem_size;
      m_q.mem_unsigned <= ex_ctrl.mem_unsigned;
      m_q.byte_off     <= ex_off;
      m_q.is_muldiv    <= ex_ctrl.is_muldiv;
      m_q.trapped      <= csr_trap;
      m_q.result       <= ex_ctrl.is_muldiv ? md_result : ex_result;
      w_q              <= m_q;
    end
  end

  // ============================================================ WB: load alignment, write-back mux
  function automatic xlen_t load_align(input xlen_t word, input logic [2:0] off,
                                       input mem_size_e sz, input logic uns);
    xlen_t sh;
    sh = word >> {off, 3'b000};
    unique case (sz)
      SZ_B:    return uns ? {56'b0, sh[7:0]}  : {{56{sh[7]}},  sh[7:0]};
      SZ_H:    return uns ? {48'b0, sh[15:0]} : {{48{sh[15]}}, sh[15:0]};
      SZ_W:    return uns ? {32'b0, sh[31:0]} : {{32{sh[31]}}, sh[31:0]};
      default: return sh;
    endcase
  endfunction

  assign wb_value = (w_q.mem_op == MEM_LOAD)
                  ? load_align(dc_resp_data, w_q.byte_off, w_q.mem_size, w_q.mem_unsigned)
                  : w_q.result;
  // wb_write also clears the scoreboard, so it stays on for a trapped
  // instruction; only the register write itself is dropped
  assign wb_write = w_q.valid && w_q.writes_rd && !gstall;

  assign rt_valid = w_q.valid && !w_q.trapped && !gstall;
  assign rt_pc    = w_q.pc;
  assign rt_instr = w_q.instr;
  assign rt_we    = w_q.writes_rd;
  assign rt_rd    = w_q.rd;
  assign rt_wdata = wb_value;

  // ============================================================ checks
  // a load in Write Back always has its data once the data cache is not busy
  a_load_data: assert property (@(posedge clk) disable iff (!rst_n)
    (w_q.valid && w_q.mem_op == MEM_LOAD && !gstall) |-> dc_resp_valid);
  // the instruction in Fetch 3 always has its word once the I-cache is not busy
  a_fetch_data: assert property (@(posedge clk) disable iff (!rst_n)
    (f3_valid && !ic_busy) |-> ic_resp_valid);

endmodule
