// Machine-mode CSR and trap unit (Execute).
//
// Holds the machine-level control and status registers and carries out
// the system instructions when they reach Execute: the CSR read-modify-
// write instructions (CSRRW/S/C and their immediate forms), ECALL, EBREAK
// and MRET, and the illegal-instruction trap for any instruction the
// decoder did not recognise or a CSR access it does not allow. Execute is
// the right place because every instruction there is on the correct path
// and all older instructions are past the point where they could trap, so
// traps are precise without further bookkeeping.
//
// Registers: mstatus (MIE, MPIE; MPP reads as machine mode), misa, mie and
// mip (read as zero: no interrupt sources), mtvec (direct mode only),
// mscratch, mepc, mcause, mtval, mcycle and minstret (64-bit, writable),
// their read-only aliases cycle and instret, and mvendorid, marchid,
// mimpid, mhartid (read as zero). Other addresses, and writes to read-only
// ones, are illegal.
//
// Interface and timing: rdata (the CSR's old value, the instruction's
// result), trap and redirect/redirect_pc are combinational from the
// Execute-stage inputs. State changes at the clock edge when valid is high
// and stall is low, the cycle in which the instruction leaves Execute.
// On a trap, mepc gets the PC, mcause the cause, mtval the instruction
// word (illegal instruction) or the PC (EBREAK), and fetch restarts at
// mtvec; MRET restarts at mepc. minstret counts retire pulses, mcycle
// every cycle. The document says only that the core implements the
// privileged architecture; this machine-mode subset, its place in Execute
// and the register set are this design's choices, following the RISC-V
// privileged specification. No supervisor or user mode, no interrupts,
// no virtual memory.
module csr_unit
  import riscy_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,       // an instruction is in Execute
  input  logic        stall,       // the pipeline is frozen this cycle
  input  logic        legal,       // the decoder recognised it
  input  sys_op_e     sys_op,
  input  logic [11:0] csr_addr,
  input  xlen_t       wdata,       // rs1 value or zero-extended immediate
  input  logic        src_nz,      // rs1 field non-zero (CSRRS/C write only then)
  input  xlen_t       pc,
  input  logic [31:0] instr,
  input  logic        retire,      // an instruction retires this cycle
  output xlen_t       rdata,
  output logic        trap,
  output logic        redirect,
  output xlen_t       redirect_pc
);
  localparam logic [11:0] A_MSTATUS = 12'h300, A_MISA = 12'h301, A_MIE = 12'h304,
                          A_MTVEC = 12'h305, A_MSCRATCH = 12'h340, A_MEPC = 12'h341,
                          A_MCAUSE = 12'h342, A_MTVAL = 12'h343, A_MIP = 12'h344,
                          A_MCYCLE = 12'hB00, A_MINSTRET = 12'hB02,
                          A_CYCLE = 12'hC00, A_INSTRET = 12'hC02,
                          A_MVENDORID = 12'hF11, A_MARCHID = 12'hF12, A_MIMPID = 12'hF13,
                          A_MHARTID = 12'hF14;
  // RV64 with I, M and C
  localparam xlen_t MISA_VAL = {2'b10, 36'd0, 26'b00_0000_0000_0001_0001_0000_0100};

  logic  mie_q, mpie_q;
  xlen_t mtvec_q, mscratch_q, mepc_q, mcause_q, mtval_q, mcycle_q, minstret_q;

  logic  is_csr, known, writes, bad_csr, do_it;
  xlen_t nv;

  assign is_csr = (sys_op == SYS_CSRRW) || (sys_op == SYS_CSRRS) || (sys_op == SYS_CSRRC);
  assign writes = (sys_op == SYS_CSRRW) || src_nz;

  always_comb begin
    known = 1'b1;
    unique case (csr_addr)
      A_MSTATUS:   rdata = {51'd0, 2'b11, 3'd0, mpie_q, 3'd0, mie_q, 3'd0};
      A_MISA:      rdata = MISA_VAL;
      A_MIE, A_MIP: rdata = '0;
      A_MTVEC:     rdata = mtvec_q;
      A_MSCRATCH:  rdata = mscratch_q;
      A_MEPC:      rdata = mepc_q;
      A_MCAUSE:    rdata = mcause_q;
      A_MTVAL:     rdata = mtval_q;
      A_MCYCLE, A_CYCLE:     rdata = mcycle_q;
      A_MINSTRET, A_INSTRET: rdata = minstret_q;
      A_MVENDORID, A_MARCHID, A_MIMPID, A_MHARTID: rdata = '0;
      default: begin rdata = '0; known = 1'b0; end
    endcase
    unique case (sys_op)
      SYS_CSRRW: nv = wdata;
      SYS_CSRRS: nv = rdata | wdata;
      default:   nv = rdata & ~wdata;
    endcase
  end

  // a CSR address with bits [11:10] = 11 is read-only
  assign bad_csr  = is_csr && (!known || (writes && csr_addr[11:10] == 2'b11));
  assign trap     = valid && (!legal || bad_csr || sys_op == SYS_ECALL || sys_op == SYS_EBREAK);
  assign redirect = trap || (valid && legal && sys_op == SYS_MRET);
  assign redirect_pc = trap ? {mtvec_q[63:2], 2'b00} : mepc_q;
  assign do_it    = valid && !stall;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mie_q      <= 1'b0;
      mpie_q     <= 1'b0;
      mtvec_q    <= '0;
      mscratch_q <= '0;
      mepc_q     <= '0;
      mcause_q   <= '0;
      mtval_q    <= '0;
      mcycle_q   <= '0;
      minstret_q <= '0;
    end else begin
      mcycle_q <= mcycle_q + 64'd1;
      if (retire) minstret_q <= minstret_q + 64'd1;
      if (do_it && trap) begin
        mepc_q   <= pc;
        mpie_q   <= mie_q;
        mie_q    <= 1'b0;
        mcause_q <= !legal || bad_csr ? 64'd2 : (sys_op == SYS_EBREAK) ? 64'd3 : 64'd11;
        mtval_q  <= !legal || bad_csr ? {32'd0, instr} : (sys_op == SYS_EBREAK) ? pc : '0;
      end else if (do_it && legal && sys_op == SYS_MRET) begin
        mie_q  <= mpie_q;
        mpie_q <= 1'b1;
      end else if (do_it && legal && is_csr && writes) begin
        unique case (csr_addr)
          A_MSTATUS:  begin mie_q <= nv[3]; mpie_q <= nv[7]; end
          A_MTVEC:    mtvec_q    <= {nv[63:2], 2'b00};
          A_MSCRATCH: mscratch_q <= nv;
          A_MEPC:     mepc_q     <= {nv[63:1], 1'b0};
          A_MCAUSE:   mcause_q   <= nv;
          A_MTVAL:    mtval_q    <= nv;
          A_MCYCLE:   mcycle_q   <= nv;
          A_MINSTRET: minstret_q <= nv;
          default: ;
        endcase
      end
    end
  end
endmodule
