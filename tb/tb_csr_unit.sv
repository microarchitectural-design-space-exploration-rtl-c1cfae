// Self-checking test of the machine-mode CSR and trap unit.
//
// The bench drives random system operations into the unit, one per cycle:
// CSR reads and writes (register and immediate forms, with and without a
// zero source) to every implemented address and to a few unknown ones,
// ECALL, EBREAK, MRET, illegal instructions, and cycles with the pipeline
// frozen or no instruction present. A model kept here holds the expected
// register contents, worked out from the RISC-V privileged specification,
// and each cycle the read value, the trap and redirect outputs and the
// redirect address are compared with it. The cycle and retired-instruction
// counters are checked too: the bench pulses retire at random and counts.
module tb_csr_unit;
  import riscy_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        valid, stall, legal, src_nz, retire;
  sys_op_e     sys_op;
  logic [11:0] csr_addr;
  xlen_t       wdata, pc, rdata, redirect_pc;
  logic [31:0] instr;
  logic        trap, redirect;
  int checks = 0, failures = 0, n_trap = 0, n_mret = 0, n_wr = 0;

  csr_unit dut (.*);

  always #5 clk = ~clk;

  // model state
  logic  m_mie, m_mpie;
  xlen_t m_mtvec, m_mscratch, m_mepc, m_mcause, m_mtval, m_mcycle, m_minstret;

  localparam logic [11:0] ADDRS [18] = '{12'h300, 12'h301, 12'h304, 12'h305, 12'h340, 12'h341,
                                         12'h342, 12'h343, 12'h344, 12'hB00, 12'hB02, 12'hC00,
                                         12'hC02, 12'hF11, 12'hF14, 12'h7C0, 12'h180, 12'h306};

  function automatic logic known(input logic [11:0] a);
    return !(a == 12'h7C0 || a == 12'h180 || a == 12'h306);
  endfunction

  function automatic xlen_t mread(input logic [11:0] a);
    case (a)
      12'h300: return {51'd0, 2'b11, 3'd0, m_mpie, 3'd0, m_mie, 3'd0};
      12'h301: return 64'h8000_0000_0000_1104;
      12'h305: return m_mtvec;
      12'h340: return m_mscratch;
      12'h341: return m_mepc;
      12'h342: return m_mcause;
      12'h343: return m_mtval;
      12'hB00, 12'hC00: return m_mcycle;
      12'hB02, 12'hC02: return m_minstret;
      default: return '0;
    endcase
  endfunction

  initial begin
    valid = 0; stall = 0; legal = 1; src_nz = 0; retire = 0; sys_op = SYS_NONE;
    csr_addr = '0; wdata = '0; pc = '0; instr = '0;
    m_mie = 0; m_mpie = 0; m_mtvec = '0; m_mscratch = '0; m_mepc = '0; m_mcause = '0;
    m_mtval = '0; m_mcycle = '0; m_minstret = '0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      automatic int r = $urandom_range(99);
      automatic logic is_csr, wr, e_trap, e_redirect, bad;
      automatic logic [63:0] e_cause, e_rdata, nv, old;
      valid    = ($urandom_range(9) != 0);
      stall    = ($urandom_range(9) == 0);
      retire   = 1'($urandom_range(1));
      legal    = 1;
      csr_addr = ADDRS[$urandom_range(17)];
      wdata    = {$urandom(), $urandom()};
      if ($urandom_range(3) == 0) wdata = 64'($urandom_range(31));
      src_nz   = 1'($urandom_range(3) != 0);
      pc       = {32'h0, $urandom()} & ~64'd1;
      instr    = $urandom();
      if (r < 60)      sys_op = sys_op_e'(1 + $urandom_range(2));
      else if (r < 68) sys_op = SYS_ECALL;
      else if (r < 76) sys_op = SYS_EBREAK;
      else if (r < 86) sys_op = SYS_MRET;
      else if (r < 93) begin sys_op = SYS_NONE; legal = 0; end
      else             sys_op = SYS_NONE;
      // expected
      is_csr  = sys_op inside {SYS_CSRRW, SYS_CSRRS, SYS_CSRRC};
      wr      = (sys_op == SYS_CSRRW) || src_nz;
      bad     = is_csr && (!known(csr_addr) || (wr && csr_addr[11:10] == 2'b11));
      e_trap  = valid && (!legal || bad || sys_op == SYS_ECALL || sys_op == SYS_EBREAK);
      e_redirect = e_trap || (valid && sys_op == SYS_MRET);
      old     = mread(csr_addr);
      e_rdata = old;
      e_cause = (!legal || bad) ? 64'd2 : (sys_op == SYS_EBREAK) ? 64'd3 : 64'd11;
      #1;
      checks++;
      if (trap !== e_trap || redirect !== e_redirect ||
          (e_redirect && redirect_pc !== (e_trap ? m_mtvec : m_mepc)) ||
          (is_csr && known(csr_addr) && rdata !== e_rdata)) begin
        failures++;
        if (failures < 10)
          $display("FAIL cyc %0d op=%s a=%h trap=%0d/%0d redir=%0d/%0d pc=%h rdata=%h/%h", cyc,
                   sys_op.name(), csr_addr, trap, e_trap, redirect, e_redirect, redirect_pc,
                   rdata, e_rdata);
      end
      // model update at the edge
      case (sys_op)
        SYS_CSRRW: nv = wdata;
        SYS_CSRRS: nv = old | wdata;
        default:   nv = old & ~wdata;
      endcase
      m_mcycle = m_mcycle + 1;
      if (retire) m_minstret = m_minstret + 1;
      if (valid && !stall) begin
        if (e_trap) begin
          n_trap++;
          m_mepc   = pc;
          m_mpie   = m_mie;
          m_mie    = 0;
          m_mcause = e_cause;
          m_mtval  = (!legal || bad) ? {32'd0, instr} : (sys_op == SYS_EBREAK) ? pc : '0;
        end else if (sys_op == SYS_MRET) begin
          n_mret++;
          m_mie  = m_mpie;
          m_mpie = 1;
        end else if (is_csr && wr) begin
          n_wr++;
          case (csr_addr)
            12'h300: begin m_mie = nv[3]; m_mpie = nv[7]; end
            12'h305: m_mtvec    = nv & ~64'd3;
            12'h340: m_mscratch = nv;
            12'h341: m_mepc     = nv & ~64'd1;
            12'h342: m_mcause   = nv;
            12'h343: m_mtval    = nv;
            12'hB00: m_mcycle   = nv;
            12'hB02: m_minstret = nv;
            default: ;
          endcase
        end
      end
      @(negedge clk);
    end
    checks++;
    if (n_trap == 0 || n_mret == 0 || n_wr == 0) begin
      failures++;
      $display("FAIL: a case never happened");
    end
    $display("traps=%0d mret=%0d writes=%0d", n_trap, n_mret, n_wr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
