// Self-checking test of the decoder: every RV64IM instruction kind with
// random registers and immediates, the machine-mode system instructions
// (CSR accesses, ECALL, EBREAK, MRET, WFI), plus instructions outside the
// supported set, each compared field by field with a control word written
// out here.
module tb_decoder;
  import riscy_pkg::*;
  import rv_asm_pkg::*;
  logic [31:0] instr;
  ctrl_t ctrl;
  int checks = 0, failures = 0;

  decoder dut (.instr, .ctrl);

  ctrl_t e;
  task automatic expect_(input string what);
    #1;
    checks++;
    if (ctrl !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s instr=%h got=%h exp=%h", what, instr, ctrl, e);
    end
  endtask

  task automatic base(input int rd, input int rs1, input int rs2);
    e = '0;
    e.rd = 5'(rd); e.rs1 = 5'(rs1); e.rs2 = 5'(rs2);
    e.opa_sel = OPA_RS1; e.opb_sel = OPB_RS2; e.alu_op = ALU_ADD; e.br_op = BR_NONE;
    e.mem_op = MEM_NONE; e.valid_instr = 1;
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      automatic int rd = $urandom_range(31), r1 = $urandom_range(31), r2 = $urandom_range(31);
      automatic int imm = int'($urandom_range(4095)) - 2048;
      logic [2:0] f;
      // R-type ALU
      begin
        alu_op_e ops [8] = '{ALU_ADD, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR, ALU_SRL, ALU_OR, ALU_AND};
        f = 3'($urandom_range(7));
        instr = r_t(7'h00, r2, r1, f, rd, 7'b0110011);
        base(rd, r1, r2); e.uses_rs1 = 1; e.uses_rs2 = 1; e.writes_rd = (rd != 0);
        e.alu_op = ops[f]; e.md_op = md_op_e'(f); e.mem_size = mem_size_e'(f[1:0]);
        expect_("R");
        instr = r_t(7'h20, r2, r1, 3'd0, rd, 7'b0111011);          // subw
        base(rd, r1, r2); e.uses_rs1 = 1; e.uses_rs2 = 1; e.writes_rd = (rd != 0);
        e.alu_op = ALU_SUB; e.word_op = 1;
        expect_("SUBW");
        instr = r_t(7'h20, r2, r1, 3'd5, rd, 7'b0110011);          // sra
        base(rd, r1, r2); e.uses_rs1 = 1; e.uses_rs2 = 1; e.writes_rd = (rd != 0);
        e.alu_op = ALU_SRA; e.md_op = MD_DIVU; e.mem_size = SZ_H;
        expect_("SRA");
      end
      // M extension
      f = 3'($urandom_range(7));
      instr = r_t(7'h01, r2, r1, f, rd, 7'b0110011);
      base(rd, r1, r2); e.uses_rs1 = 1; e.uses_rs2 = 1; e.writes_rd = (rd != 0);
      e.is_muldiv = 1; e.md_op = md_op_e'(f); e.mem_size = mem_size_e'(f[1:0]);
      expect_("M");
      instr = r_t(7'h01, r2, r1, 3'd1, rd, 7'b0111011);           // no MULHW: illegal
      base(rd, r1, r2); e.valid_instr = 0; e.word_op = 1; e.md_op = MD_MULH; e.mem_size = SZ_H;
      expect_("MULHW illegal");
      // immediates
      instr = addi(rd, r1, imm);
      base(rd, r1, 5'(imm)); e.uses_rs1 = 1; e.writes_rd = (rd != 0);
      e.imm = 64'(longint'(imm)); e.opb_sel = OPB_IMM;
      expect_("ADDI");
      instr = i_t(imm, r1, 3'd0, rd, 7'b0011011);                 // addiw
      base(rd, r1, 5'(imm)); e.uses_rs1 = 1; e.writes_rd = (rd != 0); e.word_op = 1;
      e.imm = 64'(longint'(imm)); e.opb_sel = OPB_IMM;
      expect_("ADDIW");
      instr = i_t(32'h400 | (imm & 63), r1, 3'd5, rd, 7'b0010011);  // srai
      base(rd, r1, 5'(imm & 31)); e.uses_rs1 = 1; e.writes_rd = (rd != 0);
      e.imm = 64'(32'h400 | (imm & 63)); e.opb_sel = OPB_IMM; e.alu_op = ALU_SRA;
      e.md_op = MD_DIVU; e.mem_size = SZ_H;
      expect_("SRAI");
      // LUI / AUIPC
      instr = lui(rd, imm * 77);
      base(rd, r1, r2); e.rs1 = instr[19:15]; e.rs2 = instr[24:20];
      e.writes_rd = (rd != 0); e.imm = imm_u(instr); e.opb_sel = OPB_IMM; e.alu_op = ALU_PASSB;
      e.md_op = md_op_e'(instr[14:12]); e.mem_size = mem_size_e'(instr[13:12]);
      expect_("LUI");
      // loads and stores
      f = 3'($urandom_range(6));
      instr = i_t(imm, r1, f, rd, 7'b0000011);
      base(rd, r1, 5'(imm)); e.uses_rs1 = 1; e.writes_rd = (rd != 0); e.imm = 64'(longint'(imm));
      e.opb_sel = OPB_IMM; e.mem_op = MEM_LOAD; e.mem_size = mem_size_e'(f[1:0]);
      e.mem_unsigned = f[2]; e.md_op = md_op_e'(f);
      expect_("LOAD");
      f = 3'($urandom_range(3));
      instr = s_t(imm, r2, r1, f);
      base(instr[11:7], r1, r2); e.uses_rs1 = 1; e.uses_rs2 = 1; e.imm = 64'(longint'(imm));
      e.opb_sel = OPB_IMM; e.mem_op = MEM_STORE; e.mem_size = mem_size_e'(f[1:0]); e.md_op = md_op_e'(f);
      expect_("STORE");
      // control flow
      instr = bne(r1, r2, imm * 2);
      base(instr[11:7], r1, r2); e.uses_rs1 = 1; e.uses_rs2 = 1; e.imm = 64'(longint'(imm * 2));
      e.br_op = BR_NE; e.md_op = MD_MULH; e.mem_size = SZ_H;
      expect_("BNE");
      instr = jal(rd, imm * 64);
      base(rd, instr[19:15], instr[24:20]); e.writes_rd = (rd != 0); e.is_jal = 1;
      e.imm = 64'(longint'(imm * 64)); e.md_op = md_op_e'(instr[14:12]); e.mem_size = mem_size_e'(instr[13:12]);
      expect_("JAL");
      instr = jalr(rd, r1, imm);
      base(rd, r1, 5'(imm)); e.writes_rd = (rd != 0); e.is_jalr = 1; e.uses_rs1 = 1;
      e.imm = 64'(longint'(imm));
      expect_("JALR");
      // CSR instructions: CSR address as the I-immediate, operation from
      // funct3, immediate forms take rs1 as a 5-bit constant
      f = 3'($urandom_range(1, 3)) | ($urandom_range(1) ? 3'b100 : 3'b000);
      instr = i_t(imm, r1, f, rd, 7'b1110011);
      base(rd, r1, 5'(imm)); e.imm = 64'(longint'(imm)); e.writes_rd = (rd != 0);
      e.uses_rs1 = !f[2]; e.csr_imm = f[2];
      e.sys_op = (f[1:0] == 2'b01) ? SYS_CSRRW : (f[1:0] == 2'b10) ? SYS_CSRRS : SYS_CSRRC;
      e.md_op = md_op_e'(f); e.mem_size = mem_size_e'(f[1:0]);
      expect_("CSR");
      instr = i_t(imm, r1, 3'd4, rd, 7'b1110011);                  // funct3 100: illegal
      base(rd, r1, 5'(imm)); e.valid_instr = 0; e.imm = 64'(longint'(imm));
      e.md_op = MD_DIV; e.mem_size = SZ_B;
      expect_("SYSTEM f3=4 illegal");
      // ECALL, EBREAK, MRET, WFI; another funct3 = 0 word (SFENCE.VMA) is illegal
      begin
        logic [31:0] w [5] = '{32'h0000_0073, 32'h0010_0073, 32'h3020_0073, 32'h1050_0073,
                               32'h1200_0073 | (32'(r1) << 15)};
        sys_op_e     o [5] = '{SYS_ECALL, SYS_EBREAK, SYS_MRET, SYS_NONE, SYS_NONE};
        for (int k = 0; k < 5; k++) begin
          instr = w[k];
          base(0, instr[19:15], instr[24:20]); e.imm = imm_i(instr);
          e.sys_op = o[k]; e.valid_instr = (k != 4);
          expect_("ECALL/EBREAK/MRET/WFI/SFENCE");
        end
      end
      // outside RV64IM: a floating-point add
      instr = r_t(7'h00, r2, r1, 3'd0, rd, 7'b1010011);
      base(rd, r1, r2); e.valid_instr = 0;
      expect_("FADD illegal");
    end
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
