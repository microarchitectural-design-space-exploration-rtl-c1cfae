// Instruction decoder of the Decode stage.
//
// Turns one 32-bit RV64I/M instruction into the control word ctrl_t: source
// and destination registers and whether they are used, the sign-extended
// immediate, ALU operand selects and operation, branch condition, jump
// kind, memory operation and size, and multiply/divide operation. Purely
// combinational. The machine-mode system instructions (CSR accesses, ECALL,
// EBREAK, MRET) are marked in sys_op for the CSR unit; WFI and FENCE are
// no-operations. Anything else outside RV64IM (F, D, A, supervisor
// instructions) decodes with valid_instr = 0, which Execute turns into an
// illegal-instruction trap. Compressed instructions arrive already expanded.
// The decode tables follow the RISC-V specification; the control encoding
// is this design's own.
module decoder
  import riscy_pkg::*;
(
  input  logic [31:0] instr,
  output ctrl_t       ctrl
);
  logic [6:0] opc;
  logic [2:0] f3;
  logic [6:0] f7;

  assign opc = instr[6:0];
  assign f3  = instr[14:12];
  assign f7  = instr[31:25];

  always_comb begin
    ctrl = '0;
    ctrl.rs1 = instr[19:15];
    ctrl.rs2 = instr[24:20];
    ctrl.rd  = instr[11:7];
    ctrl.opa_sel = OPA_RS1;
    ctrl.opb_sel = OPB_RS2;
    ctrl.alu_op  = ALU_ADD;
    ctrl.br_op   = BR_NONE;
    ctrl.mem_op  = MEM_NONE;
    ctrl.mem_size = mem_size_e'(f3[1:0]);
    ctrl.md_op   = md_op_e'(f3);
    unique case (opc)
      OPC_LUI: begin
        ctrl.valid_instr = 1'b1; ctrl.writes_rd = 1'b1;
        ctrl.imm = imm_u(instr); ctrl.opb_sel = OPB_IMM; ctrl.alu_op = ALU_PASSB;
      end
      OPC_AUIPC: begin
        ctrl.valid_instr = 1'b1; ctrl.writes_rd = 1'b1;
        ctrl.imm = imm_u(instr); ctrl.opa_sel = OPA_PC; ctrl.opb_sel = OPB_IMM;
      end
      OPC_JAL: begin
        ctrl.valid_instr = 1'b1; ctrl.writes_rd = 1'b1; ctrl.is_jal = 1'b1;
        ctrl.imm = imm_j(instr);
      end
      OPC_JALR: begin
        ctrl.valid_instr = (f3 == 3'b000); ctrl.writes_rd = ctrl.valid_instr;
        ctrl.uses_rs1 = 1'b1; ctrl.is_jalr = ctrl.valid_instr;
        ctrl.imm = imm_i(instr);
      end
      OPC_BRANCH: begin
        ctrl.uses_rs1 = 1'b1; ctrl.uses_rs2 = 1'b1; ctrl.imm = imm_b(instr);
        ctrl.valid_instr = 1'b1;
        unique case (f3)
          3'b000: ctrl.br_op = BR_EQ;
          3'b001: ctrl.br_op = BR_NE;
          3'b100: ctrl.br_op = BR_LT;
          3'b101: ctrl.br_op = BR_GE;
          3'b110: ctrl.br_op = BR_LTU;
          3'b111: ctrl.br_op = BR_GEU;
          default: ctrl.valid_instr = 1'b0;
        endcase
      end
      OPC_LOAD: begin
        ctrl.valid_instr = (f3 != 3'b111);
        ctrl.writes_rd = ctrl.valid_instr; ctrl.uses_rs1 = 1'b1;
        ctrl.imm = imm_i(instr); ctrl.opb_sel = OPB_IMM;
        ctrl.mem_op = ctrl.valid_instr ? MEM_LOAD : MEM_NONE;
        ctrl.mem_unsigned = f3[2];
      end
      OPC_STORE: begin
        ctrl.valid_instr = !f3[2];
        ctrl.uses_rs1 = 1'b1; ctrl.uses_rs2 = 1'b1;
        ctrl.imm = imm_s(instr); ctrl.opb_sel = OPB_IMM;
        ctrl.mem_op = ctrl.valid_instr ? MEM_STORE : MEM_NONE;
      end
      OPC_OP_IMM, OPC_OP_IMM32: begin
        ctrl.word_op = (opc == OPC_OP_IMM32);
        ctrl.uses_rs1 = 1'b1; ctrl.imm = imm_i(instr); ctrl.opb_sel = OPB_IMM;
        ctrl.valid_instr = 1'b1;
        unique case (f3)
          3'b000: ctrl.alu_op = ALU_ADD;
          3'b010: begin ctrl.alu_op = ALU_SLT;  ctrl.valid_instr = !ctrl.word_op; end
          3'b011: begin ctrl.alu_op = ALU_SLTU; ctrl.valid_instr = !ctrl.word_op; end
          3'b100: begin ctrl.alu_op = ALU_XOR;  ctrl.valid_instr = !ctrl.word_op; end
          3'b110: begin ctrl.alu_op = ALU_OR;   ctrl.valid_instr = !ctrl.word_op; end
          3'b111: begin ctrl.alu_op = ALU_AND;  ctrl.valid_instr = !ctrl.word_op; end
          3'b001: begin
            ctrl.alu_op = ALU_SLL;
            ctrl.valid_instr = ctrl.word_op ? (f7 == 7'b0) : (instr[31:26] == 6'b0);
          end
          default: begin // 3'b101
            ctrl.alu_op = instr[30] ? ALU_SRA : ALU_SRL;
            ctrl.valid_instr = ctrl.word_op ? ({f7[6], f7[4:0]} == 6'b0)
                                            : ({instr[31], instr[29:26]} == 5'b0);
          end
        endcase
        ctrl.writes_rd = ctrl.valid_instr;
      end
      OPC_OP, OPC_OP32: begin
        ctrl.word_op = (opc == OPC_OP32);
        ctrl.uses_rs1 = 1'b1; ctrl.uses_rs2 = 1'b1;
        ctrl.valid_instr = 1'b1;
        if (f7 == 7'b0000001) begin
          ctrl.is_muldiv = 1'b1;
          // only MULW, DIVW, DIVUW, REMW, REMUW exist in the 32-bit form
          if (ctrl.word_op && (f3 == 3'b001 || f3 == 3'b010 || f3 == 3'b011))
            ctrl.valid_instr = 1'b0;
        end else begin
          unique case (f3)
            3'b000: begin
              ctrl.alu_op = f7[5] ? ALU_SUB : ALU_ADD;
              ctrl.valid_instr = ({f7[6], f7[4:0]} == 6'b0);
            end
            3'b001: begin ctrl.alu_op = ALU_SLL;  ctrl.valid_instr = (f7 == 7'b0); end
            3'b010: begin ctrl.alu_op = ALU_SLT;  ctrl.valid_instr = (f7 == 7'b0) && !ctrl.word_op; end
            3'b011: begin ctrl.alu_op = ALU_SLTU; ctrl.valid_instr = (f7 == 7'b0) && !ctrl.word_op; end
            3'b100: begin ctrl.alu_op = ALU_XOR;  ctrl.valid_instr = (f7 == 7'b0) && !ctrl.word_op; end
            3'b101: begin
              ctrl.alu_op = f7[5] ? ALU_SRA : ALU_SRL;
              ctrl.valid_instr = ({f7[6], f7[4:0]} == 6'b0);
            end
            3'b110: begin ctrl.alu_op = ALU_OR;   ctrl.valid_instr = (f7 == 7'b0) && !ctrl.word_op; end
            default: begin ctrl.alu_op = ALU_AND; ctrl.valid_instr = (f7 == 7'b0) && !ctrl.word_op; end
          endcase
        end
        if (!ctrl.valid_instr) ctrl.is_muldiv = 1'b0;
        ctrl.writes_rd = ctrl.valid_instr;
      end
      OPC_MISC_MEM: begin
        // FENCE / FENCE.I: no architectural effect in this in-order core
        ctrl.valid_instr = 1'b1;
      end
      OPC_SYSTEM: begin
        ctrl.imm = imm_i(instr);          // CSR address in imm[11:0]
        if (f3 == 3'b000) begin
          ctrl.valid_instr = 1'b1;
          unique case (instr)
            32'h0000_0073: ctrl.sys_op = SYS_ECALL;
            32'h0010_0073: ctrl.sys_op = SYS_EBREAK;
            32'h3020_0073: ctrl.sys_op = SYS_MRET;
            32'h1050_0073: ctrl.sys_op = SYS_NONE;   // WFI: no interrupts, no wait
            default:       ctrl.valid_instr = 1'b0;
          endcase
        end else if (f3 != 3'b100) begin
          ctrl.valid_instr = 1'b1;
          ctrl.csr_imm     = f3[2];
          ctrl.uses_rs1    = !f3[2];
          ctrl.writes_rd   = 1'b1;
          unique case (f3[1:0])
            2'b01:   ctrl.sys_op = SYS_CSRRW;
            2'b10:   ctrl.sys_op = SYS_CSRRS;
            default: ctrl.sys_op = SYS_CSRRC;
          endcase
        end
      end
      default: ;
    endcase
    if (!ctrl.valid_instr) begin
      ctrl.uses_rs1 = 1'b0; ctrl.uses_rs2 = 1'b0; ctrl.writes_rd = 1'b0;
      ctrl.br_op = BR_NONE; ctrl.is_jal = 1'b0; ctrl.is_jalr = 1'b0;
      ctrl.mem_op = MEM_NONE; ctrl.is_muldiv = 1'b0; ctrl.sys_op = SYS_NONE;
    end
    if (ctrl.rd == '0) ctrl.writes_rd = 1'b0;
  end
endmodule
