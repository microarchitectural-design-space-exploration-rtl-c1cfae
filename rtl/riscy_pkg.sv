// Shared types and constants of the Riscy v2 core.
//
// The core implements the RV64I base integer ISA, the M extension and, in
// Fetch 3, the C extension (expanded before decode). This
// package holds the XLEN, the opcode map of the RISC-V specification, the
// operation encodings that travel down the pipeline (ALU, branch, memory,
// multiply/divide) and the decoded control word produced in Decode. The
// encodings of alu_op_e and friends are this design's own; the opcode and
// funct values follow the RISC-V unprivileged specification.
package riscy_pkg;

  localparam int unsigned XLEN = 64;

  typedef logic [XLEN-1:0] xlen_t;
  typedef logic [4:0]      reg_idx_t;

  // RISC-V major opcodes (instr[6:0])
  localparam logic [6:0] OPC_LUI      = 7'b0110111;
  localparam logic [6:0] OPC_AUIPC    = 7'b0010111;
  localparam logic [6:0] OPC_JAL      = 7'b1101111;
  localparam logic [6:0] OPC_JALR     = 7'b1100111;
  localparam logic [6:0] OPC_BRANCH   = 7'b1100011;
  localparam logic [6:0] OPC_LOAD     = 7'b0000011;
  localparam logic [6:0] OPC_STORE    = 7'b0100011;
  localparam logic [6:0] OPC_OP_IMM   = 7'b0010011;
  localparam logic [6:0] OPC_OP_IMM32 = 7'b0011011;
  localparam logic [6:0] OPC_OP       = 7'b0110011;
  localparam logic [6:0] OPC_OP32     = 7'b0111011;
  localparam logic [6:0] OPC_MISC_MEM = 7'b0001111;
  localparam logic [6:0] OPC_SYSTEM   = 7'b1110011;

  // A canonical no-operation (addi x0, x0, 0)
  localparam logic [31:0] INSTR_NOP = 32'h0000_0013;

  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU,
    ALU_XOR, ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB
  } alu_op_e;

  typedef enum logic [2:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LT, BR_GE, BR_LTU, BR_GEU
  } br_op_e;

  typedef enum logic [1:0] { MEM_NONE, MEM_LOAD, MEM_STORE } mem_op_e;

  // Access size of loads and stores: funct3[1:0]
  typedef enum logic [1:0] { SZ_B = 2'd0, SZ_H = 2'd1, SZ_W = 2'd2, SZ_D = 2'd3 } mem_size_e;

  typedef enum logic [2:0] {
    MD_MUL, MD_MULH, MD_MULHSU, MD_MULHU, MD_DIV, MD_DIVU, MD_REM, MD_REMU
  } md_op_e;

  // Machine-mode system instructions handled by the CSR unit in Execute
  typedef enum logic [2:0] {
    SYS_NONE, SYS_CSRRW, SYS_CSRRS, SYS_CSRRC, SYS_ECALL, SYS_EBREAK, SYS_MRET
  } sys_op_e;

  typedef enum logic [1:0] { OPA_RS1, OPA_PC, OPA_ZERO } opa_sel_e;
  typedef enum logic       { OPB_RS2, OPB_IMM } opb_sel_e;

  // Control word produced by the decoder
  typedef struct packed {
    logic      valid_instr;   // a legal RV64IM instruction
    logic      uses_rs1;
    logic      uses_rs2;
    logic      writes_rd;
    reg_idx_t  rs1;
    reg_idx_t  rs2;
    reg_idx_t  rd;
    xlen_t     imm;
    opa_sel_e  opa_sel;
    opb_sel_e  opb_sel;
    alu_op_e   alu_op;
    logic      word_op;       // *W instruction: 32-bit op, sign-extended result
    br_op_e    br_op;
    logic      is_jal;
    logic      is_jalr;
    mem_op_e   mem_op;
    mem_size_e mem_size;
    logic      mem_unsigned;
    logic      is_muldiv;
    md_op_e    md_op;
    sys_op_e   sys_op;        // CSR access, ECALL, EBREAK, MRET
    logic      csr_imm;       // CSR source is the 5-bit rs1 field, not a register
  } ctrl_t;

  // Extract the sign-extended immediates of the base formats
  function automatic xlen_t imm_i(input logic [31:0] ins);
    return {{52{ins[31]}}, ins[31:20]};
  endfunction
  function automatic xlen_t imm_s(input logic [31:0] ins);
    return {{52{ins[31]}}, ins[31:25], ins[11:7]};
  endfunction
  function automatic xlen_t imm_b(input logic [31:0] ins);
    return {{51{ins[31]}}, ins[31], ins[7], ins[30:25], ins[11:8], 1'b0};
  endfunction
  function automatic xlen_t imm_u(input logic [31:0] ins);
    return {{32{ins[31]}}, ins[31:12], 12'b0};
  endfunction
  function automatic xlen_t imm_j(input logic [31:0] ins);
    return {{43{ins[31]}}, ins[31], ins[19:12], ins[20], ins[30:21], 1'b0};
  endfunction

endpackage
