// Instruction encoders for building RV64IM test programs inside testbenches.
// Each function returns the 32-bit encoding of one instruction in the
// standard RISC-V formats (R, I, S, B, U, J).
package rv_asm_pkg;
  function automatic logic [31:0] r_t(input logic [6:0] f7, input int rs2, input int rs1,
                                      input logic [2:0] f3, input int rd, input logic [6:0] opc);
    return {f7, 5'(rs2), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] i_t(input int imm, input int rs1, input logic [2:0] f3,
                                      input int rd, input logic [6:0] opc);
    return {12'(imm), 5'(rs1), f3, 5'(rd), opc};
  endfunction
  function automatic logic [31:0] s_t(input int imm, input int rs2, input int rs1,
                                      input logic [2:0] f3);
    logic [11:0] i;
    i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), f3, i[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] b_t(input int off, input int rs2, input int rs1,
                                      input logic [2:0] f3);
    logic [12:0] i;
    i = 13'(off);
    return {i[12], i[10:5], 5'(rs2), 5'(rs1), f3, i[4:1], i[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] u_t(input int imm20, input int rd, input logic [6:0] opc);
    return {20'(imm20), 5'(rd), opc};
  endfunction
  function automatic logic [31:0] j_t(input int off, input int rd);
    logic [20:0] i;
    i = 21'(off);
    return {i[20], i[10:1], i[11], i[19:12], 5'(rd), 7'b1101111};
  endfunction

  function automatic logic [31:0] addi(input int rd, input int rs1, input int imm);
    return i_t(imm, rs1, 3'b000, rd, 7'b0010011);
  endfunction
  function automatic logic [31:0] lui(input int rd, input int imm20);
    return u_t(imm20, rd, 7'b0110111);
  endfunction
  function automatic logic [31:0] jal(input int rd, input int off);
    return j_t(off, rd);
  endfunction
  function automatic logic [31:0] jalr(input int rd, input int rs1, input int imm);
    return i_t(imm, rs1, 3'b000, rd, 7'b1100111);
  endfunction
  function automatic logic [31:0] bne(input int rs1, input int rs2, input int off);
    return b_t(off, rs2, rs1, 3'b001);
  endfunction
  function automatic logic [31:0] ld(input int rd, input int rs1, input int imm);
    return i_t(imm, rs1, 3'b011, rd, 7'b0000011);
  endfunction
  function automatic logic [31:0] sd(input int rs2, input int rs1, input int imm);
    return s_t(imm, rs2, rs1, 3'b011);
  endfunction
endpackage
