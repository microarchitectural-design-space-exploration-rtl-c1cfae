// Integer ALU of the Execute stage.
//
// Computes the RV64I arithmetic, logic, shift and compare operations on two
// 64-bit operands in one combinational step. When word_op is set the
// operation is done on the low 32 bits and the 32-bit result is
// sign-extended, as the RV64I *W instructions require. ALU_PASSB forwards
// operand b (used for LUI). The ALU sits in the Execute stage as in the
// document's pipeline figure; the operation encoding is this design's own.
module alu
  import riscy_pkg::*;
(
  input  alu_op_e op,
  input  logic    word_op,
  input  xlen_t   a,
  input  xlen_t   b,
  output xlen_t   y
);
  logic [5:0]  shamt;
  logic [31:0] w_res;
  logic [31:0] a32, b32;
  xlen_t       r;

  assign a32 = a[31:0];
  assign b32 = b[31:0];
  assign shamt = word_op ? {1'b0, b[4:0]} : b[5:0];

  always_comb begin
    r     = '0;
    w_res = '0;
    if (word_op) begin
      unique case (op)
        ALU_ADD: w_res = a32 + b32;
        ALU_SUB: w_res = a32 - b32;
        ALU_SLL: w_res = a32 << shamt[4:0];
        ALU_SRL: w_res = a32 >> shamt[4:0];
        ALU_SRA: w_res = 32'($signed(a32) >>> shamt[4:0]);
        default: w_res = a32 + b32;
      endcase
      r = {{32{w_res[31]}}, w_res};
    end else begin
      unique case (op)
        ALU_ADD:   r = a + b;
        ALU_SUB:   r = a - b;
        ALU_SLL:   r = a << shamt;
        ALU_SLT:   r = {63'b0, $signed(a) < $signed(b)};
        ALU_SLTU:  r = {63'b0, a < b};
        ALU_XOR:   r = a ^ b;
        ALU_SRL:   r = a >> shamt;
        ALU_SRA:   r = XLEN'($signed(a) >>> shamt);
        ALU_OR:    r = a | b;
        ALU_AND:   r = a & b;
        ALU_PASSB: r = b;
        default:   r = a + b;
      endcase
    end
  end

  assign y = r;
endmodule
