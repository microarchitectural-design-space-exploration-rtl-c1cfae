// Compressed instruction expander (part of the re-aligner in Fetch 3).
//
// Turns one 16-bit RV64C instruction into the 32-bit RV64I instruction it
// stands for, so that the decoder and everything behind it only ever see
// 32-bit encodings. Purely combinational: c_instr in, instr out in the same
// cycle. Compressed forms that need an extension this core lacks (the
// floating-point loads and stores), reserved encodings and the all-zero
// halfword come out as the word 0, which the decoder marks as not a legal
// instruction; C.EBREAK comes out as EBREAK. The expansion table is the one
// of the RISC-V C extension for RV64; splitting it off from the re-aligner
// into its own module is this design's choice.
module rvc_expand (
  input  logic [15:0] c_instr,
  output logic [31:0] instr
);
  // 32-bit formats
  function automatic logic [31:0] f_r(input logic [6:0] f7, input logic [4:0] rs2,
                                      input logic [4:0] rs1, input logic [2:0] f3,
                                      input logic [4:0] rd, input logic [6:0] opc);
    return {f7, rs2, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] f_i(input logic [11:0] imm, input logic [4:0] rs1,
                                      input logic [2:0] f3, input logic [4:0] rd,
                                      input logic [6:0] opc);
    return {imm, rs1, f3, rd, opc};
  endfunction
  function automatic logic [31:0] f_s(input logic [11:0] imm, input logic [4:0] rs2,
                                      input logic [4:0] rs1, input logic [2:0] f3);
    return {imm[11:5], rs2, rs1, f3, imm[4:0], 7'b0100011};
  endfunction
  function automatic logic [31:0] f_b(input logic [12:1] imm, input logic [4:0] rs1,
                                      input logic [2:0] f3);
    return {imm[12], imm[10:5], 5'd0, rs1, f3, imm[4:1], imm[11], 7'b1100011};
  endfunction
  function automatic logic [31:0] f_j(input logic [20:1] imm, input logic [4:0] rd);
    return {imm[20], imm[10:1], imm[11], imm[19:12], rd, 7'b1101111};
  endfunction

  logic [15:0] c;
  logic [4:0]  rd, rs2, rdp, rs1p, rs2p;
  logic [11:0] imm6;          // sign-extended 6-bit immediate {c[12], c[6:2]}
  logic [11:0] lw_off, ld_off, lwsp_off, ldsp_off, swsp_off, sdsp_off, a4spn, a16sp;
  logic [12:1] b_off;          // branch and jump offsets without their zero bit 0
  logic [20:1] j_off;

  assign c    = c_instr;
  assign rd   = c[11:7];
  assign rs2  = c[6:2];
  assign rdp  = {2'b01, c[4:2]};
  assign rs1p = {2'b01, c[9:7]};
  assign rs2p = {2'b01, c[4:2]};
  assign imm6 = {{6{c[12]}}, c[12], c[6:2]};

  assign lw_off   = {5'd0, c[5], c[12:10], c[6], 2'b00};
  assign ld_off   = {4'd0, c[6:5], c[12:10], 3'b000};
  assign lwsp_off = {4'd0, c[3:2], c[12], c[6:4], 2'b00};
  assign ldsp_off = {3'd0, c[4:2], c[12], c[6:5], 3'b000};
  assign swsp_off = {4'd0, c[8:7], c[12:9], 2'b00};
  assign sdsp_off = {3'd0, c[9:7], c[12:10], 3'b000};
  assign a4spn    = {2'd0, c[10:7], c[12:11], c[5], c[6], 2'b00};
  assign a16sp    = {{3{c[12]}}, c[4:3], c[5], c[2], c[6], 4'b0000};
  assign b_off    = {{5{c[12]}}, c[6:5], c[2], c[11:10], c[4:3]};
  assign j_off    = {{10{c[12]}}, c[8], c[10:9], c[6], c[7], c[2], c[11], c[5:3]};

  always_comb begin
    instr = 32'h0;
    unique case ({c[1:0], c[15:13]})
      // ---------------------------------------------------------- quadrant 0
      5'b00_000: if (c[12:5] != 8'd0) instr = f_i(a4spn, 5'd2, 3'b000, rdp, 7'b0010011);
      5'b00_010: instr = f_i(lw_off, rs1p, 3'b010, rdp, 7'b0000011);          // C.LW
      5'b00_011: instr = f_i(ld_off, rs1p, 3'b011, rdp, 7'b0000011);          // C.LD
      5'b00_110: instr = f_s(lw_off, rs2p, rs1p, 3'b010);                     // C.SW
      5'b00_111: instr = f_s(ld_off, rs2p, rs1p, 3'b011);                     // C.SD
      // ---------------------------------------------------------- quadrant 1
      5'b01_000: instr = f_i(imm6, rd, 3'b000, rd, 7'b0010011);               // C.ADDI / C.NOP
      5'b01_001: if (rd != 5'd0) instr = f_i(imm6, rd, 3'b000, rd, 7'b0011011); // C.ADDIW
      5'b01_010: instr = f_i(imm6, 5'd0, 3'b000, rd, 7'b0010011);             // C.LI
      5'b01_011: begin
        if (rd == 5'd2) begin                                                 // C.ADDI16SP
          if (a16sp != 12'd0) instr = f_i(a16sp, 5'd2, 3'b000, 5'd2, 7'b0010011);
        end else if (imm6 != 12'd0) begin                                     // C.LUI
          instr = {{14{c[12]}}, c[12], c[6:2], rd, 7'b0110111};
        end
      end
      5'b01_100: begin
        unique case (c[11:10])
          2'b00: instr = f_i({6'b000000, c[12], c[6:2]}, rs1p, 3'b101, rs1p, 7'b0010011); // C.SRLI
          2'b01: instr = f_i({6'b010000, c[12], c[6:2]}, rs1p, 3'b101, rs1p, 7'b0010011); // C.SRAI
          2'b10: instr = f_i(imm6, rs1p, 3'b111, rs1p, 7'b0010011);                       // C.ANDI
          default: begin
            unique case ({c[12], c[6:5]})
              3'b000: instr = f_r(7'b0100000, rs2p, rs1p, 3'b000, rs1p, 7'b0110011); // C.SUB
              3'b001: instr = f_r(7'b0000000, rs2p, rs1p, 3'b100, rs1p, 7'b0110011); // C.XOR
              3'b010: instr = f_r(7'b0000000, rs2p, rs1p, 3'b110, rs1p, 7'b0110011); // C.OR
              3'b011: instr = f_r(7'b0000000, rs2p, rs1p, 3'b111, rs1p, 7'b0110011); // C.AND
              3'b100: instr = f_r(7'b0100000, rs2p, rs1p, 3'b000, rs1p, 7'b0111011); // C.SUBW
              3'b101: instr = f_r(7'b0000000, rs2p, rs1p, 3'b000, rs1p, 7'b0111011); // C.ADDW
              default: instr = 32'h0;
            endcase
          end
        endcase
      end
      5'b01_101: instr = f_j(j_off, 5'd0);                                    // C.J
      5'b01_110: instr = f_b(b_off, rs1p, 3'b000);                            // C.BEQZ
      5'b01_111: instr = f_b(b_off, rs1p, 3'b001);                            // C.BNEZ
      // ---------------------------------------------------------- quadrant 2
      5'b10_000: instr = f_i({6'b000000, c[12], c[6:2]}, rd, 3'b001, rd, 7'b0010011); // C.SLLI
      5'b10_010: if (rd != 5'd0) instr = f_i(lwsp_off, 5'd2, 3'b010, rd, 7'b0000011); // C.LWSP
      5'b10_011: if (rd != 5'd0) instr = f_i(ldsp_off, 5'd2, 3'b011, rd, 7'b0000011); // C.LDSP
      5'b10_100: begin
        if (!c[12]) begin
          if (rs2 == 5'd0) begin
            if (rd != 5'd0) instr = f_i(12'd0, rd, 3'b000, 5'd0, 7'b1100111);   // C.JR
          end else begin
            instr = f_r(7'd0, rs2, 5'd0, 3'b000, rd, 7'b0110011);               // C.MV
          end
        end else begin
          if (rs2 == 5'd0) begin
            if (rd == 5'd0) instr = 32'h0010_0073;                              // C.EBREAK
            else            instr = f_i(12'd0, rd, 3'b000, 5'd1, 7'b1100111);   // C.JALR
          end else begin
            instr = f_r(7'd0, rs2, rd, 3'b000, rd, 7'b0110011);                 // C.ADD
          end
        end
      end
      5'b10_110: instr = f_s(swsp_off, rs2, 5'd2, 3'b010);                    // C.SWSP
      5'b10_111: instr = f_s(sdsp_off, rs2, 5'd2, 3'b011);                    // C.SDSP
      default:   instr = 32'h0;  // FP loads/stores, reserved, or not compressed
    endcase
  end
endmodule
