// Self-checking test of the compressed instruction expander.
//
// rvc_vectors.hex holds 760 pairs, one per line: a 16-bit compressed
// instruction followed by the 32-bit instruction it must expand to. The
// pairs were made with the GNU assembler and disassembler, independently of
// this design: random halfwords of all three quadrants and every funct3
// were disassembled, and the text was assembled again with compressed
// instructions turned off. Encodings the toolchain could not round-trip
// (floating point, reserved ones) are not in the file; they are checked
// below one by one instead, together with C.EBREAK and the zero halfword.
// The expander is combinational; each case is applied and checked after
// a 1 ns settle.
module tb_rvc_expand;
  logic [15:0] c_instr;
  logic [31:0] instr;
  logic [47:0] vec [760];
  int checks = 0, failures = 0;

  rvc_expand dut (.c_instr, .instr);

  task automatic t(input logic [15:0] c, input logic [31:0] exp);
    c_instr = c; #1;
    checks++;
    if (instr !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %h -> %h, expected %h", c, instr, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 760; i++) vec[i] = '1;
    $readmemh("tb/rvc_vectors.hex", vec);
    for (int i = 0; i < 760; i++) begin
      if (vec[i] === '1) begin
        failures++;
        $display("FAIL: vector %0d missing", i);
        break;
      end
      t(vec[i][47:32], vec[i][31:0]);
    end
    t(16'h0000, 32'h0);            // all-zero halfword
    t(16'h2000, 32'h0);            // C.FLD: no FPU
    t(16'hA002, 32'h0);            // C.FSDSP: no FPU
    t(16'h8000, 32'h0);            // reserved in quadrant 0
    t(16'h2001, 32'h0);            // C.ADDIW with rd = 0
    t(16'h4002, 32'h0);            // C.LWSP with rd = 0
    t(16'h6002, 32'h0);            // C.LDSP with rd = 0
    t(16'h8002, 32'h0);            // C.JR with rs1 = 0
    t(16'h6101, 32'h0);            // C.ADDI16SP with a zero immediate
    t(16'h6501, 32'h0);            // C.LUI with a zero immediate
    t(16'h9C41, 32'h0);            // reserved arithmetic form
    t(16'h9002, 32'h0010_0073);    // C.EBREAK
    t(16'h0001, 32'h0000_0013);    // C.NOP
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
