// Self-checking test of the ALU: random operands for every operation in
// 64-bit and 32-bit (word) form, compared with results computed here.
module tb_alu;
  import riscy_pkg::*;
  alu_op_e op;
  logic    word_op;
  xlen_t   a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op, .word_op, .a, .b, .y);

  function automatic xlen_t model(alu_op_e o, logic w, xlen_t x, xlen_t z);
    logic [31:0] r;
    if (w) begin
      case (o)
        ALU_SUB: r = x[31:0] - z[31:0];
        ALU_SLL: r = x[31:0] << z[4:0];
        ALU_SRL: r = x[31:0] >> z[4:0];
        ALU_SRA: r = $signed(x[31:0]) >>> z[4:0];
        default: r = x[31:0] + z[31:0];
      endcase
      return {{32{r[31]}}, r};
    end
    case (o)
      ALU_ADD:  return x + z;
      ALU_SUB:  return x - z;
      ALU_SLL:  return x << z[5:0];
      ALU_SLT:  return ($signed(x) < $signed(z)) ? 64'd1 : 64'd0;
      ALU_SLTU: return (x < z) ? 64'd1 : 64'd0;
      ALU_XOR:  return x ^ z;
      ALU_SRL:  return x >> z[5:0];
      ALU_SRA:  return $signed(x) >>> z[5:0];
      ALU_OR:   return x | z;
      ALU_AND:  return x & z;
      default:  return z;
    endcase
  endfunction

  initial begin
    alu_op_e ops [11] = '{ALU_ADD, ALU_SUB, ALU_SLL, ALU_SLT, ALU_SLTU, ALU_XOR,
                          ALU_SRL, ALU_SRA, ALU_OR, ALU_AND, ALU_PASSB};
    for (int i = 0; i < 4000; i++) begin
      op = ops[i % 11];
      word_op = (i % 3 == 0) && (op inside {ALU_ADD, ALU_SUB, ALU_SLL, ALU_SRL, ALU_SRA});
      a = {$urandom(), $urandom()};
      b = (i % 5 == 0) ? a : {$urandom(), $urandom()};
      if (i % 7 == 0) a = 64'h8000_0000_0000_0000;
      #1;
      checks++;
      if (y !== model(op, word_op, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s w=%0d a=%h b=%h y=%h exp=%h", op.name(), word_op, a, b, y, model(op, word_op, a, b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
