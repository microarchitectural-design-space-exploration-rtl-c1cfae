// Self-checking test of the multiply/divide unit: every RV64M operation,
// 64- and 32-bit forms, random and corner operands (zero divisor, most
// negative / -1), compared with results computed here; the latency is
// checked: 2 cycles for a multiply, 65 for a divide.
module tb_muldiv;
  import riscy_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req, ack, word_op, done;
  md_op_e op;
  xlen_t a, b, result;
  int checks = 0, failures = 0;

  muldiv dut (.clk, .rst_n, .req, .ack, .op, .word_op, .a, .b, .done, .result);

  function automatic xlen_t sx(input logic [31:0] v); return {{32{v[31]}}, v}; endfunction

  function automatic xlen_t model(md_op_e o, logic w, xlen_t x, xlen_t y);
    logic signed [127:0] p;
    if (w) begin
      logic signed [31:0] sa = x[31:0], sb = y[31:0];
      logic [31:0] ua = x[31:0], ub = y[31:0];
      case (o)
        MD_MUL:  return sx(ua * ub);
        MD_DIV:  return (sb == 0) ? '1 : (sa == 32'sh8000_0000 && sb == -1) ? sx(ua) : sx(32'(sa / sb));
        MD_DIVU: return (ub == 0) ? '1 : sx(ua / ub);
        MD_REM:  return (sb == 0) ? sx(ua) : (sa == 32'sh8000_0000 && sb == -1) ? '0 : sx(32'(sa % sb));
        default: return (ub == 0) ? sx(ua) : sx(ua % ub);
      endcase
    end
    case (o)
      MD_MUL:    return x * y;
      MD_MULH:   begin p = $signed({{64{x[63]}}, x}) * $signed({{64{y[63]}}, y}); return p[127:64]; end
      MD_MULHSU: begin p = $signed({{64{x[63]}}, x}) * $signed({64'b0, y}); return p[127:64]; end
      MD_MULHU:  begin p = {64'b0, x} * {64'b0, y}; return p[127:64]; end
      MD_DIV:    return (y == 0) ? '1 : (x == {1'b1, 63'b0} && y == '1) ? x : 64'($signed(x) / $signed(y));
      MD_DIVU:   return (y == 0) ? '1 : x / y;
      MD_REM:    return (y == 0) ? x : (x == {1'b1, 63'b0} && y == '1) ? '0 : 64'($signed(x) % $signed(y));
      default:   return (y == 0) ? x : x % y;
    endcase
  endfunction

  initial begin
    md_op_e wops [5] = '{MD_MUL, MD_DIV, MD_DIVU, MD_REM, MD_REMU};
    req = 0; ack = 0; op = MD_MUL; word_op = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++) begin
      automatic int lat = 0;
      @(negedge clk);
      word_op = (i % 3 == 0);
      op = word_op ? wops[$urandom_range(4)] : md_op_e'($urandom_range(7));
      a = {$urandom(), $urandom()}; b = {$urandom(), $urandom()};
      case (i % 11)
        0: b = 0;
        1: begin a = 64'h8000_0000_0000_0000; b = '1; end
        2: begin a = 64'hFFFF_FFFF_8000_0000; b = '1; end
        3: b = 64'(int'($urandom_range(7)) - 3);
        4: a = {32'b0, $urandom()} >> $urandom_range(31);
        default: ;
      endcase
      req = 1;
      do begin @(posedge clk); lat++; #1; end while (!done && lat < 200);
      checks++;
      if (result !== model(op, word_op, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s w=%0d a=%h b=%h res=%h exp=%h", op.name(), word_op, a, b, result, model(op, word_op, a, b));
      end
      checks++;
      if (lat != ((op inside {MD_MUL, MD_MULH, MD_MULHSU, MD_MULHU}) ? 2 : 66)) begin
        failures++;
        if (failures < 10) $display("FAIL latency %0d for %s", lat, op.name());
      end
      // hold the result for a random time before acknowledging
      repeat ($urandom_range(2)) begin
        @(posedge clk); #1;
        checks++;
        if (!done) begin failures++; $display("FAIL: done dropped before ack"); end
      end
      @(negedge clk); ack = 1; @(posedge clk); #1; ack = 0; req = 0;
      checks++;
      if (done) begin failures++; $display("FAIL: done after ack"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
