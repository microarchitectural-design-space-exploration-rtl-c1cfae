// Multiply/divide unit for the RV64M instructions.
//
// Multiplication: the 65 x 65-bit signed product of the sign- or
// zero-extended operands is registered, so a multiply takes two cycles
// (the unit spans Execute and Memory in the document's figure); MUL/MULW
// take the low half (MULW sign-extends bit 31), MULH/MULHSU/MULHU the high
// half. Division: a restoring divider on operand magnitudes retires one
// quotient bit per cycle (64 cycles), then the signs of quotient and
// remainder are fixed; division by zero gives quotient -1 and remainder =
// dividend, and the overflow case falls out of the unsigned algorithm, as
// the ISA requires. The 32-bit forms divide the sign/zero-extended low
// words, which yields the ISA's W results after sign extension of bit 31.
//
// Interface: hold req high with op/operands stable; done rises when the
// result is ready and stays until ack (the pipeline leaving Execute), after
// which the unit is idle again. The core stalls while req && !done. The
// document names the unit only; the algorithms and latencies are this
// design's choice.
module muldiv
  import riscy_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   req,
  input  logic   ack,
  input  md_op_e op,
  input  logic   word_op,
  input  xlen_t  a,
  input  xlen_t  b,
  output logic   done,
  output xlen_t  result
);
  typedef enum logic [1:0] { S_IDLE, S_MUL, S_DIV, S_DONE } state_e;
  state_e state;

  // operand preparation
  logic  is_div, a_signed, b_signed;
  xlen_t ax, bx;
  always_comb begin
    is_div   = op inside {MD_DIV, MD_DIVU, MD_REM, MD_REMU};
    a_signed = op inside {MD_MULH, MD_MULHSU, MD_DIV, MD_REM};
    b_signed = op inside {MD_MULH, MD_DIV, MD_REM};
    if (word_op) begin
      // MULW uses the low word only; DIVW/REMW are signed, DIVUW/REMUW unsigned
      ax = (op inside {MD_DIV, MD_REM, MD_MUL}) ? {{32{a[31]}}, a[31:0]} : {32'b0, a[31:0]};
      bx = (op inside {MD_DIV, MD_REM, MD_MUL}) ? {{32{b[31]}}, b[31:0]} : {32'b0, b[31:0]};
    end else begin
      ax = a;
      bx = b;
    end
  end

  logic signed [64:0]  ma, mb;
  logic signed [129:0] prod_c;
  logic        [127:0] prod_q;
  assign ma = {a_signed & ax[63], ax};
  assign mb = {b_signed & bx[63], bx};
  assign prod_c = ma * mb;

  // divider state
  xlen_t      quo, dvs, rem;
  logic [6:0] cnt;
  logic       neg_q, neg_r, div_zero;
  xlen_t      a_in;
  md_op_e     op_q;
  logic       word_q;
  xlen_t      res_q;
  xlen_t      rem_shift;
  logic [64:0] rem_try;

  assign rem_shift = {rem[62:0], quo[63]};
  assign rem_try   = {rem, quo[63]} - {1'b0, dvs};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      quo      <= '0;
      dvs      <= '0;
      rem      <= '0;
      cnt      <= '0;
      neg_q    <= 1'b0;
      neg_r    <= 1'b0;
      div_zero <= 1'b0;
      a_in     <= '0;
      op_q     <= MD_MUL;
      word_q   <= 1'b0;
      res_q    <= '0;
      prod_q   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req) begin
          op_q   <= op;
          word_q <= word_op;
          if (is_div) begin
            neg_q    <= a_signed && (ax[63] ^ bx[63]);
            neg_r    <= a_signed && ax[63];
            div_zero <= (bx == '0);
            a_in     <= ax;
            quo      <= (a_signed && ax[63]) ? -ax : ax;   // shifted dividend / quotient
            dvs      <= (b_signed && bx[63]) ? -bx : bx;
            rem      <= '0;
            cnt      <= 7'd64;
            state    <= S_DIV;
          end else begin
            prod_q <= prod_c[127:0];
            state  <= S_MUL;
          end
        end
        S_MUL: begin
          unique case (op_q)
            MD_MUL:  res_q <= word_q ? {{32{prod_q[31]}}, prod_q[31:0]} : prod_q[63:0];
            default: res_q <= prod_q[127:64];
          endcase
          state <= S_DONE;
        end
        S_DIV: begin
          if (cnt != '0) begin
            if (!rem_try[64]) begin
              rem <= rem_try[63:0];
              quo <= {quo[62:0], 1'b1};
            end else begin
              rem <= rem_shift;
              quo <= {quo[62:0], 1'b0};
            end
            cnt <= cnt - 7'd1;
          end else begin
            xlen_t q, r;
            q = neg_q ? -quo : quo;
            r = neg_r ? -rem : rem;
            if (div_zero) begin
              q = '1;
              r = a_in;
            end
            if (op_q inside {MD_DIV, MD_DIVU}) res_q <= word_q ? {{32{q[31]}}, q[31:0]} : q;
            else                               res_q <= word_q ? {{32{r[31]}}, r[31:0]} : r;
            state <= S_DONE;
          end
        end
        default: if (ack) state <= S_IDLE;  // S_DONE
      endcase
    end
  end

  assign done   = (state == S_DONE);
  assign result = res_q;
endmodule
