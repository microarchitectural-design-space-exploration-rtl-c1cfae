// Self-checking test of the pre-decoder: JAL, conditional branches with
// both BHT predictions, JALR with and without a BTB hit, and ordinary
// instructions, each 16- or 32-bit long, first or last in its parcel, and
// with Fetch 2 having fetched the sequential parcel, the right target or a
// wrong one. The instruction's predicted next PC, the taken flag, the
// redirect and its address are compared with values worked out here. A
// parcel that gives no instruction is also checked.
module tb_predecoder;
  import riscy_pkg::*;
  import rv_asm_pkg::*;
  logic valid, instr_valid, is_c, parcel_end, btb_hit, bht_taken;
  logic is_branch, taken, redirect;
  logic [31:0] instr;
  xlen_t pc, seq_fetch, f2, npc, rpc;
  int checks = 0, failures = 0;

  predecoder dut (.valid, .instr_valid, .instr, .is_c, .pc, .parcel_end, .seq_fetch,
                  .f2_pred_npc(f2), .f2_btb_hit(btb_hit), .bht_taken, .is_branch, .taken,
                  .pred_npc(npc), .redirect, .redirect_pc(rpc));

  initial begin
    for (int i = 0; i < 4000; i++) begin
      automatic int kind = $urandom_range(3);
      automatic int off = (int'($urandom_range(4095)) - 2048) * 2;
      automatic int joff = (int'($urandom_range(65535)) - 32768) * 2;
      automatic xlen_t tgt = {$urandom(), $urandom()} & ~64'd1;
      automatic xlen_t parcel = 64'h8000_0000 + ($urandom_range(4095) << 2);
      automatic logic exp_tk, exp_redirect;
      automatic xlen_t exp_tgt, exp_npc, exp_rpc, len;
      is_c        = 1'($urandom_range(1));
      pc          = parcel + ($urandom_range(1) ? 64'd2 : 64'd0);
      seq_fetch   = parcel + 4;
      parcel_end  = 1'($urandom_range(1));
      btb_hit     = 1'($urandom_range(1));
      bht_taken   = 1'($urandom_range(1));
      instr_valid = ($urandom_range(7) != 0);
      valid       = 1;
      case (kind)
        0:       instr = jal(1, joff);
        1:       instr = bne(3, 4, off);
        2:       instr = jalr(0, 1, 0);
        default: instr = addi(1, 2, 3);
      endcase
      case ($urandom_range(2))
        0:       f2 = seq_fetch;
        1:       f2 = (kind == 0) ? pc + 64'(longint'(joff)) : (kind == 1) ? pc + 64'(longint'(off)) : tgt;
        default: f2 = tgt;
      endcase
      // expected values
      len     = is_c ? 2 : 4;
      exp_tk  = 0;
      exp_tgt = pc + len;
      case (kind)
        0: begin exp_tk = 1;         exp_tgt = pc + 64'(longint'(joff)); end
        1: begin exp_tk = bht_taken; exp_tgt = pc + 64'(longint'(off));  end
        2: begin exp_tk = btb_hit;   exp_tgt = f2;                       end
        default: ;
      endcase
      exp_tk       = exp_tk && instr_valid;
      exp_npc      = exp_tk ? exp_tgt : pc + len;
      exp_rpc      = exp_tk ? exp_tgt : seq_fetch;
      exp_redirect = (exp_tk || parcel_end) && (exp_rpc != f2);
      #1;
      checks++;
      if (taken !== exp_tk || npc !== exp_npc || redirect !== exp_redirect ||
          (exp_redirect && rpc !== exp_rpc) || is_branch !== (kind == 1 && instr_valid)) begin
        failures++;
        if (failures < 10)
          $display("FAIL kind=%0d c=%0d end=%0d tk=%0d/%0d npc=%h/%h redirect=%0d/%0d rpc=%h/%h",
                   kind, is_c, parcel_end, taken, exp_tk, npc, exp_npc, redirect, exp_redirect,
                   rpc, exp_rpc);
      end
      valid = 0; #1;
      checks++;
      if (redirect !== 1'b0) begin failures++; $display("FAIL redirect while invalid"); end
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
