// Self-checking test of the misprediction unit: random branches of every
// condition, JAL and JALR, 16- and 32-bit long, each with a correct and a
// wrong prediction; the redirect, the real next PC and the BTB/BHT training
// are compared with values worked out here.
module tb_mispred_unit;
  import riscy_pkg::*;
  logic valid, is_jal, is_jalr, is_c, mp, btb_en, bht_en, bht_tk;
  br_op_e br_op;
  xlen_t pc, rs1, rs2, imm, pred, rpc, btgt;
  int checks = 0, failures = 0;

  mispred_unit dut (.valid, .br_op, .is_jal, .is_jalr, .is_c, .pc, .rs1, .rs2, .imm, .pred_npc(pred),
                    .mispredict(mp), .redirect_pc(rpc), .btb_up_en(btb_en), .btb_up_target(btgt),
                    .bht_up_en(bht_en), .bht_up_taken(bht_tk));

  initial begin
    br_op_e ops [7] = '{BR_NONE, BR_EQ, BR_NE, BR_LT, BR_GE, BR_LTU, BR_GEU};
    for (int i = 0; i < 6000; i++) begin
      bit c, tk;
      xlen_t tgt, n;
      automatic int kind = $urandom_range(8);
      valid = 1;
      is_c = 1'($urandom_range(1));
      pc  = 64'h8000_0000 + ($urandom_range(65535) << 1);
      rs1 = {$urandom(), $urandom()};
      rs2 = ($urandom_range(3) == 0) ? rs1 : {$urandom(), $urandom()};
      if ($urandom_range(1)) rs2[63] = ~rs1[63];
      imm = 64'(longint'(int'($urandom_range(8191)) - 4096)) & ~64'd1;
      is_jal = (kind == 7); is_jalr = (kind == 8);
      br_op = (kind < 7) ? ops[kind] : BR_NONE;
      case (br_op)
        BR_EQ:  c = rs1 == rs2;
        BR_NE:  c = rs1 != rs2;
        BR_LT:  c = $signed(rs1) < $signed(rs2);
        BR_GE:  c = !($signed(rs1) < $signed(rs2));
        BR_LTU: c = rs1 < rs2;
        BR_GEU: c = !(rs1 < rs2);
        default: c = 0;
      endcase
      tk  = c || is_jal || is_jalr;
      tgt = is_jalr ? {rs1[63:1] + imm[63:1] + 63'(rs1[0] & imm[0]), 1'b0} : pc + imm;
      n   = tk ? tgt : pc + (is_c ? 2 : 4);
      pred = $urandom_range(1) ? n : ($urandom_range(1) ? pc + (is_c ? 4 : 2) : pc + imm);
      #1;
      checks++;
      if (mp !== (pred != n) || rpc !== n || btb_en !== tk || (tk && btgt !== tgt) ||
          bht_en !== (br_op != BR_NONE) || (bht_en && bht_tk !== c)) begin
        failures++;
        if (failures < 10) $display("FAIL kind=%0d mp=%0d rpc=%h exp=%h", kind, mp, rpc, n);
      end
      valid = 0; #1;
      checks++;
      if (mp || btb_en || bht_en) begin failures++; $display("FAIL: activity while invalid"); end
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
