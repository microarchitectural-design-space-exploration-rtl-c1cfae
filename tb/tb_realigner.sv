// Self-checking test of the re-aligner.
//
// The bench plays the part of Fetch 3 and of the rest of the core. It builds
// random code segments of mixed 16- and 32-bit instructions laid out from a
// random address, which may be 2 mod 4 (the entry of a jump to A + 2), and
// feeds their 32-bit parcels in order. The 16-bit instructions are C.LI
// forms whose expansion (ADDI rd, x0, imm) is worked out here; the 32-bit
// ones are random words. Each cycle, at random, the parcel slot may be
// empty (in_valid low), Decode may refuse (adv low), the instruction sent
// may be a predicted-taken jump (cut, which ends the segment) and Execute
// may redirect (flush, which ends it too). Every instruction taken by
// Decode must be the next one of the segment, with its address, its 32-bit
// form and its length flag. The bench moves to the next parcel when
// out_last says the parcel is used up, as the core does. It also counts
// parcels with two instructions, 32-bit instructions split over two
// parcels and entries at A + 2, and fails if one of these never happened.
module tb_realigner;
  import riscy_pkg::*;
  logic        clk = 0, rst_n = 0;
  logic        in_valid, in_start_hi, adv, cut, flush;
  logic [31:0] in_parcel, out_instr;
  xlen_t       in_addr, out_pc;
  logic        out_valid, out_is_c, out_last;
  int checks = 0, failures = 0;
  int n_two = 0, n_split = 0, n_hi = 0, n_cut = 0, n_flush = 0;

  realigner dut (.clk, .rst_n, .in_valid, .in_parcel, .in_addr, .in_start_hi, .adv, .cut,
                 .flush, .out_valid, .out_instr, .out_is_c, .out_pc, .out_last);

  always #5 clk = ~clk;

  // one segment: halfword image from parcel address seg_base, instructions
  logic [15:0] hw [256];
  xlen_t       seg_base, parcel;
  logic        seg_hi;
  xlen_t       e_pc [64];
  logic [31:0] e_ins [64];
  logic        e_c [64];
  int          n_ins, k;
  logic        ov_s, last_s;

  task automatic new_segment();
    automatic int pos;
    seg_base = 64'h8000_0000 + (64'($urandom_range(1 << 16)) << 2);
    seg_hi   = 1'($urandom_range(1));
    for (int i = 0; i < 256; i++) hw[i] = 16'($urandom());
    pos   = seg_hi ? 1 : 0;
    n_ins = 8 + $urandom_range(40);
    for (int i = 0; i < n_ins; i++) begin
      e_pc[i] = seg_base + 64'(2 * pos);
      if ($urandom_range(1)) begin
        automatic logic [5:0] imm = 6'($urandom());
        automatic logic [4:0] rd  = 5'($urandom());
        hw[pos]  = {3'b010, imm[5], rd, imm[4:0], 2'b01};
        e_ins[i] = {{6{imm[5]}}, imm, 5'd0, 3'b000, rd, 7'b0010011};
        e_c[i]   = 1;
        pos += 1;
      end else begin
        automatic logic [31:0] w = {$urandom()} | 32'h3;
        hw[pos]     = w[15:0];
        hw[pos + 1] = w[31:16];
        e_ins[i]    = w;
        e_c[i]      = 0;
        pos += 2;
      end
    end
    parcel = seg_base;
    k      = 0;
  endtask

  initial begin
    in_valid = 0; in_start_hi = 0; adv = 0; cut = 0; flush = 0; in_parcel = '0; in_addr = '0;
    new_segment();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      automatic int pi = int'((parcel - seg_base) >> 1);
      @(negedge clk);
      // stop before the segment runs out: Execute redirects
      flush       = (k >= n_ins - 2) || ($urandom_range(99) < 2);
      in_valid    = ($urandom_range(9) < 8);
      in_addr     = parcel;
      in_parcel   = {hw[pi + 1], hw[pi]};
      in_start_hi = seg_hi && (parcel == seg_base);
      adv         = ($urandom_range(3) != 0);
      cut         = 0;
      #1;
      cut = out_valid && ($urandom_range(19) == 0);
      #1;
      if (in_valid && out_valid && adv && !flush) begin
        checks++;
        if (out_pc !== e_pc[k] || out_instr !== e_ins[k] || out_is_c !== e_c[k]) begin
          failures++;
          if (failures < 10)
            $display("FAIL #%0d: pc=%h ins=%h c=%0d, expected pc=%h ins=%h c=%0d", k,
                     out_pc, out_instr, out_is_c, e_pc[k], e_ins[k], e_c[k]);
        end
        if (!out_last && !cut) n_two++;
        if (!out_is_c && out_pc[1]) n_split++;
        if (in_start_hi) n_hi++;
        k++;
      end
      // what the core sees before the clock edge decides the next parcel
      ov_s   = out_valid;
      last_s = out_last;
      @(posedge clk);
      #1;
      if (flush) begin
        n_flush++;
        new_segment();
      end else if (adv && in_valid) begin
        if (cut && ov_s) begin
          n_cut++;
          new_segment();
        end else if (last_s) begin
          parcel = parcel + 4;
        end
      end
    end
    checks++;
    if (n_two == 0 || n_split == 0 || n_hi == 0 || n_cut == 0 || n_flush == 0) begin
      failures++;
      $display("FAIL: a case never happened");
    end
    $display("two-instruction parcels=%0d split=%0d entries at A+2=%0d cuts=%0d flushes=%0d",
             n_two, n_split, n_hi, n_cut, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
