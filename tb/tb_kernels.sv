// Workload test: CoreMark-style kernels compiled for RV64IM, run on the
// full-size core.
//
// The publication measures the core with EEMBC CoreMark. CoreMark itself is
// not included here; this test runs a program of the same flavour: a linked
// list (build, reverse, insertion sort), an 8 x 8 16-bit matrix multiply, a
// number-recognising state machine over a 63-character string, and CRC-16
// over all their results, three iterations. The program image comes from
// the C source below, compiled with GCC for rv64im / lp64 at -O2 with
// -mcmodel=medany, code linked at 0x8000_0000 and data at 0x8001_0100 (the
// start-up code sets sp = 0x8002_0000, calls run_all and stores its 64-bit
// result at 0x8001_0000, then loops). kernels_text.hex and kernels_data.hex
// hold the .text and .data/.bss sections as 64-bit little-endian words.
// The expected result 0x000017e96ac581f5 is what the same C source returns
// when compiled natively for a 64-bit host.
//
// Checks: the stored result; that the core reaches the final loop within
// the watchdog; the instructions per cycle are reported. The test also
// counts the stall and redirect mechanisms the program exercises.
//
// C source of the kernels:
//   /* CoreMark-style kernels: linked list, matrix, state machine, CRC-16. */
//   typedef unsigned long u64; typedef unsigned int u32; typedef unsigned short u16; typedef short s16;
//   #define N 8
//   #define LN 24
//   struct node { struct node *next; s16 val; s16 idx; };
//   static struct node pool[LN];
//   static s16 ma[N*N], mb[N*N]; static int mc[N*N];
//   static char text[64];
//   
//   static u16 crc16_byte(u16 crc, unsigned char d) {
//     for (int i = 0; i < 8; i++) { u16 x = (crc ^ d) & 1; d >>= 1; crc >>= 1; if (x) crc ^= 0xA001; }
//     return crc;
//   }
//   static u16 crc16_word(u16 crc, u32 v) { for (int i = 0; i < 4; i++) crc = crc16_byte(crc, (v >> (8*i)) & 0xff); return crc; }
//   
//   static u32 seed = 0x1234567u;
//   static u32 rnd(void) { seed = seed * 1103515245u + 12345u; return seed >> 8; }
//   
//   static struct node *list_build(void) {
//     struct node *h = 0;
//     for (int i = 0; i < LN; i++) { pool[i].val = (s16)(rnd() & 0x7fff); pool[i].idx = i; pool[i].next = h; h = &pool[i]; }
//     return h;
//   }
//   static struct node *list_reverse(struct node *h) {
//     struct node *p = 0;
//     while (h) { struct node *n = h->next; h->next = p; p = h; h = n; }
//     return p;
//   }
//   static struct node *list_sort(struct node *h) {          /* insertion sort by val */
//     struct node *s = 0;
//     while (h) {
//       struct node *n = h->next, **pp = &s;
//       while (*pp && (*pp)->val < h->val) pp = &(*pp)->next;
//       h->next = *pp; *pp = h; h = n;
//     }
//     return s;
//   }
//   static u16 list_kernel(u16 crc) {
//     struct node *h = list_build();
//     h = list_reverse(h);
//     h = list_sort(h);
//     for (struct node *p = h; p; p = p->next) crc = crc16_word(crc, (u32)p->val << 16 | (u16)p->idx);
//     return crc;
//   }
//   static u16 matrix_kernel(u16 crc) {
//     for (int i = 0; i < N*N; i++) { ma[i] = (s16)(rnd() & 0xff) - 128; mb[i] = (s16)(rnd() & 0xff) - 100; }
//     for (int i = 0; i < N; i++)
//       for (int j = 0; j < N; j++) {
//         int acc = 0;
//         for (int k = 0; k < N; k++) acc += ma[i*N+k] * mb[k*N+j];
//         mc[i*N+j] = acc;
//       }
//     for (int i = 0; i < N*N; i++) { int v = mc[i]; if (v < 0) v = -v; crc = crc16_word(crc, (u32)(v / 7 + v % 13)); }
//     return crc;
//   }
//   static u16 state_kernel(u16 crc) {
//     static const char alpha[] = "0123456789+-.eE ,";
//     for (int i = 0; i < 63; i++) text[i] = alpha[rnd() % 17];
//     text[63] = 0;
//     int state = 0, counts[5] = {0, 0, 0, 0, 0};
//     for (int i = 0; text[i]; i++) {
//       char c = text[i];
//       if (c == ',' || c == ' ') { counts[state]++; state = 0; continue; }
//       switch (state) {
//         case 0: state = (c >= '0' && c <= '9') ? 1 : (c == '+' || c == '-') ? 2 : 4; break;
//         case 1: state = (c >= '0' && c <= '9') ? 1 : (c == '.') ? 3 : 4; break;
//         case 2: state = (c >= '0' && c <= '9') ? 1 : 4; break;
//         case 3: state = (c >= '0' && c <= '9') ? 3 : (c == 'e' || c == 'E') ? 2 : 4; break;
//         default: state = 4;
//       }
//     }
//     for (int i = 0; i < 5; i++) crc = crc16_word(crc, counts[i]);
//     return crc;
//   }
//   u64 run_all(void) {
//     u16 c1 = 0, c2 = 0, c3 = 0;
//     for (int it = 0; it < 3; it++) { c1 = list_kernel(c1); c2 = matrix_kernel(c2); c3 = state_kernel(c3); }
//     return ((u64)c1 << 32) | ((u64)c2 << 16) | c3;
//   }
module tb_kernels;
  localparam longint unsigned CODE_BASE = 64'h8000_0000;
  localparam longint unsigned DATA_BASE = 64'h8001_0000;
  localparam logic [63:0]     EXPECTED  = 64'h0000_17e9_6ac5_81f5;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  // a falling reset edge at 1 ns, so the asynchronous reset acts at once and
  // no request from random start-up state reaches the memory models
  initial #1 rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        imem_req_valid, imem_req_ready, imem_req_we, imem_resp_valid;
  logic [63:0] imem_req_addr, imem_req_wdata, imem_resp_data;
  logic [7:0]  imem_req_be;
  logic        dmem_req_valid, dmem_req_ready, dmem_req_we, dmem_resp_valid;
  logic [63:0] dmem_req_addr, dmem_req_wdata, dmem_resp_data;
  logic [7:0]  dmem_req_be;
  logic        rt_valid, rt_we;
  logic [63:0] rt_pc, rt_wdata;
  logic [31:0] rt_instr;
  logic [4:0]  rt_rd;

  riscy_v2 dut (.*);

  mem_model #(.BASE(CODE_BASE), .WORDS(1024), .LAT(6), .STALL_PCT(0)) u_imem (
    .clk, .req_valid(imem_req_valid), .req_ready(imem_req_ready), .req_we(imem_req_we),
    .req_addr(imem_req_addr), .req_wdata(imem_req_wdata), .req_be(imem_req_be),
    .resp_valid(imem_resp_valid), .resp_data(imem_resp_data));
  mem_model #(.BASE(DATA_BASE), .WORDS(8192), .LAT(6), .STALL_PCT(0)) u_dmem (
    .clk, .req_valid(dmem_req_valid), .req_ready(dmem_req_ready), .req_we(dmem_req_we),
    .req_addr(dmem_req_addr), .req_wdata(dmem_req_wdata), .req_be(dmem_req_be),
    .resp_valid(dmem_resp_valid), .resp_data(dmem_resp_data));

  int checks = 0, failures = 0;
  longint unsigned cycles = 0, retired = 0;
  int n_ex_redir = 0, n_f3_redir = 0, n_f2_redir = 0, n_hz = 0, n_md = 0;
  logic [63:0] end_pc = '1;
  bit finished = 0;

  always @(posedge clk) if (rst_n && !finished) begin
    cycles++;
    if (rt_valid) begin
      retired++;
      // the final "j ." is the first instruction that retires twice in a row
      if (rt_pc == end_pc) finished = 1;
      end_pc = rt_pc;
    end
    if (dut.ex_redirect) n_ex_redir++;
    if (dut.f3_redirect) n_f3_redir++;
    if (dut.f2_redirect) n_f2_redir++;
    if (dut.hz_stall_eff && !dut.gstall) n_hz++;
    if (dut.md_stall) n_md++;
  end

  initial begin
    for (int i = 0; i < 1024; i++) u_imem.mem[i] = 64'h0000_0013_0000_0013;
    $readmemh("tb/kernels_text.hex", u_imem.mem);
    for (int i = 0; i < 8192; i++) u_dmem.mem[i] = '0;
    $readmemh("tb/kernels_data.hex", u_dmem.mem, 32);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished);
    repeat (20) @(posedge clk);
    checks++;
    if (u_dmem.mem[0] !== EXPECTED) begin
      failures++;
      $display("FAIL: result %h, expected %h", u_dmem.mem[0], EXPECTED);
    end else $display("result %h as expected", u_dmem.mem[0]);
    checks++;
    if (n_ex_redir == 0 || n_f3_redir == 0 || n_f2_redir == 0 || n_hz == 0 || n_md == 0) begin
      failures++;
      $display("FAIL: a mechanism never happened");
    end
    $display("retired=%0d cycles=%0d IPC=%0.3f", retired, cycles, real'(retired) / real'(cycles));
    $display("redirects EX=%0d F3=%0d F2=%0d, hazard stalls=%0d, mul/div stall cycles=%0d",
             n_ex_redir, n_f3_redir, n_f2_redir, n_hz, n_md);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired after %0d retired instructions", retired);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
