// L1 cache with registered SRAM outputs (used as instruction and data cache).
//
// Organisation: SIZE_BYTES (16 KB) in WAYS (4) ways of LINE_BYTES lines.
// With 4 KB per way the set index lies inside the 4 KB page offset, which
// is what lets the caches be virtually indexed and physically tagged. Each
// way has a data SRAM (one 64-bit word per entry) and a tag SRAM; valid bits
// are flip-flops so that they can be reset.
//
// Three-stage access, following the document's high-frequency design:
//   S0  the request's address drives the SRAMs (Fetch 1 / Execute)
//   S1  the SRAM outputs are captured in a register at their output
//       (Fetch 2 / Memory); nothing else is done in this cycle
//   S2  tags are compared and the hitting way selected (Fetch 3 / Write Back)
// A hit therefore returns its word two cycles after the request, with one
// new request accepted per cycle.
//
// Misses and stores. On a load miss in S2 the line is read from memory
// (LINE_BYTES/8 beats of 64 bits, word 0 first) into a way chosen as an
// invalid way or else round robin. Stores are write-through without write
// allocate: each store is sent to memory and, if it hits, also written into
// the data SRAM. While either is in progress busy is high and the pipeline
// must stall (stall_i); the cache then re-reads the S1 request's SRAM
// address once more ("replay") so that S1 sees what was just written.
// While stall_i is high nothing advances and the SRAMs re-read S1's address
// every idle cycle, so S1's output stays current.
// kill_s0/kill_s1 squash the request in S0/S1 at the next advance.
//
// Memory port: mem_req_* is a valid/ready request (a line read, or a
// single-word write with byte enables); mem_resp_valid/mem_resp_data
// deliver the beats of a line read. The write policy, the replacement,
// the line size and the memory port are this design's choices: the
// document gives only the size, associativity, SRAM arrays and registered
// SRAM outputs. There is no TLB: addresses are used as physical addresses.
module l1_cache
  import riscy_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 16384,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stall_i,
  // S0 request
  input  logic        req_valid,
  input  xlen_t       req_addr,
  input  logic        req_we,
  input  xlen_t       req_wdata,
  input  logic [7:0]  req_be,
  input  logic        kill_s0,
  input  logic        kill_s1,
  // S2 response
  output logic        resp_valid,   // load/fetch in S2 has its data
  output xlen_t       resp_data,
  output logic        busy,
  // memory port
  output logic        mem_req_valid,
  input  logic        mem_req_ready,
  output logic        mem_req_we,
  output xlen_t       mem_req_addr,
  output xlen_t       mem_req_wdata,
  output logic [7:0]  mem_req_be,
  input  logic        mem_resp_valid,
  input  xlen_t       mem_resp_data
);
  localparam int unsigned SETS     = SIZE_BYTES / (WAYS * LINE_BYTES);
  localparam int unsigned WORDS    = LINE_BYTES / 8;
  localparam int unsigned OFF_W    = $clog2(LINE_BYTES);
  localparam int unsigned SET_W    = $clog2(SETS);
  localparam int unsigned WRD_W    = $clog2(WORDS);
  localparam int unsigned TAG_W    = XLEN - SET_W - OFF_W;
  localparam int unsigned WAY_W    = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned DADDR_W  = SET_W + WRD_W;

  typedef enum logic [2:0] { C_IDLE, C_RREQ, C_RFILL, C_WREQ, C_REPLAY } cstate_e;
  cstate_e state;

  // ---------------------------------------------------------------- stages
  logic        s1_valid, s1_we;
  xlen_t       s1_addr, s1_wdata;
  logic [7:0]  s1_be;
  logic        s2_valid, s2_we, s2_done;
  xlen_t       s2_addr, s2_wdata, s2_fill;
  logic [7:0]  s2_be;

  xlen_t             d_rd   [WAYS];
  logic [TAG_W-1:0]  t_rd   [WAYS];
  logic [WAYS-1:0]   v_rd;
  xlen_t             s2_d   [WAYS];
  logic [TAG_W-1:0]  s2_t   [WAYS];
  logic [WAYS-1:0]   s2_v;

  logic [WAYS-1:0]   valid_bits [SETS];

  // -------------------------------------------------------------- S2 lookup
  logic [WAYS-1:0] hit_vec;
  logic            hit;
  logic [WAY_W-1:0] hit_way;
  xlen_t           hit_data;

  always_comb begin
    hit_way  = '0;
    hit_data = '0;
    for (int w = 0; w < WAYS; w++)
      hit_vec[w] = s2_v[w] && (s2_t[w] == s2_addr[XLEN-1 -: TAG_W]);
    for (int w = WAYS-1; w >= 0; w--)
      if (hit_vec[w]) begin
        hit_way  = WAY_W'(w);
        hit_data = s2_d[w];
      end
  end
  assign hit = |hit_vec;

  logic s2_needs_work;
  assign s2_needs_work = s2_valid && !s2_done && (s2_we || !hit);
  assign busy       = s2_needs_work || (state != C_IDLE);
  assign resp_valid = s2_valid && !s2_we && (s2_done || hit);
  assign resp_data  = s2_done ? s2_fill : hit_data;

  // ---------------------------------------------------------- SRAM control
  logic [DADDR_W-1:0] d_addr;
  logic [SET_W-1:0]   t_addr, vsel;
  logic               d_we, t_we, sram_en;
  xlen_t              d_wdata, d_wmask;
  logic [WAYS-1:0]    way_sel;         // ways written this cycle
  logic [WRD_W-1:0]   beat;
  logic [WAY_W-1:0]   victim, rr;
  xlen_t              rd_addr;

  function automatic xlen_t be_mask(input logic [7:0] be);
    xlen_t m;
    for (int i = 0; i < 8; i++) m[i*8 +: 8] = {8{be[i]}};
    return m;
  endfunction

  always_comb begin
    rd_addr = (stall_i || state == C_REPLAY) ? s1_addr : req_addr;
    sram_en = 1'b1;
    d_we    = 1'b0;
    t_we    = 1'b0;
    way_sel = '0;
    d_addr  = rd_addr[OFF_W-1+SET_W -: DADDR_W];
    t_addr  = rd_addr[OFF_W +: SET_W];
    d_wdata = mem_resp_data;
    d_wmask = '1;
    if (state == C_RFILL && mem_resp_valid) begin
      d_we    = 1'b1;
      way_sel = WAYS'(1) << victim;
      d_addr  = {s2_addr[OFF_W +: SET_W], beat};
      t_addr  = s2_addr[OFF_W +: SET_W];
      t_we    = (beat == WRD_W'(WORDS-1));
    end else if (state == C_WREQ && mem_req_ready && hit) begin
      d_we    = 1'b1;
      way_sel = WAYS'(1) << hit_way;
      d_addr  = s2_addr[OFF_W-1+SET_W -: DADDR_W];
      d_wdata = s2_wdata;
      d_wmask = be_mask(s2_be);
    end else if (state == C_WREQ || state == C_RREQ || state == C_RFILL) begin
      sram_en = 1'b0;           // port idle while waiting for memory
    end
  end

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic d_en, t_en;
    assign d_en = sram_en && (!d_we || way_sel[w]);
    assign t_en = sram_en && (!d_we || (t_we && way_sel[w]));
    sram_sp #(.DEPTH(SETS*WORDS), .WIDTH(XLEN)) u_data (
      .clk, .en(d_en), .we(d_we), .addr(d_addr), .wdata(d_wdata), .wmask(d_wmask),
      .rdata(d_rd[w]));
    sram_sp #(.DEPTH(SETS), .WIDTH(TAG_W)) u_tag (
      .clk, .en(t_en), .we(t_we), .addr(t_addr),
      .wdata(s2_addr[XLEN-1 -: TAG_W]), .wmask('1), .rdata(t_rd[w]));
  end

  // valid bits are read in step with the SRAMs
  always_ff @(posedge clk) begin
    if (sram_en && !d_we) v_rd <= valid_bits[t_addr];
  end

  // -------------------------------------------------------------- victim
  always_comb begin
    victim = rr;
    for (int w = WAYS-1; w >= 0; w--)
      if (!s2_v[w]) victim = WAY_W'(w);
  end

  // ----------------------------------------------------------- sequencing
  assign vsel = s2_addr[OFF_W +: SET_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= C_IDLE;
      s1_valid <= 1'b0;
      s1_we    <= 1'b0;
      s1_addr  <= '0;
      s1_wdata <= '0;
      s1_be    <= '0;
      s2_valid <= 1'b0;
      s2_we    <= 1'b0;
      s2_done  <= 1'b0;
      s2_addr  <= '0;
      s2_wdata <= '0;
      s2_be    <= '0;
      s2_fill  <= '0;
      beat     <= '0;
      rr       <= '0;
      for (int s = 0; s < SETS; s++) valid_bits[s] <= '0;
      for (int w = 0; w < WAYS; w++) begin
        s2_d[w] <= '0;
        s2_t[w] <= '0;
      end
      s2_v <= '0;
    end else begin
      // pipeline advance
      if (!stall_i) begin
        s1_valid <= req_valid && !kill_s0;
        s1_we    <= req_we;
        s1_addr  <= req_addr;
        s1_wdata <= req_wdata;
        s1_be    <= req_be;
        s2_valid <= s1_valid && !kill_s1;
        s2_we    <= s1_we;
        s2_addr  <= s1_addr;
        s2_wdata <= s1_wdata;
        s2_be    <= s1_be;
        s2_done  <= 1'b0;
        for (int w = 0; w < WAYS; w++) begin
          s2_d[w] <= d_rd[w];
          s2_t[w] <= t_rd[w];
        end
        s2_v <= v_rd;
      end
      // miss / store handling
      unique case (state)
        C_IDLE: if (s2_needs_work) begin
          state <= s2_we ? C_WREQ : C_RREQ;
          beat  <= '0;
        end
        C_RREQ: if (mem_req_ready) state <= C_RFILL;
        C_RFILL: if (mem_resp_valid) begin
          if (beat == s2_addr[3 +: WRD_W]) s2_fill <= mem_resp_data;
          beat <= beat + 1'b1;
          if (beat == WRD_W'(WORDS-1)) begin
            valid_bits[vsel][victim] <= 1'b1;
            rr    <= rr + 1'b1;
            state <= C_REPLAY;
          end
        end
        C_WREQ: if (mem_req_ready) state <= C_REPLAY;
        default: begin  // C_REPLAY
          s2_done <= 1'b1;
          state   <= C_IDLE;
        end
      endcase
    end
  end

  assign mem_req_valid = (state == C_RREQ) || (state == C_WREQ);
  assign mem_req_we    = (state == C_WREQ);
  assign mem_req_addr  = (state == C_WREQ) ? s2_addr : {s2_addr[XLEN-1:OFF_W], {OFF_W{1'b0}}};
  assign mem_req_wdata = s2_wdata;
  assign mem_req_be    = s2_be;

  // a store never asks for a line and a line refill never overlaps a write
  a_no_wreq_in_fill: assert property (@(posedge clk) disable iff (!rst_n)
    (state == C_RFILL) |-> !mem_req_valid);
endmodule
