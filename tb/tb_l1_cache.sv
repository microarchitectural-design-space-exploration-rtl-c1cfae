// Self-checking test of the L1 cache at its full 16 KB, 4-way size.
//
// A random stream of loads and stores (byte-enabled) to addresses chosen so
// that many lines compete for a few sets drives the cache like the
// pipeline does: one request per cycle, everything held while busy or an
// external stall is high, and random squashes of the requests in S0/S1.
// Every load reaching S2 is compared with a shadow memory updated by the
// stores in program order; at the end the memory behind the cache must
// equal the shadow (write-through). A directed part checks the hit
// latency: a load to a resident line returns its data two cycles after
// the request, with a new request accepted every cycle.
module tb_l1_cache;
  import riscy_pkg::*;
  localparam int WORDS = 8192;
  logic clk = 0, rst_n = 1;
  // a falling reset edge at 1 ns, so the asynchronous reset acts at once and
  // no request from random start-up state reaches the memory model
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic stall_i, req_valid, req_we, kill_s0, kill_s1, resp_valid, busy;
  xlen_t req_addr, req_wdata, resp_data;
  logic [7:0] req_be;
  logic mreq_valid, mreq_ready, mreq_we, mresp_valid;
  xlen_t mreq_addr, mreq_wdata, mresp_data;
  logic [7:0] mreq_be;
  logic ext_stall;

  l1_cache dut (.clk, .rst_n, .stall_i, .req_valid, .req_addr, .req_we, .req_wdata, .req_be,
                .kill_s0, .kill_s1, .resp_valid, .resp_data, .busy,
                .mem_req_valid(mreq_valid), .mem_req_ready(mreq_ready), .mem_req_we(mreq_we),
                .mem_req_addr(mreq_addr), .mem_req_wdata(mreq_wdata), .mem_req_be(mreq_be),
                .mem_resp_valid(mresp_valid), .mem_resp_data(mresp_data));
  mem_model #(.BASE(0), .WORDS(WORDS), .LAT(3)) u_mem (
    .clk, .req_valid(mreq_valid), .req_ready(mreq_ready), .req_we(mreq_we), .req_addr(mreq_addr),
    .req_wdata(mreq_wdata), .req_be(mreq_be), .resp_valid(mresp_valid), .resp_data(mresp_data));

  assign stall_i = busy || ext_stall;

  typedef struct { bit v; bit we; xlen_t addr; xlen_t wdata; logic [7:0] be; } rq_t;
  rq_t p1, p2, cur;
  xlen_t shadow [WORDS];
  int checks = 0, failures = 0, n_hits = 0, n_loads = 0;

  function automatic xlen_t raddr();
    return (xlen_t'($urandom_range(15)) << 12) | (xlen_t'($urandom_range(3)) << 6) |
           (xlen_t'($urandom_range(7)) << 3);
  endfunction

  // one cycle of the pipeline: apply cur at S0, check S2, advance
  task automatic cycle(input rq_t r, input bit k0, input bit k1, input bit es);
    @(negedge clk);
    req_valid = r.v; req_we = r.we; req_addr = r.addr; req_wdata = r.wdata; req_be = r.be;
    kill_s0 = k0; kill_s1 = k1; ext_stall = es;
    #1;
    if (p2.v && !p2.we && !busy) begin
      checks++; n_loads++;
      if (!resp_valid || resp_data !== shadow[p2.addr[15:3]]) begin
        failures++;
        if (failures < 10) $display("FAIL load %h: valid=%0d data=%h exp=%h", p2.addr, resp_valid, resp_data, shadow[p2.addr[15:3]]);
      end
    end
    @(posedge clk);
    if (!stall_i) begin
      if (p2.v && p2.we)
        for (int b = 0; b < 8; b++) if (p2.be[b]) shadow[p2.addr[15:3]][8*b +: 8] = p2.wdata[8*b +: 8];
      p2 = p1; p2.v = p1.v && !k1;
      p1 = r;  p1.v = r.v && !k0;
    end
  endtask

  initial begin
    rq_t z;
    z = '{v: 0, we: 0, addr: 0, wdata: 0, be: 0};
    p1 = z; p2 = z;
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0; req_be = 0;
    kill_s0 = 0; kill_s1 = 0; ext_stall = 0;
    for (int i = 0; i < WORDS; i++) begin
      automatic xlen_t v = {$urandom(), $urandom()};
      u_mem.mem[i] = v; shadow[i] = v;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;

    // directed: miss, then back-to-back hits with 2-cycle latency
    cur = '{v: 1, we: 0, addr: 64'h1040, wdata: 0, be: 0};
    cycle(cur, 0, 0, 0);
    while (busy || p1.v || p2.v) cycle(z, 0, 0, 0);
    for (int i = 0; i < 4; i++) begin
      automatic int lat = 0;
      cur.addr = 64'h1040 + 8 * i;
      cycle(cur, 0, 0, 0);
      // after the request: S1 then S2, data must be there without busy
      cycle(z, 0, 0, 0); lat++;
      @(negedge clk); req_valid = 0; #1; lat++;
      checks++;
      if (busy || !resp_valid || resp_data !== shadow[cur.addr[15:3]] || lat != 2) begin
        failures++;
        $display("FAIL hit latency: busy=%0d valid=%0d lat=%0d", busy, resp_valid, lat);
      end
      // let the pipeline advance past this cycle as the model expects
      @(negedge clk); req_valid = 0;
      @(posedge clk);
      p2 = p1; p1 = z;
      while (p2.v || p1.v) cycle(z, 0, 0, 0);
    end

    // random stream
    for (int i = 0; i < 20000; i++) begin
      cur.v = $urandom_range(9) != 0;
      cur.we = $urandom_range(2) == 0;
      cur.addr = raddr();
      cur.wdata = {$urandom(), $urandom()};
      cur.be = cur.we ? 8'($urandom_range(255)) : 8'h0;
      cycle(cur, $urandom_range(19) == 0, $urandom_range(19) == 0, $urandom_range(9) == 0);
    end
    for (int i = 0; i < 200; i++) cycle(z, 0, 0, 0);
    for (int i = 0; i < WORDS; i++) begin
      checks++;
      if (u_mem.mem[i] !== shadow[i]) begin
        failures++;
        if (failures < 20) $display("FAIL mem[%0d]=%h exp=%h", i, u_mem.mem[i], shadow[i]);
      end
    end
    $display("loads checked=%0d line reads=%0d writes=%0d", n_loads, u_mem.n_reads, u_mem.n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
