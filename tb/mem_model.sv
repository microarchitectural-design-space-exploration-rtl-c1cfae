// Behavioural model of the memory behind an L1 cache (testbench only).
//
// Holds WORDS 64-bit words starting at byte address BASE. Accepts one
// request at a time on a valid/ready port: a write updates the addressed
// word under its byte enables; a read returns the LINE_WORDS words of the
// aligned line, one per cycle, word 0 first, LAT cycles after the request.
// req_ready is withheld at random (STALL_PCT percent of idle cycles) to
// exercise back-pressure. Testbenches load and inspect the array directly.
module mem_model #(
  parameter longint unsigned BASE       = 64'h8000_0000,
  parameter int unsigned     WORDS      = 8192,
  parameter int unsigned     LINE_WORDS = 8,
  parameter int unsigned     LAT        = 4,
  parameter int unsigned     STALL_PCT  = 20
) (
  input  logic        clk,
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,
  input  logic [63:0] req_addr,
  input  logic [63:0] req_wdata,
  input  logic [7:0]  req_be,
  output logic        resp_valid,
  output logic [63:0] resp_data
);
  logic [63:0] mem [WORDS];
  int unsigned busy_cnt;     // cycles until the next beat, 0 when idle
  int unsigned beats_left;
  int unsigned line_idx;
  logic        rdy_rand;
  int unsigned n_reads, n_writes;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    busy_cnt = 0; beats_left = 0; line_idx = 0; rdy_rand = 1'b1;
    n_reads = 0; n_writes = 0;
  end

  function automatic int unsigned widx(input logic [63:0] a);
    return int'((a - BASE) >> 3) % WORDS;
  endfunction

  assign req_ready = (beats_left == 0) && rdy_rand;

  always_ff @(posedge clk) begin
    rdy_rand   <= ($urandom_range(99) >= STALL_PCT);
    resp_valid <= 1'b0;
    if (beats_left != 0) begin
      if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
      else begin
        resp_valid <= 1'b1;
        resp_data  <= mem[line_idx + LINE_WORDS - beats_left];
        beats_left <= beats_left - 1;
      end
    end else if (req_valid && req_ready) begin
      if (req_we) begin
        for (int b = 0; b < 8; b++)
          if (req_be[b]) mem[widx(req_addr)][b*8 +: 8] <= req_wdata[b*8 +: 8];
        n_writes <= n_writes + 1;
      end else begin
        line_idx   <= widx(req_addr) & ~(LINE_WORDS - 1);
        beats_left <= LINE_WORDS;
        busy_cnt   <= LAT;
        n_reads    <= n_reads + 1;
      end
    end
  end
endmodule
