// Branch history table (Fetch 3).
//
// A table of 2-bit saturating counters indexed by the PC's word address
// bits. Looked up combinationally with the PC of the conditional branch in
// Fetch 3; the counter's upper bit is the taken prediction ("Prediction
// BTH" in the document's figure). The Misprediction Unit trains the entry of
// every resolved conditional branch ("Update"): count up when taken, down
// when not taken. The document names the BHT only; the counter scheme, the
// size and the reset value (weakly not taken) are this design's choices.
module bht
  import riscy_pkg::*;
#(
  parameter int unsigned ENTRIES = 512
) (
  input  logic  clk,
  input  logic  rst_n,
  input  xlen_t lk_pc,
  output logic  lk_taken,
  input  logic  up_en,
  input  xlen_t up_pc,
  input  logic  up_taken
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);

  logic [1:0] ctr [ENTRIES];
  logic [IDX_W-1:0] lk_idx, up_idx;

  assign lk_idx = lk_pc[IDX_W+1:2];
  assign up_idx = up_pc[IDX_W+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= 2'b01;
    end else if (up_en) begin
      if (up_taken && ctr[up_idx] != 2'b11)       ctr[up_idx] <= ctr[up_idx] + 2'b01;
      else if (!up_taken && ctr[up_idx] != 2'b00) ctr[up_idx] <= ctr[up_idx] - 2'b01;
    end
  end

  assign lk_taken = ctr[lk_idx][1];
endmodule
