// Branch target buffer (Fetch 2).
//
// A direct-mapped table indexed by the fetch PC (word address bits). Each
// entry holds a valid bit, the rest of the PC as tag and the target of a
// control-flow instruction that was taken at that PC. A lookup is
// combinational from the registered table: the core looks up the address
// of the 32-bit fetch parcel in Fetch 2 (bits [1:0] are ignored, so an entry
// stands for the parcel holding the end of the jump) and, on a hit,
// redirects Fetch 1 to the stored target ("Prediction BTB" in the document's Fetch-2 figure). The
// Misprediction Unit writes an entry whenever a jump or branch is resolved
// taken ("Update"). The document names the BTB only; its size, organisation
// and update policy are this design's choices. Entries reset to invalid.
module btb
  import riscy_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  // lookup
  input  xlen_t lk_pc,
  output logic  lk_hit,
  output xlen_t lk_target,
  // update
  input  logic  up_en,
  input  xlen_t up_pc,
  input  xlen_t up_target
);
  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned TAG_W = XLEN - IDX_W - 2;

  logic [ENTRIES-1:0] valid;
  logic [TAG_W-1:0]   tags    [ENTRIES];
  xlen_t              targets [ENTRIES];

  logic [IDX_W-1:0] lk_idx, up_idx;
  assign lk_idx = lk_pc[IDX_W+1:2];
  assign up_idx = up_pc[IDX_W+1:2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
    end else if (up_en) begin
      valid[up_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (up_en) begin
      tags[up_idx]    <= up_pc[XLEN-1:IDX_W+2];
      targets[up_idx] <= up_target;
    end
  end

  assign lk_hit    = valid[lk_idx] && (tags[lk_idx] == lk_pc[XLEN-1:IDX_W+2]);
  assign lk_target = targets[lk_idx];
endmodule
