// Single-port synchronous SRAM.
//
// One access per cycle: with en and we, the bits selected by wmask at addr
// are written; with en and not we, the word at addr appears on rdata after
// the clock edge and stays there until the next read. This is the
// behaviour of the SRAM macros the document builds its cache arrays from;
// here it is written as an array so that it simulates and synthesizes as a
// memory. Contents are not initialised (the caches keep separate, resettable
// valid bits).
module sram_sp #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 64
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [WIDTH-1:0]         wmask,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= (mem[addr] & ~wmask) | (wdata & wmask);
      else    rdata <= mem[addr];
    end
  end
endmodule
