// Integer register file: 32 registers of XLEN bits, two combinational read
// ports (read in Decode) and one write port (written in Write Back), as in
// the document's pipeline figures. Register x0 always reads as zero and
// ignores writes. A read of the register being written in the same cycle
// returns the old value; the core's bypass network supplies the new one.
// All registers reset to zero (the document does not give reset values).
module regfile
  import riscy_pkg::*;
#(
  parameter int unsigned NREGS = 32
) (
  input  logic     clk,
  input  logic     rst_n,
  input  reg_idx_t raddr1,
  output xlen_t    rdata1,
  input  reg_idx_t raddr2,
  output xlen_t    rdata2,
  input  logic     we,
  input  reg_idx_t waddr,
  input  xlen_t    wdata
);
  xlen_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) regs[i] <= '0;
    end else if (we && waddr != '0) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata1 = (raddr1 == '0) ? '0 : regs[raddr1];
  assign rdata2 = (raddr2 == '0) ? '0 : regs[raddr2];
endmodule
