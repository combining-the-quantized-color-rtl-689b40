// qcpx_rf: multi-ported register file for packed-pixel words.
//
// NREGS registers of 32 bits, NR combinational read ports and NW write
// ports. All writes take effect at the rising clock edge; a read in the
// same cycle returns the old value (the cluster forwards newer values
// around the file). When two ports write the same register in one cycle
// the higher-numbered port wins, so callers order ports from oldest to
// newest. The file is a plain array; every register, register 0 included,
// is writable. A synchronous active-low reset clears all registers.
//
// With NR = 2 and NW = 2 this is the four-port file of a single QCPX unit:
// two operand reads, one result write and one write from memory.
module qcpx_rf
  import qcpx_pkg::*;
#(
  parameter int unsigned NREGS = 32,
  parameter int unsigned NR    = 2,
  parameter int unsigned NW    = 2,
  localparam int unsigned AW   = $clog2(NREGS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NR-1:0][AW-1:0] raddr,
  output logic [NR-1:0][XLEN-1:0] rdata,
  input  logic [NW-1:0]         we,
  input  logic [NW-1:0][AW-1:0] waddr,
  input  logic [NW-1:0][XLEN-1:0] wdata
);

  logic [XLEN-1:0] regs [NREGS];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int w = 0; w < NW; w++)
        if (we[w] && int'(waddr[w]) < NREGS) regs[waddr[w]] <= wdata[w];
    end
  end

  always_comb begin
    for (int r = 0; r < NR; r++)
      rdata[r] = (int'(raddr[r]) < NREGS) ? regs[raddr[r]] : '0;
  end

endmodule
