// qcpx_acc_rf: register file of 128-bit color-packed accumulators.
//
// Holds NACC accumulators (one by default, as the extension describes a
// single 128-bit accumulator) with one combinational read port and one
// write port, the two ports of the accumulator register file. A write
// takes effect at the rising clock edge, so a read in the next cycle sees
// it; there is no write-to-read bypass within a cycle. A synchronous
// active-low reset clears every accumulator; ZACC clearing is done by
// writing zero through the write port.
module qcpx_acc_rf
  import qcpx_pkg::*;
#(
  parameter int unsigned NACC = 1,
  localparam int unsigned AW  = (NACC > 1) ? $clog2(NACC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] raddr,
  output acc_t          rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  acc_t          wdata
);

  acc_t acc_q [NACC];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NACC; i++) acc_q[i] <= '0;
    end else if (we && int'(waddr) < NACC) begin
      acc_q[waddr] <= wdata;
    end
  end

  always_comb begin
    rdata = '0;
    if (int'(raddr) < NACC) rdata = acc_q[raddr];
  end

endmodule
