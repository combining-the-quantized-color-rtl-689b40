// qcpx_bypass: operand forwarding multiplexer.
//
// Returns, for source register addr, the newest value in flight: the
// highest-numbered forwarding source whose valid bit is set and whose
// destination equals addr, else the register file value rf_data. Sources
// are the results waiting in the write-back stage, ordered oldest first.
// hit reports that a forwarded value was used. Combinational.
module qcpx_bypass
  import qcpx_pkg::*;
#(
  parameter int unsigned NSRC = 2,
  parameter int unsigned AW   = 5
) (
  input  logic [AW-1:0]             addr,
  input  logic [XLEN-1:0]           rf_data,
  input  logic [NSRC-1:0]           fwd_valid,
  input  logic [NSRC-1:0][AW-1:0]   fwd_rd,
  input  logic [NSRC-1:0][XLEN-1:0] fwd_data,
  output logic [XLEN-1:0]           data,
  output logic                      hit
);

  always_comb begin
    data = rf_data;
    hit  = 1'b0;
    for (int s = 0; s < NSRC; s++) begin
      if (fwd_valid[s] && fwd_rd[s] == addr) begin
        data = fwd_data[s];
        hit  = 1'b1;
      end
    end
  end

endmodule
