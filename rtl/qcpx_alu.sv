// qcpx_alu: one QCPX ALU function unit.
//
// Combines the arithmetic/logical group (qcpx_arith) and the compare group
// (qcpx_cmp) behind one result multiplexer, as one integer function unit
// that handles two packed YCbCr pixels in a single cycle. The cluster built
// around it carries four of these, matching the four QCPX ALUs of the
// evaluated processor. Ops outside the two groups give zero.
//
// Purely combinational; the caller registers the result.
module qcpx_alu
  import qcpx_pkg::*;
(
  input  qcpx_op_t op,
  input  qword_t   a,
  input  qword_t   b,
  output qword_t   y
);

  qword_t y_arith, y_cmp;

  qcpx_arith u_arith (.op(op), .a(a), .b(b), .y(y_arith));
  qcpx_cmp   u_cmp   (.op(op), .a(a), .b(b), .y(y_cmp));

  always_comb begin
    if (op inside {[OP_CMPEQ:OP_MAX]}) y = y_cmp;
    else                               y = y_arith;
  end

endmodule
