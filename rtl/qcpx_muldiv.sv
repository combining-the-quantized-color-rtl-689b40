// qcpx_muldiv: MULTIPLY_CRCBY and DIVIDE_CRCBY of QCPX.
//
// Multiplies or divides the six unsigned fields of two packed-pixel
// operands pairwise. OP_MUL keeps the low bits of each product in its field
// (a truncating multiply; full-precision products go through the
// accumulator with OP_MACC instead). OP_DIV gives the unsigned quotient,
// and all ones for a zero divisor. Which unit executes these ops follows the
// evaluated processor (one QCPX MULT unit); truncation, the zero-divisor
// value and single-cycle operation are this design's choices.
//
// Purely combinational; any other op gives zero.
module qcpx_muldiv
  import qcpx_pkg::*;
(
  input  qcpx_op_t op,
  input  qword_t   a,
  input  qword_t   b,
  output qword_t   y
);

  function automatic logic [7:0] field(qcpx_op_t o, logic [7:0] fa,
                                       logic [7:0] fb, int unsigned w);
    case (o)
      OP_MUL:  return f_mul(fa, fb, w);
      OP_DIV:  return f_div(fa, fb, w);
      default: return 8'h00;
    endcase
  endfunction

  always_comb begin
    for (int p = 0; p < NPIX; p++) begin
      y[p].y  = field(op, a[p].y, b[p].y, Y_W);
      y[p].cb = 4'(field(op, 8'(a[p].cb), 8'(b[p].cb), C_W));
      y[p].cr = 4'(field(op, 8'(a[p].cr), 8'(b[p].cr), C_W));
    end
  end

endmodule
