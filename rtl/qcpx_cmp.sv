// qcpx_cmp: the parallel compare group of QCPX.
//
// Compares the six fields of two packed-pixel operands pairwise, each field
// read as an unsigned value (8-bit Y, 4-bit Cb and Cr):
//   OP_CMPEQ / OP_CMPGT / OP_CMPLT  all ones in a field where a == b,
//                                   a > b or a < b holds, zeros elsewhere
//   OP_MIN / OP_MAX                 the smaller / larger field, chosen
//                                   independently for every field
// The operations and the mask form follow the QCPX definition; reading the
// fields as unsigned is this design's choice. Any other op gives zero.
//
// Purely combinational.
module qcpx_cmp
  import qcpx_pkg::*;
(
  input  qcpx_op_t op,
  input  qword_t   a,
  input  qword_t   b,
  output qword_t   y
);

  function automatic logic [7:0] field(qcpx_op_t o, logic [7:0] fa,
                                       logic [7:0] fb, int unsigned w);
    logic [7:0] ua, ub;
    ua = fa & fmask(w);
    ub = fb & fmask(w);
    case (o)
      OP_CMPEQ: return (ua == ub) ? fmask(w) : 8'h00;
      OP_CMPGT: return (ua >  ub) ? fmask(w) : 8'h00;
      OP_CMPLT: return (ua <  ub) ? fmask(w) : 8'h00;
      OP_MIN:   return (ua <  ub) ? ua : ub;
      OP_MAX:   return (ua >  ub) ? ua : ub;
      default:  return 8'h00;
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
