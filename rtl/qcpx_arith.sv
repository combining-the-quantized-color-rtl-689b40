// qcpx_arith: the parallel arithmetic and logical group of QCPX.
//
// Works on two packed YCbCr pixels per 32-bit operand, treating each of the
// six fields (8-bit Y, 4-bit Cb, 4-bit Cr of each pixel) independently, so
// no carry crosses a field boundary. Operations:
//   OP_ADD / OP_SUB        modulo (wrap within the field)
//   OP_ADDS / OP_SUBS      signed saturation (field read as two's complement)
//   OP_ADDUS / OP_SUBUS    unsigned saturation (clamp to 0 .. 2^w-1)
//   OP_AVG                 (a + b) / 2 per field, truncated
//   OP_BCAST               a[7:0] into every Y field, a[3:0] into every Cb/Cr field
//   OP_SLL / OP_SRL        logical shift of every field by b[3:0]
// The list of operations and the field layout follow the QCPX definition;
// the broadcast source bits, the shift amount taken from b[3:0] and the
// truncating average are this design's choices. Any other op gives zero.
//
// Purely combinational: the result is valid in the cycle the operands are.
module qcpx_arith
  import qcpx_pkg::*;
(
  input  qcpx_op_t op,
  input  qword_t   a,
  input  qword_t   b,
  output qword_t   y
);

  function automatic logic [7:0] field(qcpx_op_t o, logic [7:0] fa,
                                       logic [7:0] fb, logic [7:0] bc,
                                       logic [3:0] sh, int unsigned w);
    case (o)
      OP_ADD, OP_ADDS, OP_ADDUS,
      OP_SUB, OP_SUBS, OP_SUBUS: return f_addsub(o, fa, fb, w);
      OP_AVG:                    return f_avg(fa, fb, w);
      OP_BCAST:                  return bc & fmask(w);
      OP_SLL:                    return f_shift(1'b1, fa, sh, w);
      OP_SRL:                    return f_shift(1'b0, fa, sh, w);
      default:                   return '0;
    endcase
  endfunction

  logic [7:0] bsrc;
  logic [3:0] shamt;

  always_comb begin
    bsrc  = a[0].y;
    shamt = b[0].y[3:0];
    for (int p = 0; p < NPIX; p++) begin
      y[p].y  = field(op, a[p].y,         b[p].y,         bsrc, shamt, Y_W);
      y[p].cb = 4'(field(op, 8'(a[p].cb), 8'(b[p].cb), bsrc, shamt, C_W));
      y[p].cr = 4'(field(op, 8'(a[p].cr), 8'(b[p].cr), bsrc, shamt, C_W));
    end
  end

endmodule
