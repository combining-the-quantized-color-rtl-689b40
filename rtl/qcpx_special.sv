// qcpx_special: datapath of the special-purpose QCPX instructions, which
// work on the 128-bit color-packed accumulator.
//
//   OP_MACC   acc.f += a.f * b.f for each of the six fields f; a.f is read
//             as an unsigned pixel value and b.f as a signed (two's
//             complement) coefficient, as in a broadcast filter or DCT
//             coefficient
//   OP_ADACC  acc.f += |a.f - b.f|, both unsigned
//   OP_ZACC   acc = 0
//   OP_RACC   rd = accumulator field number sel (0 Y0, 1 Cb0, 2 Cr0, 3 Y1,
//             4 Cb1, 5 Cr1), sign-extended to 32 bits; other sel give 0
// The first three follow the extension; the coefficient signedness and the
// RACC read-out instruction, which moves a sum to a general register, are
// this design's choices. Sums wrap within their field width (24 bits for Y,
// 20 for Cb and Cr).
//
// Purely combinational: acc_in is the current accumulator, acc_we/acc_out
// the value to write at the next clock edge, rd the register result.
module qcpx_special
  import qcpx_pkg::*;
(
  input  qcpx_op_t    op,
  input  qword_t      a,
  input  qword_t      b,
  input  logic [2:0]  sel,
  input  acc_t        acc_in,
  output logic        acc_we,
  output acc_t        acc_out,
  output logic [31:0] rd
);

  // the term one instruction adds to one accumulator field
  function automatic int term(qcpx_op_t o, logic [7:0] fa, logic [7:0] fb,
                              int unsigned w);
    case (o)
      OP_MACC:  return uval(fa, w) * sext(fb, w);
      OP_ADACC: return uval(f_absdiff(fa, fb, w), 8);
      default:  return 0;
    endcase
  endfunction

  always_comb begin
    acc_we  = op inside {OP_MACC, OP_ADACC, OP_ZACC};
    acc_out = '0;
    if (op != OP_ZACC) begin
      for (int p = 0; p < NPIX; p++) begin
        acc_out[p].y  = acc_in[p].y  + ACC_Y_W'(term(op, a[p].y, b[p].y, Y_W));
        acc_out[p].cb = acc_in[p].cb + ACC_C_W'(term(op, 8'(a[p].cb), 8'(b[p].cb), C_W));
        acc_out[p].cr = acc_in[p].cr + ACC_C_W'(term(op, 8'(a[p].cr), 8'(b[p].cr), C_W));
      end
    end
  end

  always_comb begin
    rd = '0;
    if (op == OP_RACC) begin
      case (sel)
        3'd0:    rd = 32'(acc_in[0].y);
        3'd1:    rd = 32'(acc_in[0].cb);
        3'd2:    rd = 32'(acc_in[0].cr);
        3'd3:    rd = 32'(acc_in[1].y);
        3'd4:    rd = 32'(acc_in[1].cb);
        3'd5:    rd = 32'(acc_in[1].cr);
        default: rd = '0;
      endcase
    end
  end

endmodule
