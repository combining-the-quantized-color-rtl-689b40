// qcpx_pkg: shared types, opcodes and per-field arithmetic for the
// Quantized Color Pack eXtension (QCPX).
//
// A 32-bit QCPX word packs two quantized YCbCr pixels of 16 bits each:
//
//   31   28 27   24 23       16 15   12 11    8 7        0
//   | Cr1  |  Cb1  |    Y1     |  Cr0  |  Cb0  |    Y0    |
//
// Y is 8 bits, Cb and Cr are 4 bits each, as the extension defines. The
// 128-bit color-packed accumulator holds one signed sum per component of
// each pixel. How the 128 bits are split between the six sums is this
// design's choice: 24 bits for each Y sum and 20 bits for each Cb and Cr
// sum (2 x (24 + 20 + 20) = 128), enough for a 16x16 block of absolute
// differences of 8-bit values (at most 65,280).
//
// The field functions work on an 8-bit container and a field width of 8
// (Y) or 4 (Cb, Cr); bits above the field width are ignored on input and
// zero on output.
package qcpx_pkg;

  localparam int unsigned XLEN    = 32;  // datapath word
  localparam int unsigned NPIX    = 2;   // pixels per word
  localparam int unsigned Y_W     = 8;
  localparam int unsigned C_W     = 4;
  localparam int unsigned ACC_Y_W = 24;
  localparam int unsigned ACC_C_W = 20;

  typedef struct packed {
    logic [C_W-1:0] cr;
    logic [C_W-1:0] cb;
    logic [Y_W-1:0] y;
  } ycc_t;

  // pixel 0 in bits 15:0, pixel 1 in bits 31:16
  typedef ycc_t [NPIX-1:0] qword_t;

  typedef struct packed {
    logic signed [ACC_C_W-1:0] cr;
    logic signed [ACC_C_W-1:0] cb;
    logic signed [ACC_Y_W-1:0] y;
  } acc_pix_t;

  typedef acc_pix_t [NPIX-1:0] acc_t;

  typedef enum logic [4:0] {
    OP_NOP    = 5'd0,
    // parallel arithmetic and logical group
    OP_ADD    = 5'd1,   // modulo
    OP_ADDS   = 5'd2,   // signed saturation
    OP_ADDUS  = 5'd3,   // unsigned saturation
    OP_SUB    = 5'd4,
    OP_SUBS   = 5'd5,
    OP_SUBUS  = 5'd6,
    OP_AVG    = 5'd7,
    OP_BCAST  = 5'd8,
    OP_SLL    = 5'd9,
    OP_SRL    = 5'd10,
    // parallel compare group
    OP_CMPEQ  = 5'd11,
    OP_CMPGT  = 5'd12,
    OP_CMPLT  = 5'd13,
    OP_MIN    = 5'd14,
    OP_MAX    = 5'd15,
    // multiply/divide (executed by the MULT unit)
    OP_MUL    = 5'd16,
    OP_DIV    = 5'd17,
    // special-purpose group (accumulator)
    OP_MACC   = 5'd18,
    OP_ADACC  = 5'd19,
    OP_ZACC   = 5'd20,
    OP_RACC   = 5'd21
  } qcpx_op_t;

  // One issue slot. sel picks the accumulator field read by OP_RACC
  // (0 Y0, 1 Cb0, 2 Cr0, 3 Y1, 4 Cb1, 5 Cr1); acc picks the accumulator.
  typedef struct packed {
    logic           valid;
    qcpx_op_t       op;
    logic [4:0]     rd;
    logic [4:0]     rs1;
    logic [4:0]     rs2;
    logic [2:0]     sel;
    logic [1:0]     acc;
  } qcpx_instr_t;

  function automatic logic is_alu_op(qcpx_op_t op);
    return op inside {[OP_ADD:OP_MAX]};
  endfunction

  function automatic logic is_mul_op(qcpx_op_t op);
    return op inside {[OP_MUL:OP_RACC]};
  endfunction

  // does the op write a general register?
  function automatic logic writes_rd(qcpx_op_t op);
    return op inside {[OP_ADD:OP_DIV], OP_RACC};
  endfunction

  // ---------------------------------------------------------------
  // per-field helpers; w is 8 or 4
  // ---------------------------------------------------------------
  function automatic logic [7:0] fmask(int unsigned w);
    return (w >= 8) ? 8'hFF : 8'((1 << w) - 1);
  endfunction

  // unsigned value of a field
  function automatic int uval(logic [7:0] v, int unsigned w);
    logic [7:0] m;
    m = v & fmask(w);
    return int'({24'd0, m});
  endfunction

  // two's complement value of a field
  function automatic int sext(logic [7:0] v, int unsigned w);
    int u;
    u = uval(v, w);
    return (u >= (1 << (w - 1))) ? u - (1 << w) : u;
  endfunction

  function automatic int clamp(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // op: OP_ADD, OP_ADDS, OP_ADDUS, OP_SUB, OP_SUBS, OP_SUBUS
  function automatic logic [7:0] f_addsub(qcpx_op_t op, logic [7:0] a,
                                          logic [7:0] b, int unsigned w);
    int ua, ub, sa, sb;
    logic [7:0] r;   // low byte of the result; fields are at most 8 bits
    ua = uval(a, w);
    ub = uval(b, w);
    sa = sext(a, w);
    sb = sext(b, w);
    case (op)
      OP_ADDS:  r = 8'(clamp(sa + sb, -(1 << (w - 1)), (1 << (w - 1)) - 1));
      OP_ADDUS: r = 8'(clamp(ua + ub, 0, (1 << w) - 1));
      OP_SUB:   r = 8'(ua - ub);
      OP_SUBS:  r = 8'(clamp(sa - sb, -(1 << (w - 1)), (1 << (w - 1)) - 1));
      OP_SUBUS: r = 8'(clamp(ua - ub, 0, (1 << w) - 1));
      default:  r = 8'(ua + ub);
    endcase
    return r & fmask(w);
  endfunction

  function automatic logic [7:0] f_avg(logic [7:0] a, logic [7:0] b, int unsigned w);
    return 8'((uval(a, w) + uval(b, w)) >> 1);
  endfunction

  // logical shift of one field; amounts of w or more give zero
  function automatic logic [7:0] f_shift(logic left, logic [7:0] a,
                                         logic [3:0] sh, int unsigned w);
    logic [7:0] r;
    if (int'(sh) >= int'(w)) r = '0;
    else if (left)           r = (a << sh) & fmask(w);
    else                     r = (a & fmask(w)) >> sh;
    return r;
  endfunction

  // low w bits of the unsigned product (truncating multiply)
  function automatic logic [7:0] f_mul(logic [7:0] a, logic [7:0] b, int unsigned w);
    return 8'(uval(a, w) * uval(b, w)) & fmask(w);
  endfunction

  // unsigned quotient; a zero divisor gives all ones
  function automatic logic [7:0] f_div(logic [7:0] a, logic [7:0] b, int unsigned w);
    int ua, ub;
    ua = uval(a, w);
    ub = uval(b, w);
    return (ub == 0) ? fmask(w) : 8'(ua / ub);
  endfunction

  function automatic logic [7:0] f_absdiff(logic [7:0] a, logic [7:0] b, int unsigned w);
    int ua, ub;
    ua = uval(a, w);
    ub = uval(b, w);
    return 8'((ua > ub) ? ua - ub : ub - ua);
  endfunction

endpackage
