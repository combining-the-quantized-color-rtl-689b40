// qcpx_ref_pkg: reference model of the QCPX instructions for testbenches.
//
// Written independently of the RTL: a 32-bit word is handled as six
// numbered fields k = 0..5 (Y0, Cb0, Cr0, Y1, Cb1, Cr1) cut out with shifts
// and masks, and every result is worked out with plain integers. The
// accumulator is modelled as six integers that wrap at 24 bits (Y) or
// 20 bits (Cb, Cr).
package qcpx_ref_pkg;
  import qcpx_pkg::*;

  function automatic int fofs(int k);
    case (k % 3) 0: return 16 * (k / 3); 1: return 16 * (k / 3) + 8; default: return 16 * (k / 3) + 12; endcase
  endfunction
  function automatic int fwid(int k);
    return (k % 3 == 0) ? 8 : 4;
  endfunction
  function automatic int getf(logic [31:0] w, int k);
    return int'((w >> fofs(k)) & ((32'd1 << fwid(k)) - 1));
  endfunction
  function automatic logic [31:0] putf(logic [31:0] w, int k, int v);
    logic [31:0] m;
    m = ((32'd1 << fwid(k)) - 1) << fofs(k);
    return (w & ~m) | ((32'(v) << fofs(k)) & m);
  endfunction
  function automatic int tosigned(int v, int n);
    return (v >= (1 << (n - 1))) ? v - (1 << n) : v;
  endfunction

  // register result of one instruction (not for accumulator ops)
  function automatic logic [31:0] ref_exec(qcpx_op_t op, logic [31:0] a, logic [31:0] b);
    logic [31:0] r;
    int n, x, y, v, lo, hi, maxu;
    r = '0;
    for (int k = 0; k < 6; k++) begin
      n = fwid(k);
      x = getf(a, k);
      y = getf(b, k);
      maxu = (1 << n) - 1;
      lo = -(1 << (n - 1));
      hi = (1 << (n - 1)) - 1;
      case (op)
        OP_ADD:   v = (x + y) % (1 << n);
        OP_ADDUS: v = (x + y > maxu) ? maxu : x + y;
        OP_ADDS: begin
          v = tosigned(x, n) + tosigned(y, n);
          if (v > hi) v = hi;
          if (v < lo) v = lo;
        end
        OP_SUB:   v = (x - y + (1 << n)) % (1 << n);
        OP_SUBUS: v = (x < y) ? 0 : x - y;
        OP_SUBS: begin
          v = tosigned(x, n) - tosigned(y, n);
          if (v > hi) v = hi;
          if (v < lo) v = lo;
        end
        OP_AVG:   v = (x + y) / 2;
        OP_BCAST: v = int'(a[7:0]) % (1 << n);
        OP_SLL:   v = (int'(b[3:0]) >= n) ? 0 : (x * (1 << int'(b[3:0]))) % (1 << n);
        OP_SRL:   v = (int'(b[3:0]) >= n) ? 0 : x / (1 << int'(b[3:0]));
        OP_CMPEQ: v = (x == y) ? maxu : 0;
        OP_CMPGT: v = (x > y) ? maxu : 0;
        OP_CMPLT: v = (x < y) ? maxu : 0;
        OP_MIN:   v = (x < y) ? x : y;
        OP_MAX:   v = (x > y) ? x : y;
        OP_MUL:   v = (x * y) % (1 << n);
        OP_DIV:   v = (y == 0) ? maxu : x / y;
        default:  v = 0;
      endcase
      r = putf(r, k, v & maxu);
    end
    return r;
  endfunction

  // accumulator as six wrapped integers, field k in acc[k]
  typedef logic [5:0][31:0] acc6_t;

  function automatic int accwrap(int v, int k);
    int n;
    n = (k % 3 == 0) ? 24 : 20;
    v = v % (1 << n);
    if (v < 0) v += (1 << n);
    return tosigned(v, n);
  endfunction

  function automatic acc6_t ref_acc(qcpx_op_t op, logic [31:0] a, logic [31:0] b, acc6_t acc);
    for (int k = 0; k < 6; k++) begin
      case (op)
        OP_ZACC:  acc[k] = 0;
        OP_MACC:  acc[k] = accwrap(int'(acc[k]) + getf(a, k) * tosigned(getf(b, k), fwid(k)), k);
        OP_ADACC: acc[k] = accwrap(int'(acc[k]) + ((getf(a, k) > getf(b, k)) ?
                                   getf(a, k) - getf(b, k) : getf(b, k) - getf(a, k)), k);
        default: ;
      endcase
    end
    return acc;
  endfunction

  function automatic logic [31:0] ref_racc(acc6_t acc, int sel);
    return (sel < 6) ? 32'(acc[sel]) : 32'd0;
  endfunction

  // pack six field values into a word
  function automatic logic [31:0] pack6(int y0, int cb0, int cr0, int y1, int cb1, int cr1);
    logic [31:0] w;
    w = '0;
    w = putf(w, 0, y0); w = putf(w, 1, cb0); w = putf(w, 2, cr0);
    w = putf(w, 3, y1); w = putf(w, 4, cb1); w = putf(w, 5, cr1);
    return w;
  endfunction

  // random word with a bias toward field extremes, to reach saturation
  function automatic logic [31:0] rand_word();
    logic [31:0] w;
    w = $urandom;
    if ($urandom_range(3) == 0) begin
      for (int k = 0; k < 6; k++)
        case ($urandom_range(3))
          0: w = putf(w, k, 0);
          1: w = putf(w, k, (1 << fwid(k)) - 1);
          2: w = putf(w, k, 1 << (fwid(k) - 1));
          default: ;
        endcase
    end
    return w;
  endfunction
endpackage
