// qcpx_mult_fu: the QCPX MULT function unit.
//
// Executes OP_MUL and OP_DIV (qcpx_muldiv) and the special-purpose
// instructions OP_MACC, OP_ADACC, OP_ZACC and OP_RACC (qcpx_special) on the
// accumulator register file it owns (qcpx_acc_rf). The processor the
// extension was evaluated on has one such unit, so all accumulator traffic
// goes through it and no two instructions ever update an accumulator in
// the same cycle.
//
// Timing: the register result y is combinational from the operands and the
// current accumulator. An accumulating instruction issued in cycle t
// (valid high) updates the accumulator at the end of cycle t, so one may be
// issued every cycle and an OP_RACC in cycle t+1 reads the new sum.
module qcpx_mult_fu
  import qcpx_pkg::*;
#(
  parameter int unsigned NACC = 1,
  localparam int unsigned AW  = (NACC > 1) ? $clog2(NACC) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          valid,
  input  qcpx_op_t      op,
  input  logic [2:0]    sel,
  input  logic [AW-1:0] acc_idx,
  input  qword_t        a,
  input  qword_t        b,
  output qword_t        y
);

  acc_t        acc_cur, acc_nxt;
  logic        acc_we;
  logic [31:0] racc;
  qword_t      y_md;

  qcpx_acc_rf #(.NACC(NACC)) u_acc (
    .clk   (clk),
    .rst_n (rst_n),
    .raddr (acc_idx),
    .rdata (acc_cur),
    .we    (valid && acc_we),
    .waddr (acc_idx),
    .wdata (acc_nxt)
  );

  qcpx_special u_sp (
    .op      (op),
    .a       (a),
    .b       (b),
    .sel     (sel),
    .acc_in  (acc_cur),
    .acc_we  (acc_we),
    .acc_out (acc_nxt),
    .rd      (racc)
  );

  qcpx_muldiv u_md (.op(op), .a(a), .b(b), .y(y_md));

  always_comb begin
    if (op == OP_RACC) y = qword_t'(racc);
    else               y = y_md;
  end

endmodule
