// tb_qcpx_muldiv: self-checking test of the field-wise multiply and divide,
// zero divisors included, against the reference model.
module tb_qcpx_muldiv;
  import qcpx_pkg::*;
  import qcpx_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  qcpx_op_t op;
  qword_t   a, b, y;
  int checks = 0, failures = 0, zdiv = 0;

  qcpx_muldiv dut (.op(op), .a(a), .b(b), .y(y));

  task automatic check(qcpx_op_t o, logic [31:0] x, logic [31:0] z, logic [31:0] exp);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (32'(y) !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got %h exp %h", o.name(), x, z, y, exp);
    end
  endtask

  initial begin
    // 20 * 13 = 260 -> low byte 4; Cb 3 * 5 = 15; Cr 7 * 3 = 21 -> 5
    check(OP_MUL, pack6(20, 3, 7, 1, 0, 2), pack6(13, 5, 3, 9, 9, 2), pack6(4, 15, 5, 9, 0, 4));
    // 200 / 7 = 28, Cb 15 / 4 = 3, Cr x / 0 = 15, Y1 x / 0 = 255
    check(OP_DIV, pack6(200, 15, 9, 17, 8, 1), pack6(7, 4, 0, 0, 2, 3), pack6(28, 3, 15, 255, 4, 0));
    for (int i = 0; i < 3000; i++) begin
      qcpx_op_t o;
      logic [31:0] x, z;
      o = ($urandom_range(1) == 0) ? OP_MUL : OP_DIV;
      x = rand_word();
      z = rand_word();
      for (int k = 0; k < 6; k++) if (getf(z, k) == 0) zdiv++;
      check(o, x, z, ref_exec(o, x, z));
    end
    check(OP_ADD, 32'hFFFF_FFFF, 32'hFFFF_FFFF, 32'd0);
    if (zdiv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
