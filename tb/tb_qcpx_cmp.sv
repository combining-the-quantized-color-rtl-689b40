// tb_qcpx_cmp: self-checking test of the parallel compare group. Random
// operands, many with equal fields so that every mask outcome occurs, plus
// directed MIN/MAX cases, compared with the reference model.
module tb_qcpx_cmp;
  import qcpx_pkg::*;
  import qcpx_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  qcpx_op_t op;
  qword_t   a, b, y;
  int checks = 0, failures = 0;

  qcpx_cmp dut (.op(op), .a(a), .b(b), .y(y));

  task automatic check(qcpx_op_t o, logic [31:0] x, logic [31:0] z, logic [31:0] exp);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (32'(y) !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got %h exp %h", o.name(), x, z, y, exp);
    end
  endtask

  localparam qcpx_op_t OPS [5] = '{OP_CMPEQ, OP_CMPGT, OP_CMPLT, OP_MIN, OP_MAX};

  initial begin
    // each field picks independently: Y from a, Cb from b, Cr equal
    check(OP_MIN, pack6(10, 9, 4, 255, 0, 15), pack6(20, 3, 4, 254, 1, 14), pack6(10, 3, 4, 254, 0, 14));
    check(OP_MAX, pack6(10, 9, 4, 255, 0, 15), pack6(20, 3, 4, 254, 1, 14), pack6(20, 9, 4, 255, 1, 15));
    check(OP_CMPGT, pack6(10, 9, 4, 255, 0, 15), pack6(20, 3, 4, 254, 1, 14), pack6(0, 15, 0, 255, 0, 15));
    check(OP_CMPEQ, pack6(10, 9, 4, 255, 0, 15), pack6(20, 3, 4, 254, 1, 14), pack6(0, 0, 15, 0, 0, 0));
    check(OP_CMPLT, pack6(10, 9, 4, 255, 0, 15), pack6(20, 3, 4, 254, 1, 14), pack6(255, 0, 0, 0, 15, 0));
    for (int i = 0; i < 3000; i++) begin
      qcpx_op_t o;
      logic [31:0] x, z;
      o = OPS[$urandom_range(4)];
      x = rand_word();
      z = rand_word();
      for (int k = 0; k < 6; k++)
        if ($urandom_range(2) == 0) z = putf(z, k, getf(x, k));
      check(o, x, z, ref_exec(o, x, z));
    end
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
