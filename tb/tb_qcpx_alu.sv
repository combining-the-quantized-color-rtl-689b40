// tb_qcpx_alu: self-checking test of one QCPX ALU: every arithmetic,
// logical and compare op on biased random operands against the reference
// model, and zero for ops the ALU does not execute.
module tb_qcpx_alu;
  import qcpx_pkg::*;
  import qcpx_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  qcpx_op_t op;
  qword_t   a, b, y;
  int checks = 0, failures = 0;

  qcpx_alu dut (.op(op), .a(a), .b(b), .y(y));

  initial begin
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] x, z, exp;
      op = qcpx_op_t'($urandom_range(int'(OP_RACC)));
      x = rand_word();
      z = rand_word();
      if (op inside {OP_SLL, OP_SRL}) z = 32'($urandom_range(9));
      a = x; b = z;
      exp = is_alu_op(op) ? ref_exec(op, x, z) : 32'd0;
      #1;
      checks++;
      if (32'(y) !== exp) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h got %h exp %h", op.name(), x, z, y, exp);
      end
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
