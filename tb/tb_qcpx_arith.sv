// tb_qcpx_arith: self-checking test of the parallel arithmetic/logical group.
// Drives every op with biased random operands (field extremes included, so
// all saturation cases occur) plus directed cases from the average and
// broadcast figures, and compares with the reference model.
module tb_qcpx_arith;
  import qcpx_pkg::*;
  import qcpx_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  qcpx_op_t op;
  qword_t   a, b, y;
  int checks = 0, failures = 0;

  qcpx_arith dut (.op(op), .a(a), .b(b), .y(y));

  task automatic check(qcpx_op_t o, logic [31:0] x, logic [31:0] z, logic [31:0] exp);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (32'(y) !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h got %h exp %h", o.name(), x, z, y, exp);
    end
  endtask

  localparam qcpx_op_t OPS [10] = '{OP_ADD, OP_ADDS, OP_ADDUS, OP_SUB, OP_SUBS,
                                    OP_SUBUS, OP_AVG, OP_BCAST, OP_SLL, OP_SRL};

  initial begin
    // directed: average of Y 200 and 100 -> 150, Cb 15 and 1 -> 8, Cr 3 and 4 -> 3
    check(OP_AVG, pack6(200, 15, 3, 0, 0, 0), pack6(100, 1, 4, 0, 0, 0), pack6(150, 8, 3, 0, 0, 0));
    // unsigned saturation: 250 + 10 -> 255, 12 + 9 -> 15
    check(OP_ADDUS, pack6(250, 12, 0, 1, 1, 1), pack6(10, 9, 0, 1, 1, 1), pack6(255, 15, 0, 2, 2, 2));
    // signed saturation: 100 + 100 -> 127, Cb 7 + 1 -> 7, Cr -8 + -1 -> -8
    check(OP_ADDS, pack6(100, 7, 8, 0, 0, 0), pack6(100, 1, 15, 0, 0, 0), pack6(127, 7, 8, 0, 0, 0));
    // modulo wraps, no carry across fields
    check(OP_ADD, 32'hFFFF_FFFF, 32'h0001_0101, pack6(0, 0, 15, 0, 15, 15));
    check(OP_SUBUS, pack6(5, 2, 9, 0, 0, 0), pack6(9, 3, 4, 0, 0, 0), pack6(0, 0, 5, 0, 0, 0));
    // broadcast of the low byte
    check(OP_BCAST, 32'h0000_00A7, 32'h0, pack6(8'hA7, 7, 7, 8'hA7, 7, 7));
    check(OP_SLL, pack6(8'h81, 4'h9, 4'h3, 0, 0, 0), 32'd1, pack6(8'h02, 4'h2, 4'h6, 0, 0, 0));
    check(OP_SRL, pack6(8'h81, 4'h9, 4'h3, 0, 0, 0), 32'd5, pack6(8'h04, 0, 0, 0, 0, 0));
    for (int i = 0; i < 3000; i++) begin
      qcpx_op_t o;
      logic [31:0] x, z;
      o = OPS[$urandom_range(9)];
      x = rand_word();
      z = rand_word();
      if (o inside {OP_SLL, OP_SRL}) z = 32'($urandom_range(9));
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
