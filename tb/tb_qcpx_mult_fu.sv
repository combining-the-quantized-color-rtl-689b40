// tb_qcpx_mult_fu: self-checking test of the MULT unit. Issues one random
// instruction per cycle (MUL, DIV, MACC, ADACC, ZACC, RACC, sometimes with
// valid low), checks each register result in its cycle and that an
// accumulating instruction is visible to a RACC in the next cycle, so that
// back-to-back accumulation runs at one instruction per cycle. Runs a long
// ADACC sequence (a 16x16 block) to check that Y sums pass 16 bits.
module tb_qcpx_mult_fu;
  import qcpx_pkg::*;
  import qcpx_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, valid;
  qcpx_op_t op;
  logic [2:0] sel;
  logic acc_idx;
  qword_t a, b, y;
  int checks = 0, failures = 0;
  acc6_t m;

  qcpx_mult_fu dut (.clk(clk), .rst_n(rst_n), .valid(valid), .op(op), .sel(sel),
                    .acc_idx(acc_idx), .a(a), .b(b), .y(y));

  task automatic issue(logic v, qcpx_op_t o, logic [31:0] x, logic [31:0] z, logic [2:0] s);
    logic [31:0] exp;
    @(negedge clk);
    valid = v; op = o; a = x; b = z; sel = s;
    exp = (o == OP_RACC) ? ref_racc(m, int'(s)) :
          (o inside {OP_MUL, OP_DIV}) ? ref_exec(o, x, z) : 32'd0;
    #1;
    checks++;
    if (32'(y) !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s sel=%0d got %h exp %h", o.name(), s, y, exp);
    end
    if (v) m = ref_acc(o, x, z, m);
  endtask

  localparam qcpx_op_t OPS [6] = '{OP_MUL, OP_DIV, OP_MACC, OP_ADACC, OP_ZACC, OP_RACC};

  initial begin
    rst_n = 0; valid = 0; op = OP_NOP; a = 0; b = 0; sel = 0; acc_idx = 0;
    m = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // 256 absolute differences of 255: 65,280 in each Y sum
    for (int i = 0; i < 128; i++) issue(1, OP_ADACC, 32'hFFFF_FFFF, 32'h0, 0);
    issue(1, OP_RACC, 0, 0, 0);
    checks++;
    if (m[0] != 128 * 255) failures++;
    issue(1, OP_RACC, 0, 0, 3);
    issue(1, OP_RACC, 0, 0, 4);
    for (int i = 0; i < 4000; i++) begin
      qcpx_op_t o;
      o = OPS[$urandom_range(5)];
      if (o == OP_ZACC && $urandom_range(3) != 0) o = OP_MACC;
      issue(($urandom_range(7) != 0), o, rand_word(), rand_word(), 3'($urandom_range(6)));
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
