// tb_qcpx_special: self-checking test of the accumulator datapath. The
// testbench holds the accumulator itself (as the register file would) and
// applies random MACC, ADACC, ZACC and RACC instructions, checking the new
// accumulator, its write enable and the read-out against the reference
// model. Includes a directed case from the absolute-distance figure.
module tb_qcpx_special;
  import qcpx_pkg::*;
  import qcpx_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  qcpx_op_t    op;
  qword_t      a, b;
  logic [2:0]  sel;
  acc_t        acc_in, acc_out;
  logic        acc_we;
  logic [31:0] rd;
  int checks = 0, failures = 0;
  acc6_t m;

  qcpx_special dut (.op(op), .a(a), .b(b), .sel(sel), .acc_in(acc_in),
                    .acc_we(acc_we), .acc_out(acc_out), .rd(rd));

  function automatic acc_t to_acc(acc6_t v);
    acc_t r;
    r[0].y = 24'(v[0]); r[0].cb = 20'(v[1]); r[0].cr = 20'(v[2]);
    r[1].y = 24'(v[3]); r[1].cb = 20'(v[4]); r[1].cr = 20'(v[5]);
    return r;
  endfunction

  task automatic step(qcpx_op_t o, logic [31:0] x, logic [31:0] z, logic [2:0] s);
    acc_t expa;
    logic [31:0] exprd;
    logic expwe;
    op = o; a = x; b = z; sel = s; acc_in = to_acc(m);
    exprd = (o == OP_RACC) ? ref_racc(m, int'(s)) : 32'd0;
    expwe = o inside {OP_MACC, OP_ADACC, OP_ZACC};
    m = ref_acc(o, x, z, m);
    expa = to_acc(m);
    #1;
    checks++;
    if (acc_we !== expwe || (expwe && acc_out !== expa) || rd !== exprd) begin
      failures++;
      if (failures < 10) $display("FAIL %s we=%b acc=%h exp %h rd=%h exp %h",
                                  o.name(), acc_we, acc_out, expa, rd, exprd);
    end
  endtask

  localparam qcpx_op_t OPS [6] = '{OP_MACC, OP_ADACC, OP_ZACC, OP_RACC, OP_MUL, OP_ADD};

  initial begin
    m = '0;
    // |Y1-Y3|=|10-250|=240, |Cb1-Cb3|=|2-9|=7, |Cr1-Cr3|=0, pixel 1 likewise
    step(OP_ADACC, pack6(10, 2, 5, 255, 0, 15), pack6(250, 9, 5, 0, 15, 0), 0);
    checks++;
    if (m[0] != 240 || m[1] != 7 || m[2] != 0 || m[3] != 255 || m[4] != 15 || m[5] != 15) failures++;
    // coefficient -1 (0xFF / 0xF) times pixel values
    step(OP_MACC, pack6(3, 2, 1, 0, 0, 0), pack6(255, 15, 15, 0, 0, 0), 0);
    for (int s = 0; s < 8; s++) step(OP_RACC, 0, 0, 3'(s));
    step(OP_ZACC, 0, 0, 0);
    step(OP_RACC, 0, 0, 0);
    for (int i = 0; i < 4000; i++) begin
      qcpx_op_t o;
      o = OPS[($urandom_range(19) == 0) ? 2 : $urandom_range(5)];
      if (o == OP_ZACC && $urandom_range(1) == 0) o = OP_ADACC;
      step(o, rand_word(), rand_word(), 3'($urandom_range(7)));
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
