// tb_qcpx_wl_vmf: the vector-median-filter workload on the QCPX cluster. For
// each 3x3 window the L1 distance sum of every pixel to the others is
// accumulated with ADACC (two windows at once), read out with RACC, and the
// pixel with the smallest sum is selected; every distance and selection is
// compared with an integer reference over a 176x144 image.
module tb_qcpx_wl_vmf;
  import qcpx_pkg::*;
  import qcpx_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  qcpx_instr_t [3:0]   alu_instr;
  qcpx_instr_t         mul_instr;
  logic                ld_valid;
  logic [4:0]          ld_rd;
  logic [31:0]         ld_data;
  logic [4:0]          wb_valid;
  logic [4:0][4:0]     wb_rd;
  logic [4:0][31:0]    wb_data;
  logic [4:0][1:0]     fwd_hit;

  qcpx_unit dut (.clk(clk), .rst_n(rst_n), .alu_instr(alu_instr), .mul_instr(mul_instr),
                 .ld_valid(ld_valid), .ld_rd(ld_rd), .ld_data(ld_data),
                 .wb_valid(wb_valid), .wb_rd(wb_rd), .wb_data(wb_data), .fwd_hit(fwd_hit));

  int checks = 0, failures = 0;
  longint n_cycles = 0, n_instr = 0, t_start = 0;

  function automatic qcpx_instr_t mk(qcpx_op_t op, int rd, int rs1, int rs2, int sel = 0);
    qcpx_instr_t i;
    i = '0;
    i.valid = (op != OP_NOP);
    i.op = op;
    i.rd = 5'(rd); i.rs1 = 5'(rs1); i.rs2 = 5'(rs2); i.sel = 3'(sel);
    return i;
  endfunction

  // one issue cycle; on return the group's results are on wb_*
  task automatic cycle(qcpx_instr_t s [5], logic dl = 1'b0, int lr = 0, logic [31:0] ld = '0);
    for (int l = 0; l < 4; l++) alu_instr[l] = s[l];
    mul_instr = s[4];
    ld_valid = dl; ld_rd = 5'(lr); ld_data = ld;
    n_cycles++;
    for (int l = 0; l < 5; l++) if (s[l].valid) n_instr++;
    @(negedge clk);
    for (int l = 0; l < 4; l++) alu_instr[l] = mk(OP_NOP, 0, 0, 0);
    mul_instr = mk(OP_NOP, 0, 0, 0);
    ld_valid = 1'b0;
  endtask

  // one instruction in its unit's slot, result returned
  task automatic op1(qcpx_op_t op, int rd, int rs1, int rs2, int sel, output logic [31:0] r);
    qcpx_instr_t s [5];
    int l;
    for (int k = 0; k < 5; k++) s[k] = mk(OP_NOP, 0, 0, 0);
    l = is_mul_op(op) ? 4 : 0;
    s[l] = mk(op, rd, rs1, rs2, sel);
    cycle(s);
    r = wb_data[l];
  endtask

  task automatic load(int r, logic [31:0] d);
    qcpx_instr_t s [5];
    for (int k = 0; k < 5; k++) s[k] = mk(OP_NOP, 0, 0, 0);
    cycle(s, 1'b1, r, d);
  endtask

  task automatic expect_eq(longint got, longint exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic start();
    rst_n = 0;
    alu_instr = '{default: mk(OP_NOP, 0, 0, 0)};
    mul_instr = mk(OP_NOP, 0, 0, 0);
    ld_valid = 0; ld_rd = 0; ld_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    t_start = $time;
  endtask

  // the cluster never stalls: one issue cycle per clock
  task automatic finish_run(string name);
    expect_eq(($time - t_start) / 10, n_cycles, "clock cycles equal issue cycles");
    $display("%s: %0d instructions in %0d cycles", name, n_instr, n_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // one instruction while the load port fills another register
  task automatic op1l(qcpx_op_t op, int rd, int rs1, int rs2, int sel,
                      int lr, logic [31:0] ld, output logic [31:0] r);
    qcpx_instr_t s [5];
    int l;
    for (int k = 0; k < 5; k++) s[k] = mk(OP_NOP, 0, 0, 0);
    l = is_mul_op(op) ? 4 : 0;
    s[l] = mk(op, rd, rs1, rs2, sel);
    cycle(s, 1'b1, lr, ld);
    r = wb_data[l];
  endtask

  function automatic int sx(logic [31:0] r);
    return int'(signed'(r));
  endfunction

  // image of W x H pixels; word (x, y) packs window A at column x and
  // window B at column x + W/2
  localparam int W = 176, H = 144, HW = W / 2;
  int py [H][W], pcb [H][W], pcr [H][W];

  function automatic logic [31:0] word(int x, int y);
    return pack6(py[y][x], pcb[y][x], pcr[y][x], py[y][x + HW], pcb[y][x + HW], pcr[y][x + HW]);
  endfunction

  // L1 distance of pixel j to all pixels of the window, window w (0 = A, 1 = B)
  function automatic int l1sum(int x, int y, int j, int w);
    int s;
    logic [31:0] a, b;
    s = 0;
    a = word(x + j % 3 - 1, y + j / 3 - 1);
    for (int i = 0; i < 9; i++) begin
      b = word(x + i % 3 - 1, y + i / 3 - 1);
      for (int k = 3 * w; k < 3 * w + 3; k++)
        s += (getf(a, k) > getf(b, k)) ? getf(a, k) - getf(b, k) : getf(b, k) - getf(a, k);
    end
    return s;
  endfunction

  initial begin
    logic [31:0] r;
    int d [2], best [2], bestd [2], gbest [2], gbestd [2];
    start();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        py[y][x] = $urandom_range(255); pcb[y][x] = $urandom_range(15); pcr[y][x] = $urandom_range(15);
      end
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < HW - 1; x++) begin
        for (int i = 0; i < 9; i++) load(i, word(x + i % 3 - 1, y + i / 3 - 1));
        bestd = '{32'h7fffffff, 32'h7fffffff};
        best = '{0, 0};
        for (int j = 0; j < 9; j++) begin
          op1(OP_ZACC, 0, 0, 0, 0, r);
          for (int i = 0; i < 9; i++) if (i != j) op1(OP_ADACC, 0, j, i, 0, r);
          d = '{0, 0};
          for (int k = 0; k < 6; k++) begin
            op1(OP_RACC, 10, 0, 0, k, r);
            d[k / 3] += sx(r);
          end
          for (int w = 0; w < 2; w++) begin
            expect_eq(d[w], l1sum(x, y, j, w), "L1 distance sum");
            if (d[w] < bestd[w]) begin bestd[w] = d[w]; best[w] = j; end
          end
        end
        // reference selection, computed without the cluster
        gbestd = '{32'h7fffffff, 32'h7fffffff};
        gbest = '{0, 0};
        for (int j = 0; j < 9; j++)
          for (int w = 0; w < 2; w++)
            if (l1sum(x, y, j, w) < gbestd[w]) begin gbestd[w] = l1sum(x, y, j, w); gbest[w] = j; end
        expect_eq(best[0], gbest[0], "vector median A");
        expect_eq(best[1], gbest[1], "vector median B");
      end
    finish_run("VMF");
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
