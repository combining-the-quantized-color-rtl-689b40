// tb_qcpx_wl_smf: the scalar-median-filter workload on the QCPX cluster. The
// median of each 3x3 window is found separately for Y, Cb and Cr by a
// 19-step compare-exchange network of MIN/MAX pairs, two windows per word
// and two compare-exchanges (four ALUs) per cycle where independent, over a
// 176x144 image with impulse noise, and compared with a sorted reference.
module tb_qcpx_wl_smf;
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
  int n_dual = 0;   // cycles with two compare-exchanges (four ALU ops)

  function automatic logic [31:0] word(int x, int y);
    return pack6(py[y][x], pcb[y][x], pcr[y][x], py[y][x + HW], pcb[y][x + HW], pcr[y][x + HW]);
  endfunction

  // 19 compare-exchanges that leave the median of 9 values in element 4
  localparam int NET [19][2] = '{'{1,2}, '{4,5}, '{7,8}, '{0,1}, '{3,4}, '{6,7}, '{1,2}, '{4,5},
                                 '{7,8}, '{0,3}, '{5,8}, '{4,7}, '{3,6}, '{1,4}, '{2,5}, '{4,7},
                                 '{4,2}, '{6,4}, '{4,2}};

  function automatic int median9(int v [9]);
    int t [9];
    int tmp;
    t = v;
    for (int i = 0; i < 9; i++)
      for (int j = 0; j < 8 - i; j++)
        if (t[j] > t[j + 1]) begin tmp = t[j]; t[j] = t[j + 1]; t[j + 1] = tmp; end
    return t[4];
  endfunction

  initial begin
    logic [31:0] r;
    int map [9];
    int freeq [$];
    int e;
    start();
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        py[y][x] = $urandom_range(255); pcb[y][x] = $urandom_range(15); pcr[y][x] = $urandom_range(15);
        if ($urandom_range(9) == 0) py[y][x] = 255;    // impulse noise
      end
    for (int y = 1; y < H - 1; y++)
      for (int x = 1; x < HW - 1; x++) begin
        for (int i = 0; i < 9; i++) begin
          load(i, word(x + i % 3 - 1, y + i / 3 - 1));
          map[i] = i;
        end
        freeq.delete();
        for (int q = 9; q < 32; q++) freeq.push_back(q);
        // compare-exchange: MIN to a fresh register for the lower element,
        // MAX to another for the upper; two independent ones per cycle
        e = 0;
        while (e < 19) begin
          qcpx_instr_t s [5];
          int n, used [4], rel [$];
          for (int k = 0; k < 5; k++) s[k] = mk(OP_NOP, 0, 0, 0);
          n = 0;
          rel.delete();
          while (e < 19 && n < 2 &&
                 (n == 0 || !(NET[e][0] inside {used[0], used[1]}) && !(NET[e][1] inside {used[0], used[1]}))) begin
            int lo, hi;
            lo = freeq.pop_front(); hi = freeq.pop_front();
            s[2 * n]     = mk(OP_MIN, lo, map[NET[e][0]], map[NET[e][1]]);
            s[2 * n + 1] = mk(OP_MAX, hi, map[NET[e][0]], map[NET[e][1]]);
            rel.push_back(map[NET[e][0]]); rel.push_back(map[NET[e][1]]);
            map[NET[e][0]] = lo; map[NET[e][1]] = hi;
            used[2 * n] = NET[e][0]; used[2 * n + 1] = NET[e][1];
            n++; e++;
          end
          if (n == 2) n_dual++;
          cycle(s);
          foreach (rel[i]) freeq.push_back(rel[i]);
        end
        op1(OP_MAX, map[4], map[4], map[4], 0, r);
        for (int k = 0; k < 6; k++) begin
          int v [9];
          for (int i = 0; i < 9; i++) v[i] = getf(word(x + i % 3 - 1, y + i / 3 - 1), k);
          expect_eq(getf(r, k), median9(v), "median");
        end
      end
    expect_eq(n_dual > 0, 1, "four ALU ops in one cycle");
    finish_run("SMF");
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
