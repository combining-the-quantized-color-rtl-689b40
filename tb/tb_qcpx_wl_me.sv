// tb_qcpx_wl_me: the motion-estimation workload on the QCPX cluster. Two
// adjacent 16x16 macroblocks are matched at once over displacements -15..+16
// by full search: each candidate costs 256 ADACC instructions, and the sums
// of absolute differences (Y + Cb + Cr) and the chosen motion vectors are
// compared with an integer reference and with the motion that was applied.
module tb_qcpx_wl_me;
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

  // Full-search block matching of 16x16 macroblocks, displacements -15..+16.
  // Two horizontally adjacent macroblocks are matched at once: the current
  // word packs a pixel of macroblock m (pixel 0) and the same pixel of
  // macroblock m + 1 (pixel 1); the candidate word packs the two displaced
  // pixels of the previous frame. The SAD adds |dY| + |dCb| + |dCr|.
  localparam int R = 15, RH = 16;  // search range -R .. +RH in both axes
  localparam int NMB = 2;          // macroblocks matched (one pair)
  localparam int W = 16 * NMB + R + RH, H = 16 + R + RH;
  int cy [H][W], ccb [H][W], ccr [H][W];   // current frame
  int qy [H][W], qcb [H][W], qcr [H][W];   // previous frame

  function automatic logic [31:0] cur_word(int x, int y);
    int X0, X1;
    X0 = R + x; X1 = R + 16 + x;
    return pack6(cy[R + y][X0], ccb[R + y][X0], ccr[R + y][X0], cy[R + y][X1], ccb[R + y][X1], ccr[R + y][X1]);
  endfunction
  function automatic logic [31:0] prev_word(int x, int y, int dx, int dy);
    int X0, X1, Y;
    X0 = R + x + dx; X1 = R + 16 + x + dx; Y = R + y + dy;
    return pack6(qy[Y][X0], qcb[Y][X0], qcr[Y][X0], qy[Y][X1], qcb[Y][X1], qcr[Y][X1]);
  endfunction

  initial begin
    logic [31:0] r;
    int sad [2], best [2][2], bestd [2], g [2], gb [2][2], gbd [2];
    int mvx, mvy;
    start();
    // previous frame random; current frame is it moved by (mvx, mvy) plus noise
    mvx = 2; mvy = -1;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        qy[y][x] = $urandom_range(255); qcb[y][x] = $urandom_range(15); qcr[y][x] = $urandom_range(15);
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        int sx0, sy0;
        sx0 = (x + mvx + W) % W; sy0 = (y + mvy + H) % H;
        cy[y][x] = qy[sy0][sx0]; ccb[y][x] = qcb[sy0][sx0]; ccr[y][x] = qcr[sy0][sx0];
        if ($urandom_range(7) == 0) cy[y][x] = $urandom_range(255);
      end
    bestd = '{32'h7fffffff, 32'h7fffffff};
    gbd = '{32'h7fffffff, 32'h7fffffff};
    for (int dy = -R; dy <= RH; dy++)
      for (int dx = -R; dx <= RH; dx++) begin
        // per pixel: load the current word, then ADACC while loading the
        // next pixel's candidate word
        load(2, prev_word(0, 0, dx, dy));
        op1l(OP_ZACC, 0, 0, 0, 0, 1, cur_word(0, 0), r);
        for (int p = 0; p < 256; p++) begin
          int nx, ny;
          nx = (p + 1) % 16; ny = (p + 1) / 16;
          op1l(OP_ADACC, 0, 1 + 2 * (p % 2), 2 + 2 * (p % 2), 0,
               (p < 255) ? 2 + 2 * ((p + 1) % 2) : 0, (p < 255) ? prev_word(nx, ny, dx, dy) : 32'd0, r);
          if (p < 255) load(1 + 2 * ((p + 1) % 2), cur_word(nx, ny));
        end
        sad = '{0, 0};
        for (int k = 0; k < 6; k++) begin
          op1(OP_RACC, 10, 0, 0, k, r);
          sad[k / 3] += sx(r);
        end
        // reference SAD
        g = '{0, 0};
        for (int p = 0; p < 256; p++)
          for (int k = 0; k < 6; k++) begin
            int a, b;
            a = getf(cur_word(p % 16, p / 16), k);
            b = getf(prev_word(p % 16, p / 16, dx, dy), k);
            g[k / 3] += (a > b) ? a - b : b - a;
          end
        for (int m = 0; m < 2; m++) begin
          expect_eq(sad[m], g[m], "SAD");
          if (sad[m] < bestd[m]) begin bestd[m] = sad[m]; best[m] = '{dx, dy}; end
          if (g[m] < gbd[m]) begin gbd[m] = g[m]; gb[m] = '{dx, dy}; end
        end
      end
    for (int m = 0; m < 2; m++) begin
      expect_eq(best[m][0], gb[m][0], "motion vector x");
      expect_eq(best[m][1], gb[m][1], "motion vector y");
      expect_eq(best[m][0], mvx, "found the true motion x");
      expect_eq(best[m][1], mvy, "found the true motion y");
    end
    finish_run("ME");
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
