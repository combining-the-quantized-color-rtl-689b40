// tb_qcpx_wl_dct: the DCT workload on the QCPX cluster. An 8-point 1-D DCT
// is taken along the rows of every 8x8 block of a 176x144 image, two rows
// at a time, with BCAST-broadcast 4-bit fixed-point cosine coefficients and
// MACC into the color-packed accumulator; every output is compared with an
// integer reference.
module tb_qcpx_wl_dct;
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

  // 8-point 1-D DCT over the rows of every 8x8 block of a W x H image.
  // Word x of a row pair packs row r (pixel 0) and row r + 4 (pixel 1) of
  // a block, so two rows are transformed at once. Coefficients are 4-bit
  // signed fixed point: C[u][x] = round(7 * a(u) * cos((2x + 1) u pi / 16)),
  // a(0) = 1/sqrt(2), a(u) = 1 otherwise, broadcast with BCAST.
  localparam int W = 176, H = 144;
  localparam real PI = 3.14159265358979;
  int py [H][W], pcb [H][W], pcr [H][W];
  int C [8][8];

  function automatic logic [31:0] word(int bx, int by, int r, int x);
    int X, Y0, Y1;
    X = 8 * bx + x; Y0 = 8 * by + r; Y1 = Y0 + 4;
    return pack6(py[Y0][X], pcb[Y0][X], pcr[Y0][X], py[Y1][X], pcb[Y1][X], pcr[Y1][X]);
  endfunction

  initial begin
    logic [31:0] r;
    start();
    for (int u = 0; u < 8; u++)
      for (int x = 0; x < 8; x++) begin
        real v;
        v = 7.0 * ((u == 0) ? 0.70710678 : 1.0) * $cos((2.0 * x + 1.0) * u * PI / 16.0);
        C[u][x] = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
      end
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        py[y][x] = $urandom_range(255); pcb[y][x] = $urandom_range(15); pcr[y][x] = $urandom_range(15);
      end
    for (int by = 0; by < H / 8; by++)
      for (int bx = 0; bx < W / 8; bx++)
        for (int rr = 0; rr < 4; rr++) begin
          for (int x = 0; x < 8; x++) load(x, word(bx, by, rr, x));
          for (int u = 0; u < 8; u++) begin
            op1l(OP_ZACC, 0, 0, 0, 0, 8, 32'(C[u][0]) & 32'hFF, r);
            for (int x = 0; x < 8; x++) begin
              op1(OP_BCAST, 9, 8, 0, 0, r);
              if (x < 7) op1l(OP_MACC, 0, x, 9, 0, 8, 32'(C[u][x + 1]) & 32'hFF, r);
              else       op1(OP_MACC, 0, x, 9, 0, r);
            end
            for (int k = 0; k < 6; k++) begin
              int s;
              op1(OP_RACC, 10, 0, 0, k, r);
              s = 0;
              for (int x = 0; x < 8; x++) s += C[u][x] * getf(word(bx, by, rr, x), k);
              expect_eq(sx(r), s, "DCT coefficient");
            end
          end
        end
    expect_eq(C[0][0], 5, "C[0][0]");
    expect_eq(C[4][1], -5, "C[4][1]");
    expect_eq(C[1][0], 7, "C[1][0]");
    finish_run("DCT");
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
