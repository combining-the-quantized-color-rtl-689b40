// tb_qcpx_wl_vq: the vector-quantization workload on the QCPX cluster. Each
// 4x4 block of a 176x144 image is matched against a 256-entry codebook; the
// distortion to a codeword is eight ADACC instructions (two pixels per word,
// as after unrolling the block-matching loop by two) and RACC read-outs. The
// chosen index and distortion are compared with an integer reference.
module tb_qcpx_wl_vq;
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

  // W x H image cut into 4x4 blocks (16-pixel vectors); a vector is eight
  // words, word i holding pixels 2i and 2i+1 of the block; NCB codewords
  localparam int W = 176, H = 144, NCB = 256;
  localparam int NBX = W / 4, NBY = H / 4;
  logic [31:0] img [NBY * NBX][8];
  logic [31:0] cb [NCB][8];

  function automatic int golden_d(int b, int c);
    int s;
    s = 0;
    for (int i = 0; i < 8; i++)
      for (int k = 0; k < 6; k++)
        s += (getf(img[b][i], k) > getf(cb[c][i], k)) ? getf(img[b][i], k) - getf(cb[c][i], k)
                                                      : getf(cb[c][i], k) - getf(img[b][i], k);
    return s;
  endfunction

  initial begin
    logic [31:0] r;
    int d, best, bestd, gbest, gbestd;
    start();
    for (int c = 0; c < NCB; c++) for (int i = 0; i < 8; i++) cb[c][i] = $urandom;
    // each block is a noisy copy of some codeword
    for (int b = 0; b < NBY * NBX; b++) begin
      int c;
      c = $urandom_range(NCB - 1);
      for (int i = 0; i < 8; i++) begin
        img[b][i] = cb[c][i];
        for (int k = 0; k < 6; k++)
          if ($urandom_range(3) == 0) img[b][i] = putf(img[b][i], k, $urandom_range((1 << fwid(k)) - 1));
      end
    end
    for (int b = 0; b < NBY * NBX; b++) begin
      for (int i = 0; i < 8; i++) load(i, img[b][i]);
      bestd = 32'h7fffffff;
      best = 0;
      for (int c = 0; c < NCB; c++) begin
        op1l(OP_ZACC, 0, 0, 0, 0, 8, cb[c][0], r);
        for (int i = 0; i < 8; i++)
          if (i < 7) op1l(OP_ADACC, 0, i, 8 + i % 2, 0, 8 + (i + 1) % 2, cb[c][i + 1], r);
          else       op1(OP_ADACC, 0, i, 8 + i % 2, 0, r);
        d = 0;
        for (int k = 0; k < 6; k++) begin
          op1(OP_RACC, 10, 0, 0, k, r);
          d += sx(r);
        end
        if (d < bestd) begin bestd = d; best = c; end
      end
      gbestd = 32'h7fffffff;
      gbest = 0;
      for (int c = 0; c < NCB; c++)
        if (golden_d(b, c) < gbestd) begin gbestd = golden_d(b, c); gbest = c; end
      expect_eq(best, gbest, "codeword index");
      expect_eq(bestd, gbestd, "distortion");
    end
    finish_run("VQ");
  end

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
