// tb_qcpx_unit: end-to-end test of the QCPX execution cluster at its
// default size (four ALUs, one MULT unit, 32 registers, one accumulator).
//
// Every cycle it may load a word from "memory" and issue up to five random
// instructions, one per slot, within the issue rules. Sources are drawn
// from a few registers so that results are often forwarded from the
// write-back stage. A program-order model of the registers and of the
// accumulator predicts every write-back result one cycle after issue. At
// the end every register is read back through the cluster. The test counts
// how often each mechanism occurred (operand bypass, full five-wide issue,
// two slots writing one register, a load overriding a write-back to the
// same register, saturation, divide by zero, each accumulator instruction)
// and counts a failure for any that never occurred.
module tb_qcpx_unit;
  import qcpx_pkg::*;
  import qcpx_ref_pkg::*;

  localparam int NL = 5;
  localparam int NCYC = 20000;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;

  qcpx_instr_t [3:0]    alu_instr;
  qcpx_instr_t          mul_instr;
  logic                 ld_valid;
  logic [4:0]           ld_rd;
  logic [31:0]          ld_data;
  logic [NL-1:0]        wb_valid;
  logic [NL-1:0][4:0]   wb_rd;
  logic [NL-1:0][31:0]  wb_data;
  logic [NL-1:0][1:0]   fwd_hit;

  qcpx_unit dut (.clk(clk), .rst_n(rst_n), .alu_instr(alu_instr), .mul_instr(mul_instr),
                 .ld_valid(ld_valid), .ld_rd(ld_rd), .ld_data(ld_data),
                 .wb_valid(wb_valid), .wb_rd(wb_rd), .wb_data(wb_data), .fwd_hit(fwd_hit));

  int checks = 0, failures = 0;
  logic [31:0] rm [32];
  acc6_t am;
  // expected write-back of the instructions issued in the previous cycle
  logic [NL-1:0]       exp_v;
  logic [NL-1:0][4:0]  exp_rd;
  logic [NL-1:0][31:0] exp_d;

  // mechanism counters
  int n_bypass = 0, n_full = 0, n_waw = 0, n_ld_over_wb = 0, n_load_use = 0;
  int n_sat = 0, n_div0 = 0, n_zacc = 0, n_macc = 0, n_adacc = 0, n_racc = 0;
  int n_op [32];
  logic prev_ld = 1'b0;
  logic [4:0] prev_lrd = '0;

  localparam qcpx_op_t ALU_OPS [15] = '{OP_ADD, OP_ADDS, OP_ADDUS, OP_SUB, OP_SUBS, OP_SUBUS,
                                        OP_AVG, OP_BCAST, OP_SLL, OP_SRL, OP_CMPEQ, OP_CMPGT,
                                        OP_CMPLT, OP_MIN, OP_MAX};
  localparam qcpx_op_t MUL_OPS [6] = '{OP_MUL, OP_DIV, OP_MACC, OP_ADACC, OP_ZACC, OP_RACC};

  function automatic qcpx_instr_t nop();
    qcpx_instr_t i;
    i = '0;
    i.op = OP_NOP;
    return i;
  endfunction

  task automatic check_wb();
    for (int l = 0; l < NL; l++) begin
      checks++;
      if (wb_valid[l] !== exp_v[l] ||
          (exp_v[l] && (wb_rd[l] !== exp_rd[l] || wb_data[l] !== exp_d[l]))) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0t slot %0d: v=%b rd=%0d d=%h, expected v=%b rd=%0d d=%h",
                   $time, l, wb_valid[l], wb_rd[l], wb_data[l], exp_v[l], exp_rd[l], exp_d[l]);
      end
    end
  endtask

  // model one instruction in program order, return its register result
  function automatic logic [31:0] model(qcpx_instr_t i);
    logic [31:0] a, b, r;
    a = rm[i.rs1];
    b = rm[i.rs2];
    r = '0;
    if (i.op == OP_RACC)                      r = ref_racc(am, int'(i.sel));
    else if (i.op inside {OP_MACC, OP_ADACC, OP_ZACC}) am = ref_acc(i.op, a, b, am);
    else                                      r = ref_exec(i.op, a, b);
    if (i.op inside {OP_ADDS, OP_ADDUS, OP_SUBS, OP_SUBUS}) begin
      qcpx_op_t m;
      m = (i.op inside {OP_ADDS, OP_ADDUS}) ? OP_ADD : OP_SUB;
      if (r != ref_exec(m, a, b)) n_sat++;
    end
    if (i.op == OP_DIV) for (int k = 0; k < 6; k++) if (getf(b, k) == 0) n_div0++;
    if (i.op == OP_ZACC)  n_zacc++;
    if (i.op == OP_MACC)  n_macc++;
    if (i.op == OP_ADACC) n_adacc++;
    if (i.op == OP_RACC)  n_racc++;
    n_op[int'(i.op)]++;
    if (writes_rd(i.op)) rm[i.rd] = r;
    return r;
  endfunction

  // issue one cycle: optional load, then the slots in program order
  task automatic issue_cycle(logic do_ld, logic [4:0] lrd, logic [31:0] ldat,
                             qcpx_instr_t s [NL]);
    logic [31:0] written;
    @(negedge clk);
    check_wb();
    // a load now lands at the same edge as last cycle's write-backs
    if (do_ld) for (int l = 0; l < NL; l++) if (exp_v[l] && exp_rd[l] == lrd) n_ld_over_wb++;
    ld_valid = do_ld; ld_rd = lrd; ld_data = ldat;
    if (do_ld) rm[lrd] = ldat;
    written = '0;
    for (int l = 0; l < NL; l++) begin
      if (s[l].valid && writes_rd(s[l].op)) begin
        if (written[s[l].rd]) n_waw++;
        written[s[l].rd] = 1'b1;
      end
    end
    for (int l = 0; l < 4; l++) alu_instr[l] = s[l];
    mul_instr = s[4];
    for (int l = 0; l < NL; l++) begin
      exp_v[l] = s[l].valid && writes_rd(s[l].op);
      exp_rd[l] = s[l].rd;
      exp_d[l] = s[l].valid ? model(s[l]) : 32'd0;
    end
    #1;
    for (int l = 0; l < NL; l++)
      if (s[l].valid) n_bypass += int'(fwd_hit[l][0]) + int'(fwd_hit[l][1]);
    if (s[0].valid && s[1].valid && s[2].valid && s[3].valid && s[4].valid) n_full++;
  endtask

  // random cycle within the issue rules; nreg bounds the registers used
  task automatic random_cycle(int nreg);
    qcpx_instr_t s [NL];
    logic [31:0] wr;
    logic do_ld;
    logic [4:0] lrd;
    wr = '0;
    do_ld = ($urandom_range(3) == 0);
    lrd = 5'($urandom_range(nreg - 1));
    if (do_ld) wr[lrd] = 1'b1;
    for (int l = 0; l < NL; l++) begin
      s[l] = nop();
      s[l].valid = ($urandom_range(9) != 0);
      s[l].op = (l < 4) ? ALU_OPS[$urandom_range(14)] : MUL_OPS[$urandom_range(5)];
      if (s[l].op == OP_ZACC && $urandom_range(3) != 0) s[l].op = OP_ADACC;
      s[l].rd = 5'($urandom_range(nreg - 1));
      s[l].sel = 3'($urandom_range(6));
      s[l].rs1 = 5'($urandom_range(nreg - 1));
      s[l].rs2 = 5'($urandom_range(nreg - 1));
      for (int tries = 0; tries < 20 && wr[s[l].rs1]; tries++) s[l].rs1 = 5'($urandom_range(nreg - 1));
      for (int tries = 0; tries < 20 && wr[s[l].rs2]; tries++) s[l].rs2 = 5'($urandom_range(nreg - 1));
      if (wr[s[l].rs1] || wr[s[l].rs2]) s[l].valid = 1'b0;
      if (s[l].valid && writes_rd(s[l].op)) wr[s[l].rd] = 1'b1;
    end
    // a source loaded in the previous cycle comes from the register file
    for (int l = 0; l < NL; l++)
      if (prev_ld && s[l].valid && (s[l].rs1 == prev_lrd || s[l].rs2 == prev_lrd)) n_load_use++;
    // shift amounts come from a register: keep some small
    issue_cycle(do_ld, lrd, ($urandom_range(3) == 0) ? 32'($urandom_range(9)) : rand_word(), s);
    prev_ld = do_ld;
    prev_lrd = lrd;
  endtask

  initial begin
    qcpx_instr_t s [NL];
    rst_n = 0;
    alu_instr = '{default: nop()};
    mul_instr = nop();
    ld_valid = 0; ld_rd = 0; ld_data = 0;
    exp_v = '0; exp_rd = '0; exp_d = '0;
    for (int r = 0; r < 32; r++) rm[r] = '0;
    for (int o = 0; o < 32; o++) n_op[o] = 0;
    am = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // fill all 32 registers from memory
    for (int r = 0; r < 32; r++) begin
      for (int l = 0; l < NL; l++) s[l] = nop();
      issue_cycle(1'b1, 5'(r), rand_word(), s);
    end
    for (int c = 0; c < NCYC; c++) random_cycle((c < NCYC / 2) ? 6 : 32);
    // drain, then read every register back (MAX r, r, r returns r)
    for (int l = 0; l < NL; l++) s[l] = nop();
    issue_cycle(1'b0, 0, 0, s);
    for (int r = 0; r < 32; r++) begin
      for (int l = 0; l < NL; l++) s[l] = nop();
      s[0].valid = 1; s[0].op = OP_MAX; s[0].rd = 5'(r); s[0].rs1 = 5'(r); s[0].rs2 = 5'(r);
      issue_cycle(1'b0, 0, 0, s);
    end
    for (int l = 0; l < NL; l++) s[l] = nop();
    issue_cycle(1'b0, 0, 0, s);
    $display("mechanisms: bypass=%0d full_issue=%0d same_cycle_waw=%0d load_over_wb=%0d load_use=%0d",
             n_bypass, n_full, n_waw, n_ld_over_wb, n_load_use);
    $display("            saturate=%0d div0=%0d zacc=%0d macc=%0d adacc=%0d racc=%0d",
             n_sat, n_div0, n_zacc, n_macc, n_adacc, n_racc);
    if (n_bypass == 0 || n_full == 0 || n_waw == 0 || n_ld_over_wb == 0 || n_load_use == 0 ||
        n_sat == 0 || n_div0 == 0 || n_zacc == 0 || n_macc == 0 || n_adacc == 0 || n_racc == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    for (int o = int'(OP_ADD); o <= int'(OP_RACC); o++)
      if (n_op[o] == 0) begin failures++; $display("FAIL: op %0d never issued", o); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC * 2 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
