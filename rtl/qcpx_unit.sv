// qcpx_unit: QCPX execution cluster for a 32-bit superscalar core.
//
// Adds color-packed execution to a host core: every 32-bit register holds
// two quantized YCbCr pixels (8-bit Y, 4-bit Cb, 4-bit Cr each), and every
// instruction works on all six fields at once. The cluster has N_ALU QCPX
// ALUs (arithmetic, logical and compare groups) and one QCPX MULT unit
// (multiply, divide and the instructions on the 128-bit color-packed
// accumulator). The default of four ALUs and one MULT unit is the QCPX
// configuration the extension was evaluated with.
//
// Pipeline, per issue slot:
//   EX  (cycle t)    operands are read from the register file, replaced by
//                    a newer result from the write-back stage where one
//                    targets the same register (bypass), and executed
//   WB  (cycle t+1)  results sit in the write-back registers, are visible
//                    on wb_* and are forwarded; they reach the register
//                    file at the end of this cycle
// A dependent instruction may therefore issue in the very next cycle.
// Accumulator updates take effect at the end of EX.
//
// Issue rules, checked by assertions and kept by the host's scheduler:
// ALU slots carry only ALU ops and the MULT slot only MULT ops, and no
// instruction reads a register that an older instruction of the same cycle
// writes (both source fields are checked, so an unused one must not name
// such a register). Slot order within a cycle is program order (ALU slot 0
// oldest, MULT slot newest); when two slots of a cycle write the same
// register, the newer one wins in the register file and in the bypass.
//
// Memory: ld_valid/ld_rd/ld_data write a loaded word into the register
// file at the end of the cycle. A load counts as older than the
// instructions of the same cycle, which must not read its register (also
// asserted), and is visible to instructions from the next cycle on. The host core, its caches and its
// load/store unit are outside this module.
//
// The number of registers, the ports, the two-stage timing and the bypass
// arrangement are this design's choices around the register file, operand
// multiplexers, function units and accumulator register file the extension
// describes.
module qcpx_unit
  import qcpx_pkg::*;
#(
  parameter int unsigned N_ALU = 4,
  parameter int unsigned NREGS = 32,
  parameter int unsigned NACC  = 1,
  localparam int unsigned NL   = N_ALU + 1,       // issue slots
  localparam int unsigned AW   = $clog2(NREGS),
  localparam int unsigned ACCW = (NACC > 1) ? $clog2(NACC) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  qcpx_instr_t [N_ALU-1:0] alu_instr,
  input  qcpx_instr_t             mul_instr,
  input  logic                    ld_valid,
  input  logic [4:0]              ld_rd,
  input  logic [XLEN-1:0]         ld_data,
  output logic [NL-1:0]           wb_valid,
  output logic [NL-1:0][4:0]      wb_rd,
  output logic [NL-1:0][XLEN-1:0] wb_data,
  output logic [NL-1:0][1:0]      fwd_hit     // per slot: rs1/rs2 bypassed
);

  // ---------------------------------------------------------------
  // issue slots: 0 .. N_ALU-1 ALUs, N_ALU the MULT unit
  // ---------------------------------------------------------------
  qcpx_instr_t [NL-1:0] ins;
  always_comb begin
    for (int l = 0; l < N_ALU; l++) ins[l] = alu_instr[l];
    ins[N_ALU] = mul_instr;
  end

  // ---------------------------------------------------------------
  // register file: 2 reads per slot; writes from WB (oldest first) then
  // from memory. Memory is the highest port: a load in cycle t is newer
  // than the WB contents of cycle t, which were issued in cycle t-1.
  // ---------------------------------------------------------------
  logic [2*NL-1:0][AW-1:0]   rf_raddr;
  logic [2*NL-1:0][XLEN-1:0] rf_rdata;
  logic [NL:0]               rf_we;
  logic [NL:0][AW-1:0]       rf_waddr;
  logic [NL:0][XLEN-1:0]     rf_wdata;

  always_comb begin
    for (int l = 0; l < NL; l++) begin
      rf_raddr[2*l]   = AW'(ins[l].rs1);
      rf_raddr[2*l+1] = AW'(ins[l].rs2);
      rf_we[l]        = wb_valid[l];
      rf_waddr[l]     = AW'(wb_rd[l]);
      rf_wdata[l]     = wb_data[l];
    end
    rf_we[NL]    = ld_valid;
    rf_waddr[NL] = AW'(ld_rd);
    rf_wdata[NL] = ld_data;
  end

  qcpx_rf #(.NREGS(NREGS), .NR(2*NL), .NW(NL+1)) u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .raddr (rf_raddr),
    .rdata (rf_rdata),
    .we    (rf_we),
    .waddr (rf_waddr),
    .wdata (rf_wdata)
  );

  // ---------------------------------------------------------------
  // operand bypass and function units
  // ---------------------------------------------------------------
  logic [NL-1:0][AW-1:0] wb_rd_a;
  always_comb
    for (int l = 0; l < NL; l++) wb_rd_a[l] = AW'(wb_rd[l]);

  qword_t [NL-1:0] opa, opb, res;

  for (genvar l = 0; l < NL; l++) begin : g_slot
    logic [XLEN-1:0] a_raw, b_raw;

    qcpx_bypass #(.NSRC(NL), .AW(AW)) u_byp_a (
      .addr      (AW'(ins[l].rs1)),
      .rf_data   (rf_rdata[2*l]),
      .fwd_valid (wb_valid),
      .fwd_rd    (wb_rd_a),
      .fwd_data  (wb_data),
      .data      (a_raw),
      .hit       (fwd_hit[l][0])
    );
    qcpx_bypass #(.NSRC(NL), .AW(AW)) u_byp_b (
      .addr      (AW'(ins[l].rs2)),
      .rf_data   (rf_rdata[2*l+1]),
      .fwd_valid (wb_valid),
      .fwd_rd    (wb_rd_a),
      .fwd_data  (wb_data),
      .data      (b_raw),
      .hit       (fwd_hit[l][1])
    );
    assign opa[l] = qword_t'(a_raw);
    assign opb[l] = qword_t'(b_raw);

    if (l < N_ALU) begin : g_alu
      qcpx_alu u_alu (.op(ins[l].op), .a(opa[l]), .b(opb[l]), .y(res[l]));
    end else begin : g_mul
      qcpx_mult_fu #(.NACC(NACC)) u_mul (
        .clk     (clk),
        .rst_n   (rst_n),
        .valid   (ins[l].valid),
        .op      (ins[l].op),
        .sel     (ins[l].sel),
        .acc_idx (ACCW'(ins[l].acc)),
        .a       (opa[l]),
        .b       (opb[l]),
        .y       (res[l])
      );
    end
  end

  // ---------------------------------------------------------------
  // write-back registers
  // ---------------------------------------------------------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wb_valid <= '0;
      wb_rd    <= '0;
      wb_data  <= '0;
    end else begin
      for (int l = 0; l < NL; l++) begin
        wb_valid[l] <= ins[l].valid && writes_rd(ins[l].op);
        wb_rd[l]    <= ins[l].rd;
        wb_data[l]  <= res[l];
      end
    end
  end

  // ---------------------------------------------------------------
  // issue rules
  // ---------------------------------------------------------------
  always @(posedge clk) begin
    if (rst_n) begin
      for (int l = 0; l < N_ALU; l++)
        if (alu_instr[l].valid)
          assert (is_alu_op(alu_instr[l].op))
            else $error("ALU slot %0d given op %0d", l, alu_instr[l].op);
      if (mul_instr.valid)
        assert (is_mul_op(mul_instr.op))
          else $error("MULT slot given op %0d", mul_instr.op);
      for (int i = 0; i < NL; i++)
        for (int j = i + 1; j < NL; j++)
          if (ins[i].valid && ins[j].valid && writes_rd(ins[i].op))
            assert (ins[j].rs1 != ins[i].rd && ins[j].rs2 != ins[i].rd)
              else $error("slot %0d reads register %0d written by slot %0d in the same cycle",
                          j, ins[i].rd, i);
      if (ld_valid)
        for (int j = 0; j < NL; j++)
          if (ins[j].valid)
            assert (ins[j].rs1 != ld_rd && ins[j].rs2 != ld_rd)
              else $error("slot %0d reads register %0d loaded in the same cycle", j, ld_rd);
    end
  end

endmodule
