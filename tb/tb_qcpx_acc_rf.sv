// tb_qcpx_acc_rf: self-checking test of the accumulator register file:
// reset to zero, write-then-read timing (a write is seen from the next
// cycle, not the same one), write enable, and addressing, with the default
// single accumulator and with a four-entry instance.
module tb_qcpx_acc_rf;
  import qcpx_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  int checks = 0, failures = 0;

  // default instance: one accumulator
  logic raddr1, waddr1, we1;
  acc_t rdata1, wdata1;
  qcpx_acc_rf dut1 (.clk(clk), .rst_n(rst_n), .raddr(raddr1), .rdata(rdata1),
                    .we(we1), .waddr(waddr1), .wdata(wdata1));

  // four accumulators
  logic [1:0] raddr4, waddr4;
  logic       we4;
  acc_t       rdata4, wdata4;
  qcpx_acc_rf #(.NACC(4)) dut4 (.clk(clk), .rst_n(rst_n), .raddr(raddr4), .rdata(rdata4),
                                .we(we4), .waddr(waddr4), .wdata(wdata4));

  acc_t model4 [4];
  acc_t model1;

  function automatic acc_t rnd_acc();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic chk(acc_t got, acc_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 0; we1 = 1; we4 = 1; raddr1 = 0; waddr1 = 0; raddr4 = 0; waddr4 = 0;
    wdata1 = rnd_acc(); wdata4 = rnd_acc();
    repeat (2) @(posedge clk);
    #1 rst_n = 1; we1 = 0; we4 = 0;
    model1 = '0;
    for (int i = 0; i < 4; i++) model4[i] = '0;
    #1 chk(rdata1, '0, "reset acc0");
    for (int i = 0; i < 4; i++) begin raddr4 = 2'(i); #1 chk(rdata4, '0, "reset acc4"); end
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      we1 = 1'($urandom_range(1)); wdata1 = rnd_acc();
      we4 = 1'($urandom_range(1)); wdata4 = rnd_acc(); waddr4 = 2'($urandom_range(3));
      raddr4 = 2'($urandom_range(3));
      #1;
      // same cycle: still the old value
      chk(rdata1, model1, "acc1 before edge");
      chk(rdata4, model4[raddr4], "acc4 before edge");
      @(posedge clk);
      if (we1) model1 = wdata1;
      if (we4) model4[waddr4] = wdata4;
      #1;
      chk(rdata1, model1, "acc1 after edge");
      chk(rdata4, model4[raddr4], "acc4 after edge");
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
