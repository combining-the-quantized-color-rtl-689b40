// tb_qcpx_rf: self-checking test of the register file with the four-port
// arrangement (two reads, two writes): reset, reads returning the old value
// in the write cycle, and the higher write port winning when both ports
// write the same register.
module tb_qcpx_rf;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [1:0][4:0]  raddr, waddr;
  logic [1:0][31:0] rdata, wdata;
  logic [1:0]       we;
  logic [31:0] model [32];
  int checks = 0, failures = 0, collisions = 0;

  qcpx_rf dut (.clk(clk), .rst_n(rst_n), .raddr(raddr), .rdata(rdata),
               .we(we), .waddr(waddr), .wdata(wdata));

  task automatic chk_reads();
    for (int p = 0; p < 2; p++) begin
      checks++;
      if (rdata[p] !== model[raddr[p]]) begin
        failures++;
        if (failures < 10) $display("FAIL r%0d got %h exp %h", raddr[p], rdata[p], model[raddr[p]]);
      end
    end
  endtask

  initial begin
    rst_n = 0; we = '1; waddr = '0; wdata = '1; raddr = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1; we = '0;
    for (int r = 0; r < 32; r++) model[r] = '0;
    for (int r = 0; r < 32; r++) begin raddr[0] = 5'(r); raddr[1] = 5'(31 - r); #1 chk_reads(); end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++) begin
        we[p] = 1'($urandom_range(1));
        waddr[p] = 5'($urandom_range(7));   // few registers: collisions happen
        wdata[p] = $urandom;
        raddr[p] = 5'($urandom_range(7));
      end
      if (we == 2'b11 && waddr[0] == waddr[1]) collisions++;
      #1 chk_reads();
      @(posedge clk);
      for (int p = 0; p < 2; p++) if (we[p]) model[waddr[p]] = wdata[p];
      #1 chk_reads();
    end
    if (collisions == 0) failures++;
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
