// tb_qcpx_bypass: self-checking test of the forwarding multiplexer with
// five sources: no match gives the register file value, one match gives
// that source, several matches give the highest-numbered (newest) one.
module tb_qcpx_bypass;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [4:0]       addr;
  logic [31:0]      rf_data, data;
  logic [4:0]       fwd_valid;
  logic [4:0][4:0]  fwd_rd;
  logic [4:0][31:0] fwd_data;
  logic             hit;
  int checks = 0, failures = 0, multi = 0, none = 0;

  qcpx_bypass #(.NSRC(5), .AW(5)) dut (.addr(addr), .rf_data(rf_data), .fwd_valid(fwd_valid),
                                       .fwd_rd(fwd_rd), .fwd_data(fwd_data), .data(data), .hit(hit));

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic [31:0] exp;
      logic exphit;
      int n;
      addr = 5'($urandom_range(3));
      rf_data = $urandom;
      n = 0;
      exp = rf_data;
      exphit = 0;
      for (int s = 0; s < 5; s++) begin
        fwd_valid[s] = 1'($urandom_range(1));
        fwd_rd[s] = 5'($urandom_range(3));
        fwd_data[s] = $urandom;
      end
      for (int s = 4; s >= 0; s--)
        if (fwd_valid[s] && fwd_rd[s] == addr) begin
          n++;
          if (!exphit) exp = fwd_data[s];
          exphit = 1;
        end
      if (n > 1) multi++;
      if (n == 0) none++;
      #1;
      checks++;
      if (data !== exp || hit !== exphit) begin
        failures++;
        if (failures < 10) $display("FAIL got %h/%b exp %h/%b", data, hit, exp, exphit);
      end
    end
    if (multi == 0 || none == 0) failures++;
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
