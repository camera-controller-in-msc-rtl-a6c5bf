// Testbench for discrete_line: writes to the discrete register and to other
// addresses; checks the enable lines, the read-back and the reset value.
module tb_discrete_line;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  cpu_acc_t acc;
  discrete_t lines;
  logic [7:0] rdata;
  logic [4:0] expv;
  int checks = 0, failures = 0;

  discrete_line dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc = '0;
    expv = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(lines == '0, "reset value");
    for (int i = 0; i < 300; i++) begin
      acc.wr   = 1'b1;
      acc.rd   = 1'b0;
      acc.data = 8'($urandom);
      acc.addr = ($urandom_range(0, 1) == 0) ? {REG_PAGE, REG_DISCRETE}
                                             : 16'($urandom_range(0, 16'hC0FF));
      if (acc.addr == {REG_PAGE, REG_DISCRETE}) expv = acc.data[4:0];
      @(negedge clk);
      acc = '0;
      chk(lines.line_sync_en_pan == expv[0], "LINE_SYNC_EN_PAN");
      chk(lines.line_sync_en_ms  == expv[1], "LINE_SYNC_EN_MS");
      chk(lines.rst_low          == expv[2], "RST_LOW");
      chk(lines.en_buf_da        == expv[3], "EN_BUF_DA");
      chk(lines.en_clks          == expv[4], "EN_CLKS");
      chk(rdata == {3'b0, expv}, "read-back");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
