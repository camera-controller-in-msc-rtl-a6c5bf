// Testbench for d_a_adapter: drives 80C32-style read and write cycles (the
// low address byte is supplied as if already latched) and checks that each
// write gives exactly one write strobe with the right address and data, each
// read exactly one read strobe, and that AD[7:0] is driven with the register
// data only during reads of the FPGA register page.
module tb_d_a_adapter;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] ad_in = 0, a_hi = 0, addr_lo = 0, rdata = 0, ad_out;
  logic rd_n = 1, wr_n = 1, ad_oe, rd_act, wr_act;
  cpu_acc_t acc;
  logic [15:0] addr;
  int checks = 0, failures = 0;
  int n_wr, n_rd;
  cpu_acc_t last;

  d_a_adapter dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    if (acc.wr) begin n_wr++; last = acc; end
    if (acc.rd) begin n_rd++; last = acc; end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic bus_write(logic [15:0] a, logic [7:0] d);
    int w0;
    w0 = n_wr;
    @(negedge clk);
    a_hi = a[15:8]; addr_lo = a[7:0]; ad_in = a[7:0];
    @(negedge clk);
    ad_in = d; wr_n = 0;
    repeat (5) @(negedge clk);
    chk(wr_act, "write level");
    chk(n_wr == w0, "no strobe before WR_n rises");
    wr_n = 1;
    ad_in = 8'($urandom);             // bus released after the strobe
    repeat (5) @(negedge clk);
    chk(n_wr == w0 + 1, "one write strobe");
    chk(last.addr == a && last.data == d,
        $sformatf("write %h:%h seen as %h:%h", a, d, last.addr, last.data));
  endtask

  task automatic bus_read(logic [15:0] a);
    int r0;
    r0 = n_rd;
    @(negedge clk);
    a_hi = a[15:8]; addr_lo = a[7:0]; ad_in = a[7:0];
    rdata = 8'($urandom);
    @(negedge clk);
    rd_n = 0;
    repeat (3) @(negedge clk);
    chk(ad_oe == (a[15:8] == REG_PAGE), "drive enable only for registers");
    if (a[15:8] == REG_PAGE) chk(ad_out == rdata, "read data");
    chk(addr == a, "address");
    rd_n = 1;
    repeat (4) @(negedge clk);
    chk(!ad_oe, "bus released");
    chk(n_rd == r0 + 1, "one read strobe");
    chk(last.addr == a, "read strobe address");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    n_wr = 0; n_rd = 0; last = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) begin
      bus_write(($urandom_range(0, 1) != 0) ? {REG_PAGE, 8'($urandom)} : 16'($urandom), 8'($urandom));
      bus_read(($urandom_range(0, 1) != 0) ? {REG_PAGE, 8'($urandom)} : 16'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
