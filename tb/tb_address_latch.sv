// Testbench for address_latch: random ALE/AD sequences against a reference
// register; also checks the one-clock capture latency.
module tb_address_latch;
  logic clk = 0, rst_n = 0;
  logic ale = 0;
  logic [7:0] ad_in = 0, addr_lo, ref_q;
  int checks = 0, failures = 0;

  address_latch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ref_q = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      ale   = ($urandom_range(0, 3) == 0);
      ad_in = 8'($urandom);
      @(posedge clk);
      if (ale) ref_q = ad_in;
      #1;
      checks++;
      if (addr_lo !== ref_q) begin
        failures++;
        $display("mismatch at %0d: got %h expected %h", i, addr_lo, ref_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
