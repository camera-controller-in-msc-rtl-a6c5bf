// Testbench for watch_dog at a scaled clock (CLK_HZ = 1000, so 1.6 s is
// 1600 clocks and the 200 ms pulse 200 clocks). Checks that regular toggling
// holds the reset off, that a missing toggle gives a reset after exactly the
// timeout, the pulse width, the restart after the pulse and the manual reset.
module tb_watch_dog;
  localparam int CLK_HZ = 1000;
  localparam int TO_CYC = 1600;
  localparam int PU_CYC = 200;
  logic clk = 0, rst_n = 0;
  logic wdi = 0, mr_n = 1, wdo_n;
  logic [7:0] timeout_cnt;
  int checks = 0, failures = 0;

  watch_dog #(.CLK_HZ(CLK_HZ), .TIMEOUT_MS(1600), .PULSE_MS(200)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int low;
    int t;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // toggling every 1500 clocks (just under 1.6 s) keeps wdo_n high
    low = 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (i % 1500 == 1499) wdi = ~wdi;
      if (!wdo_n) low++;
    end
    chk(low == 0, "no reset while toggled");
    chk(timeout_cnt == 0, "no timeout counted");
    // stop toggling: last toggle now, count clocks to the reset
    wdi = ~wdi;
    t = 0;
    while (wdo_n && t < 3000) begin @(negedge clk); t++; end
    // kick is seen 3 clocks after the toggle, count restarts there
    chk(t == TO_CYC + 3, $sformatf("timeout after %0d clocks", t));
    chk(timeout_cnt == 1, "timeout counted");
    t = 0;
    while (!wdo_n && t < 1000) begin @(negedge clk); t++; end
    chk(t == PU_CYC, $sformatf("pulse width %0d", t));
    // timer restarts after the pulse
    t = 0;
    while (wdo_n && t < 3000) begin @(negedge clk); t++; end
    chk(t == TO_CYC, $sformatf("second timeout after %0d clocks", t));
    chk(timeout_cnt == 2, "second timeout counted");
    while (!wdo_n) @(negedge clk);
    // manual reset
    repeat (100) @(negedge clk);
    mr_n = 0;
    repeat (2) @(negedge clk);
    chk(!wdo_n, "manual reset asserts wdo_n");
    repeat (50) @(negedge clk);
    chk(!wdo_n, "held while mr_n low");
    mr_n = 1;
    repeat (2) @(negedge clk);
    chk(wdo_n, "released with mr_n");
    t = 2;
    while (wdo_n && t < 3000) begin @(negedge clk); t++; end
    chk(t == TO_CYC + 2, $sformatf("timeout after manual reset %0d", t));
    chk(timeout_cnt == 3, "third timeout counted");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
