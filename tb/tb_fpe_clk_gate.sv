// Testbench for fpe_clk_gate: a fast clock (period 6) is gated by an enable
// that changes at random times in another clock domain. Checks that the
// output is low while disabled, that every output high phase is a whole
// high phase of the input clock, that pulses come through while enabled,
// and the start and stop latency in fast-clock cycles.
module tb_fpe_clk_gate;
  logic clk_in = 0, rst_n = 0, en = 0, clk_out;
  int checks = 0, failures = 0;
  int pulses;
  realtime t_rise;

  fpe_clk_gate dut (.*);

  always #3 clk_in = ~clk_in;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s at %0t", msg, $realtime); end
  endtask

  // every output pulse must be a full input high phase (3 time units)
  always @(posedge clk_out) begin
    t_rise = $realtime;
    if (rst_n) chk(clk_in, "output rises only with the input clock");
  end
  always @(negedge clk_out) if (rst_n) begin
    chk($realtime - t_rise == 3.0, "full-width pulse");
    chk(!clk_in, "output falls only with the input clock");
    pulses++;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p0, lat;
    pulses = 0;
    #10 rst_n = 1;
    #50;
    chk(pulses == 0 && !clk_out, "disabled after reset");
    for (int i = 0; i < 40; i++) begin
      // enable at an arbitrary time, not aligned to clk_in
      #($urandom_range(1, 17));
      en = 1;
      lat = 0;
      while (!clk_out && lat < 100) begin @(posedge clk_in); #0.1; lat++; end
      chk(lat >= 2 && lat <= 4, $sformatf("start latency %0d cycles", lat));
      p0 = pulses;
      repeat (20) @(posedge clk_in);
      chk(pulses - p0 >= 19, "clock passes while enabled");
      #($urandom_range(1, 17));
      en = 0;
      repeat (4) @(posedge clk_in);
      p0 = pulses;
      repeat (20) @(posedge clk_in);
      chk(pulses == p0 && !clk_out, "clock held low while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
