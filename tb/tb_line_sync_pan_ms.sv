// Testbench for line_sync_pan_ms: drives PMU line-sync edges with random
// spacing under changing enables; checks that every PMU line gives a PAN
// pulse, every 4th (counted from enabling) an MS pulse, the pulse width and
// the three-clock latency.
module tb_line_sync_pan_ms;
  localparam int MS_RATIO = 4;
  localparam int PULSE_W  = 3;
  logic clk = 0, rst_n = 0;
  logic pmu_line_sync = 0, en_pan = 0, en_ms = 0;
  logic pan_sync, ms_sync;
  int checks = 0, failures = 0;
  int ms_lines_seen, pan_pulses, ms_pulses;

  line_sync_pan_ms #(.MS_RATIO(MS_RATIO), .PULSE_W(PULSE_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one PMU line: rising edge, then observe the outputs cycle by cycle
  task automatic line(bit exp_pan, bit exp_ms);
    int pan_w, ms_w, pan_at, ms_at;
    pan_w = 0; ms_w = 0; pan_at = -1; ms_at = -1;
    @(negedge clk);
    pmu_line_sync = 1;
    for (int c = 1; c <= 12; c++) begin
      @(negedge clk);
      if (c == 3) pmu_line_sync = 0;
      if (pan_sync) begin pan_w++; if (pan_at < 0) pan_at = c; end
      if (ms_sync)  begin ms_w++;  if (ms_at  < 0) ms_at  = c; end
    end
    chk(pan_w == (exp_pan ? PULSE_W : 0), $sformatf("PAN pulse width %0d", pan_w));
    chk(ms_w  == (exp_ms  ? PULSE_W : 0), $sformatf("MS pulse width %0d", ms_w));
    if (exp_pan) chk(pan_at == 3, $sformatf("PAN latency %0d", pan_at));
    if (exp_ms)  chk(ms_at  == 3, $sformatf("MS latency %0d", ms_at));
    if (pan_w > 0) pan_pulses++;
    if (ms_w > 0)  ms_pulses++;
    repeat ($urandom_range(0, 6)) @(negedge clk);
  endtask

  initial begin
    int k;
    pan_pulses = 0; ms_pulses = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // both disabled: nothing
    for (int i = 0; i < 5; i++) line(0, 0);
    // PAN only
    en_pan = 1;
    for (int i = 0; i < 6; i++) line(1, 0);
    // PAN and MS, several enable periods
    for (int s = 0; s < 4; s++) begin
      en_ms = 1;
      k = 0;
      for (int i = 0; i < 4 * MS_RATIO + s; i++) begin
        line(1, (k % MS_RATIO) == 0);
        k++;
      end
      en_ms = 0;
      line(1, 0);
    end
    // MS only
    en_pan = 0; en_ms = 1;
    for (int i = 0; i < 9; i++) line(0, (i % MS_RATIO) == 0);
    chk(pan_pulses == 6 + 4 * 17 + 2 + 4, $sformatf("PAN pulses %0d", pan_pulses));
    chk(ms_pulses == 4 * 4 + 1 + 1 + 1 + 3, $sformatf("MS pulses %0d", ms_pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
