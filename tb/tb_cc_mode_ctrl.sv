// Testbench for cc_mode_ctrl at a scaled clock (CLK_HZ = 10, so the 20 s
// WAIT timeout is 200 clocks). Walks every transition of the mode diagram:
// INIT->WAIT, WAIT timeout into default imaging, leaving default imaging on
// the first PMU command, WAIT->READY_IMAGE, WAIT->STANDBY with a pending
// command, STANDBY<->READY_IMAGE, READY_IMAGE<->IMAGING, STANDBY<->IBIT, and
// rejected commands. Checks the mode outputs in each mode.
module tb_cc_mode_ctrl;
  import cc_pkg::*;
  localparam int CLK_HZ = 10;
  localparam int WAIT_CYC = 200;
  logic clk = 0, rst_n = 0;
  logic init_done = 0, cmd_valid = 0, ibit_done = 0;
  pmu_cmd_e cmd = CMD_NONE;
  logic [NUM_BANDS-1:0] cmd_bands = 0, band_en;
  cc_mode_e mode;
  logic imaging, tlm_mon_en, pbit_en, ibit_active, default_params, cmd_rejected;
  int checks = 0, failures = 0, rejects = 0;

  cc_mode_ctrl #(.CLK_HZ(CLK_HZ), .WAIT_S(20)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && cmd_rejected) rejects++;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (mode %s)", msg, mode.name()); end
  endtask

  task automatic send(pmu_cmd_e c, logic [NUM_BANDS-1:0] b = '0);
    cmd = c; cmd_bands = b; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; cmd = CMD_NONE;
  endtask

  task automatic expect_mode(cc_mode_e m, logic [NUM_BANDS-1:0] be, bit im, bit tlm,
                             bit pb, bit ib, string msg);
    chk(mode == m, {msg, ": mode"});
    chk(band_en == be && imaging == im && tlm_mon_en == tlm && pbit_en == pb &&
        ibit_active == ib, {msg, ": outputs"});
  endtask

  task automatic restart();
    rst_n = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_mode(MODE_INIT, 0, 0, 0, 0, 0, "INIT after reset");
    init_done = 1;
    @(negedge clk);
    init_done = 0;
    expect_mode(MODE_WAIT, 0, 0, 0, 0, 0, "WAIT after init");
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    @(negedge clk);
    // 1: no PMU contact -> default imaging after 20 s
    restart();
    t = 0;
    while (mode == MODE_WAIT && t < 1000) begin @(negedge clk); t++; end
    chk(t == WAIT_CYC, $sformatf("WAIT timeout after %0d clocks", t));
    expect_mode(MODE_DEF_READY_IMAGE, '1, 0, 1, 1, 0, "default ready image");
    chk(default_params, "default parameters");
    @(negedge clk);
    expect_mode(MODE_IMAGING, '1, 1, 1, 1, 0, "default imaging started");
    repeat (10) @(negedge clk);
    // first PMU command (IBIT) -> STANDBY, then executed -> IBIT
    send(CMD_IBIT);
    expect_mode(MODE_STANDBY, 0, 0, 0, 1, 0, "comm established");
    chk(!default_params, "default parameters cleared");
    @(negedge clk);
    expect_mode(MODE_IBIT, 0, 0, 0, 0, 1, "pending IBIT executed");
    send(CMD_START_IMAGING);
    @(negedge clk);
    chk(rejects == 1, "command rejected in IBIT");
    ibit_done = 1;
    @(negedge clk);
    ibit_done = 0;
    expect_mode(MODE_STANDBY, 0, 0, 0, 1, 0, "IBIT completed");

    // 2: READY_IMAGE command in WAIT
    restart();
    repeat (20) @(negedge clk);
    send(CMD_READY_IMAGE, 5'b00011);
    expect_mode(MODE_READY_IMAGE, 5'b00011, 0, 1, 1, 0, "WAIT -> READY_IMAGE");
    chk(!default_params, "commanded parameters");
    send(CMD_STOP_IMAGING);
    chk(mode == MODE_READY_IMAGE, "STOP without imaging keeps mode");
    send(CMD_START_IMAGING);
    expect_mode(MODE_IMAGING, 5'b00011, 1, 1, 1, 0, "start imaging");
    send(CMD_OTHER);
    chk(mode == MODE_IMAGING, "other command keeps imaging");
    send(CMD_STOP_IMAGING);
    expect_mode(MODE_READY_IMAGE, 5'b00011, 0, 1, 1, 0, "stop imaging");
    send(CMD_STANDBY);
    expect_mode(MODE_STANDBY, 0, 0, 0, 1, 0, "READY_IMAGE -> STANDBY");
    send(CMD_READY_IMAGE, 5'b11100);
    expect_mode(MODE_READY_IMAGE, 5'b11100, 0, 1, 1, 0, "STANDBY -> READY_IMAGE");
    send(CMD_START_IMAGING);
    send(CMD_STANDBY);
    expect_mode(MODE_STANDBY, 0, 0, 0, 1, 0, "IMAGING -> STANDBY");
    send(CMD_IBIT);
    expect_mode(MODE_IBIT, 0, 0, 0, 0, 1, "STANDBY -> IBIT");
    ibit_done = 1;
    @(negedge clk);
    ibit_done = 0;
    chk(mode == MODE_STANDBY, "IBIT -> STANDBY");

    // 3: other command in WAIT -> STANDBY, then READY_IMAGE still possible
    restart();
    send(CMD_OTHER);
    expect_mode(MODE_STANDBY, 0, 0, 0, 1, 0, "WAIT -> STANDBY on other command");
    repeat (300) @(negedge clk);
    chk(mode == MODE_STANDBY, "no timeout once out of WAIT");
    send(CMD_START_IMAGING);
    chk(mode == MODE_STANDBY && rejects == 2, "START rejected in STANDBY");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
