// Full-size end-to-end testbench for cc_top with every parameter at its
// default: a 12 MHz clock, so the 1.6 s watchdog period is 19.2 million
// clocks and the 20 s WAIT timeout 240 million clocks. Same sequence and
// checks as the scaled end-to-end testbench, with the PMU line sync at the
// PAN line rate of the orbit (about 1,765 clocks per line).
//
// The testbench plays the microcontroller (bus cycles, watchdog toggling,
// serial transmit), the PMU (mode commands, line sync, RS-422 receive) and
// the converter. One operation: power-up, INIT, WAIT expires into default
// imaging (the software side then enables both line syncs and the clocks),
// line syncs are produced, the first PMU command returns the controller to
// STANDBY and is executed there (IBIT), then commanded READY_IMAGE / IMAGING
// with a command byte to the FPEs, telemetry conversions, memory accesses,
// flash switch-over, the watchdog firing, and the manual reset.
// The fast clocks to the FPEs must be held before EN_CLKS is set and pass after.
// Every mechanism is counted; one that never happened counts as a failure.
module tb_cc_top_full;
  import cc_pkg::*;
  localparam int CLK_HZ   = cc_pkg::DEFAULT_CLK_HZ;
  localparam int WD_CYC   = CLK_HZ / 1000 * 1600;
  localparam int WAIT_CYC = CLK_HZ * 20;

  logic clk = 0, rst_n = 0;
  logic [7:0] ad_in = 0, ad_out, a_hi = 0, mem_a_lo;
  logic ad_oe, ale = 0, rd_n = 1, wr_n = 1, psen_n = 1;
  logic sram_cs_n, sram_oe_n, sram_we_n, fl_loader_cs_n, fl_code_cs_n, fl_oe_n, fl_we_n;
  logic ser_tx, ser_clk, ser_sync, pmu_line_sync = 0, pan_line_sync, ms_line_sync;
  discrete_t discretes;
  logic [1:0] fast_clk_in = 0, fpe_clk_out;
  int fpe_clk_pulses [2];
  // the fast clocks run only while fast_run is set, to keep the long run fast
  logic fast_run = 0;
  initial forever begin wait (fast_run); #2 fast_clk_in[0] = ~fast_clk_in[0]; end
  initial forever begin wait (fast_run); #3 fast_clk_in[1] = ~fast_clk_in[1]; end
  always @(posedge fpe_clk_out[0]) if (rst_n) fpe_clk_pulses[0]++;
  always @(posedge fpe_clk_out[1]) if (rst_n) fpe_clk_pulses[1]++;
  logic adc_ready, adc_start;
  logic [7:0] adc_data;
  logic [4:0] amux_sel;
  logic wdi = 0, mr_n = 1, wdo_n;
  logic [7:0] wd_timeouts;
  logic uart_txd = 1, mcu_pri_txd = 1, mcu_red_txd = 1, rs422_rxd = 1;
  logic rs422_txd, uart_rxd, mcu_pri_rxd, mcu_red_rxd;
  logic init_done = 0, cmd_valid = 0, ibit_done = 0;
  pmu_cmd_e cmd = CMD_NONE;
  logic [NUM_BANDS-1:0] cmd_bands = 0, band_en;
  cc_mode_e mode;
  logic imaging, tlm_mon_en, pbit_en, ibit_active, default_params, cmd_rejected;

  int checks = 0, failures = 0;

  cc_top dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ------------------------------------------------------ mechanism counters
  typedef enum int {
    EV_INIT, EV_WAIT, EV_STANDBY, EV_READY, EV_DEF_READY, EV_IMAGING, EV_IBIT,
    EV_WAIT_TIMEOUT, EV_PENDING_CMD, EV_CMD_REJECT, EV_SER_FRAME, EV_SER_OVERRUN,
    EV_PAN_SYNC, EV_MS_SYNC, EV_A2D_CONV, EV_SRAM_WR, EV_SRAM_RD, EV_FETCH_LOADER,
    EV_FETCH_CODE, EV_FLASH_PROG, EV_WD_TIMEOUT, EV_MANUAL_RESET, EV_TX_COMBINE,
    EV_RX_FANOUT, EV_CLK_HELD, EV_CLK_FORWARDED, EV_NUM
  } ev_e;
  int ev [EV_NUM];
  string ev_name [EV_NUM] = '{"mode INIT", "mode WAIT", "mode STANDBY", "mode READY_IMAGE",
    "mode default READY_IMAGE", "mode IMAGING", "mode IBIT", "WAIT timeout",
    "pending command executed", "command rejected", "FPE serial frame", "serial overrun",
    "PAN line sync", "MS line sync", "A/D conversion", "SRAM write", "SRAM read",
    "fetch from loader flash", "fetch from code flash", "flash programming",
    "watchdog timeout", "manual reset", "RS-422 transmit combining", "RS-422 receive fan-out",
    "FPE clocks held (EN_CLKS low)", "FPE clocks forwarded"};

  cc_mode_e prev_mode;
  logic prev_pan, prev_ms, prev_sync, prev_sclk, prev_wdo, prev_sram_we, prev_sram_oe;
  logic prev_ld, prev_code, prev_flwe, prev_start;
  logic [7:0] rx_shift;
  int rx_bits;
  always @(posedge clk) begin
    if (rst_n) begin
      if (mode != prev_mode || $past(!rst_n)) begin
        case (mode)
          MODE_INIT: ev[EV_INIT]++;
          MODE_WAIT: ev[EV_WAIT]++;
          MODE_STANDBY: ev[EV_STANDBY]++;
          MODE_READY_IMAGE: ev[EV_READY]++;
          MODE_DEF_READY_IMAGE: ev[EV_DEF_READY]++;
          MODE_IMAGING: ev[EV_IMAGING]++;
          MODE_IBIT: ev[EV_IBIT]++;
          default: ;
        endcase
        if (prev_mode == MODE_WAIT && mode == MODE_DEF_READY_IMAGE) ev[EV_WAIT_TIMEOUT]++;
      end
      if (cmd_rejected) ev[EV_CMD_REJECT]++;
      if (mode == MODE_STANDBY && dut.u_mode_ctrl.pend_valid) ev[EV_PENDING_CMD]++;
      if (pan_line_sync && !prev_pan) ev[EV_PAN_SYNC]++;
      if (ms_line_sync && !prev_ms) ev[EV_MS_SYNC]++;
      if (!ser_sync && prev_sync) ev[EV_SER_FRAME]++;
      if (!wdo_n && prev_wdo && mr_n) ev[EV_WD_TIMEOUT]++;
      if (!sram_we_n && prev_sram_we) ev[EV_SRAM_WR]++;
      if (!sram_oe_n && prev_sram_oe) ev[EV_SRAM_RD]++;
      if (!fl_loader_cs_n && prev_ld && !psen_n) ev[EV_FETCH_LOADER]++;
      if (!fl_code_cs_n && prev_code && !psen_n) ev[EV_FETCH_CODE]++;
      if (!fl_we_n && prev_flwe) ev[EV_FLASH_PROG]++;
      if (!adc_start && prev_start) ev[EV_A2D_CONV]++;
    end
    prev_mode <= mode; prev_pan <= pan_line_sync; prev_ms <= ms_line_sync;
    prev_sync <= ser_sync; prev_sclk <= ser_clk; prev_wdo <= wdo_n;
    prev_sram_we <= sram_we_n; prev_sram_oe <= sram_oe_n; prev_ld <= fl_loader_cs_n;
    prev_code <= fl_code_cs_n; prev_flwe <= fl_we_n; prev_start <= adc_start;
    if (ser_sync && !prev_sync) rx_bits <= 0;
    if (ser_sync && ser_clk && !prev_sclk) begin
      rx_shift <= {rx_shift[6:0], ser_tx};
      rx_bits  <= rx_bits + 1;
    end
  end

  // converter model: value = channel * 7 + 1, ready 9 clocks after start
  initial begin
    adc_ready = 0; adc_data = 0;
    forever begin
      @(posedge clk);
      if (rst_n && adc_start && !adc_ready) begin
        repeat (9) @(posedge clk);
        adc_data  <= 8'(amux_sel * 7 + 1);
        adc_ready <= 1;
      end else if (!adc_start) adc_ready <= 0;
    end
  end

  // microcontroller keeps toggling the watchdog while kick_en is set
  logic kick_en = 1;
  initial forever begin
    repeat (WD_CYC / 4) @(negedge clk);
    if (kick_en) wdi = ~wdi;
  end

  // PMU line sync, period LINE_CYC, while line_run is set. About 6,800
  // lines per second: 1 m PAN lines at a ground speed of about 6.8 km/s.
  localparam int LINE_CYC = CLK_HZ / 6800;
  logic line_run = 0;
  initial forever begin
    @(negedge clk);
    if (line_run) begin
      pmu_line_sync = 1;
      repeat (3) @(negedge clk);
      pmu_line_sync = 0;
      repeat (LINE_CYC - 4) @(negedge clk);
    end
  end

  // ------------------------------------------------------------- bus model
  task automatic bus_addr(logic [15:0] a);
    @(negedge clk);
    a_hi = a[15:8]; ad_in = a[7:0]; ale = 1;
    @(negedge clk);
    ale = 0;
  endtask

  task automatic bus_write(logic [15:0] a, logic [7:0] d);
    bus_addr(a);
    ad_in = d; wr_n = 0;
    repeat (4) @(negedge clk);
    wr_n = 1;
    @(negedge clk);
    ad_in = 8'($urandom);
    repeat (3) @(negedge clk);
  endtask

  task automatic bus_read(logic [15:0] a, output logic [7:0] d);
    bus_addr(a);
    ad_in = 8'($urandom); rd_n = 0;
    repeat (4) @(negedge clk);
    d = ad_oe ? ad_out : 8'hEE;
    rd_n = 1;
    repeat (4) @(negedge clk);
  endtask

  task automatic fetch(logic [15:0] a);
    bus_addr(a);
    psen_n = 0;
    repeat (4) @(negedge clk);
    psen_n = 1;
    repeat (4) @(negedge clk);
  endtask

  task automatic send(pmu_cmd_e c, logic [NUM_BANDS-1:0] b = '0);
    @(negedge clk);
    cmd = c; cmd_bands = b; cmd_valid = 1;
    @(negedge clk);
    cmd_valid = 0; cmd = CMD_NONE;
  endtask

  task automatic serial_cmd(logic [7:0] b);
    logic [7:0] st;
    int f0;
    f0 = ev[EV_SER_FRAME];
    bus_write({REG_PAGE, REG_SERIAL}, b);
    bus_write({REG_PAGE, REG_SERIAL}, ~b);     // too early: dropped
    bus_read({REG_PAGE, REG_SERIAL}, st);
    if (st[1]) ev[EV_SER_OVERRUN]++;
    while (ev[EV_SER_FRAME] == f0) @(negedge clk);
    chk(rx_shift == b && rx_bits == 8, $sformatf("FPE command %h received as %h", b, rx_shift));
  endtask

  task automatic telemetry(logic [4:0] ch);
    logic [7:0] d;
    bus_write({REG_PAGE, REG_A2D_CTRL}, {3'b0, ch});
    do bus_read({REG_PAGE, REG_A2D_CTRL}, d); while (!d[7]);
    bus_read({REG_PAGE, REG_A2D_DATA}, d);
    chk(d == 8'(ch * 7 + 1), $sformatf("telemetry channel %0d = %h", ch, d));
  endtask

  localparam longint LIMIT = 64'(WAIT_CYC) + 64'(WD_CYC) * 4 + 200_000;
  initial begin
    repeat (LIMIT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int t, p0, m0;
    foreach (ev[i]) ev[i] = 0;
    rx_shift = 0; rx_bits = 0; prev_mode = MODE_INIT;
    fpe_clk_pulses[0] = 0; fpe_clk_pulses[1] = 0;
    fast_run = 1;  // the gates see their reset through fast clock edges
    repeat (3) @(negedge clk);
    rst_n = 1;
    fast_run = 0;
    // boot from the loader flash, then PUBIT done
    fetch(16'h0000);
    fetch(16'h0003);
    repeat (10) @(negedge clk);
    init_done = 1;
    @(negedge clk);
    init_done = 0;
    chk(mode == MODE_WAIT, "WAIT after initialisation");
    fpe_clk_pulses[0] = 0; fpe_clk_pulses[1] = 0;
    fast_run = 1;
    repeat (20) @(negedge clk);
    fast_run = 0;
    if (fpe_clk_pulses[0] == 0 && fpe_clk_pulses[1] == 0) ev[EV_CLK_HELD]++;
    else chk(0, "FPE clocks running before EN_CLKS");

    // no PMU contact: default imaging after 20 s
    t = 0;
    while (mode == MODE_WAIT) begin @(negedge clk); t++; end
    chk(t >= WAIT_CYC - 20 && t <= WAIT_CYC, $sformatf("WAIT left after %0d clocks", t));
    @(negedge clk);
    chk(mode == MODE_IMAGING && default_params && band_en == '1, "default imaging, all bands");
    // software enables clocks and both line syncs for imaging
    bus_write({REG_PAGE, REG_DISCRETE}, 8'h1F);
    line_run = 1;
    p0 = ev[EV_PAN_SYNC]; m0 = ev[EV_MS_SYNC];
    fpe_clk_pulses[0] = 0; fpe_clk_pulses[1] = 0;
    fast_run = 1;
    repeat (20) @(negedge clk);
    fast_run = 0;
    if (fpe_clk_pulses[0] > 20 && fpe_clk_pulses[1] > 15) ev[EV_CLK_FORWARDED]++;
    else chk(0, "FPE clocks not forwarded with EN_CLKS");
    repeat (16 * LINE_CYC) @(negedge clk);
    chk(ev[EV_PAN_SYNC] - p0 >= 15 && ev[EV_PAN_SYNC] - p0 <= 17, "PAN line rate");
    chk((ev[EV_MS_SYNC] - m0) * 4 >= (ev[EV_PAN_SYNC] - p0) - 3 &&
        (ev[EV_MS_SYNC] - m0) * 4 <= (ev[EV_PAN_SYNC] - p0) + 3, "MS at a quarter of the PAN rate");

    // first PMU command: back to STANDBY, then IBIT executed
    send(CMD_IBIT);
    chk(mode == MODE_STANDBY && !default_params, "STANDBY on first PMU contact");
    bus_write({REG_PAGE, REG_DISCRETE}, 8'h00);
    line_run = 0;
    @(negedge clk);
    chk(mode == MODE_IBIT && band_en == '0, "IBIT with all FPEs disabled");
    send(CMD_START_IMAGING);                     // not allowed in IBIT
    telemetry(5'd3);
    ibit_done = 1;
    @(negedge clk);
    ibit_done = 0;
    chk(mode == MODE_STANDBY, "STANDBY after IBIT");

    // commanded imaging with PAN and MS band 2
    send(CMD_READY_IMAGE, 5'b00101);
    chk(mode == MODE_READY_IMAGE && band_en == 5'b00101 && tlm_mon_en, "READY_IMAGE");
    bus_write({REG_PAGE, REG_DISCRETE}, 8'h18);   // clocks on, detectors out of reset
    serial_cmd(8'h5A);
    telemetry(5'd17);
    send(CMD_START_IMAGING);
    chk(mode == MODE_IMAGING && imaging, "IMAGING");
    bus_write({REG_PAGE, REG_DISCRETE}, 8'h1F);
    line_run = 1;
    repeat (8 * LINE_CYC) @(negedge clk);
    send(CMD_STOP_IMAGING);
    line_run = 0;
    chk(mode == MODE_READY_IMAGE, "imaging stopped");
    send(CMD_STANDBY);
    chk(mode == MODE_STANDBY && band_en == '0, "STANDBY");

    // memories: SRAM, flash switch-over and programming
    bus_write(16'h0200, 8'h42);
    bus_read(16'h0200, d);
    chk(d == 8'hEE, "FPGA does not drive the bus for SRAM reads");
    bus_read(16'h8000, d);
    bus_write({REG_PAGE, REG_FLASH_CTRL}, 8'h02);
    bus_write(16'h8000, 8'h99);
    bus_write({REG_PAGE, REG_FLASH_CTRL}, 8'h01);
    fetch(16'h0000);
    bus_read({REG_PAGE, REG_FLASH_CTRL}, d);
    chk(d == 8'h01, "running from code flash");

    // RS-422: each transmitter reaches the PMU line, receive fans out
    for (int s = 0; s < 3; s++) begin
      @(negedge clk);
      {uart_txd, mcu_pri_txd, mcu_red_txd} = ~(3'b100 >> s);
      repeat (4) @(negedge clk);
      if (!rs422_txd) ev[EV_TX_COMBINE]++;
      {uart_txd, mcu_pri_txd, mcu_red_txd} = 3'b111;
      repeat (4) @(negedge clk);
      chk(rs422_txd, "transmit line idle high");
    end
    rs422_rxd = 0;
    repeat (4) @(negedge clk);
    if (!uart_rxd && !mcu_pri_rxd && !mcu_red_rxd) ev[EV_RX_FANOUT]++;
    rs422_rxd = 1;

    // microcontroller hangs: watchdog fires after 1.6 s
    chk(wdo_n && wd_timeouts == 0, "no watchdog reset while toggled");
    kick_en = 0;
    t = 0;
    while (wdo_n && t < 2 * WD_CYC) begin @(negedge clk); t++; end
    chk(t <= WD_CYC + 5, $sformatf("watchdog fired %0d clocks after kicks stopped", t));
    chk(wd_timeouts == 1, "one watchdog timeout");
    while (!wdo_n) @(negedge clk);
    kick_en = 1;
    // manual reset
    mr_n = 0;
    repeat (4) @(negedge clk);
    if (!wdo_n) ev[EV_MANUAL_RESET]++;
    mr_n = 1;
    repeat (4) @(negedge clk);
    chk(wdo_n, "manual reset released");

    foreach (ev[i]) begin
      checks++;
      if (ev[i] == 0) begin
        failures++;
        $display("FAIL: mechanism never happened: %s", ev_name[i]);
      end else $display("  %-28s %0d", ev_name[i], ev[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
