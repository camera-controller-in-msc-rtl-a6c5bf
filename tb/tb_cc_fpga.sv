// Testbench for cc_fpga at a scaled clock (CLK_HZ = 1000, watchdog period
// 1600 clocks). A microcontroller bus model (ALE, multiplexed AD[7:0], RD_n,
// WR_n, PSEN_n) drives the FPGA through its register map.
// Checked: discrete enables and read-back, a command byte sent over the
// TX/CLK/SYNC link and decoded by a receiver model, busy/overrun status,
// PAN and MS line syncs from PMU line-sync pulses, a telemetry conversion
// through a converter model, SRAM and flash chip selects, and that the FPGA
// drives AD[7:0] only for register reads; the fast clocks reach the FPEs
// only while EN_CLKS is set; then the watchdog timeout, its
// pulse and the manual reset, and the RS-422 line combining.
module tb_cc_fpga;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] ad_in = 0, ad_out, a_hi = 0, mem_a_lo;
  logic ad_oe, ale = 0, rd_n = 1, wr_n = 1, psen_n = 1;
  logic sram_cs_n, sram_oe_n, sram_we_n, fl_loader_cs_n, fl_code_cs_n, fl_oe_n, fl_we_n;
  logic ser_tx, ser_clk, ser_sync, pmu_line_sync = 0, pan_line_sync, ms_line_sync;
  discrete_t discretes;
  logic [1:0] fast_clk_in = 0, fpe_clk_out;
  int fpe_clk_pulses [2];
  always #2 fast_clk_in[0] = ~fast_clk_in[0];
  always #3 fast_clk_in[1] = ~fast_clk_in[1];
  always @(posedge fpe_clk_out[0]) if (rst_n) fpe_clk_pulses[0]++;
  always @(posedge fpe_clk_out[1]) if (rst_n) fpe_clk_pulses[1]++;
  logic adc_ready, adc_start;
  logic [7:0] adc_data;
  logic [4:0] amux_sel;
  logic wdi = 0, mr_n = 1, wdo_n;
  logic [7:0] wd_timeouts;
  logic uart_txd = 1, mcu_pri_txd = 1, mcu_red_txd = 1, rs422_rxd = 1;
  logic rs422_txd, uart_rxd, mcu_pri_rxd, mcu_red_rxd;
  int checks = 0, failures = 0;

  cc_fpga #(.CLK_HZ(1000)) dut (.*);

  // the microcontroller toggles the watchdog every 400 clocks while kick_en
  logic kick_en = 1;
  initial forever begin
    repeat (400) @(negedge clk);
    if (kick_en) wdi = ~wdi;
  end

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------------------------------------------------------------- monitors
  logic seen_sram_cs, seen_sram_oe, seen_sram_we, seen_ld_cs, seen_code_cs, seen_fl_oe,
        seen_fl_we, seen_oe;
  logic [7:0] seen_a_lo;
  always @(posedge clk) begin
    if (!sram_cs_n)      seen_sram_cs <= 1;
    if (!sram_oe_n)      seen_sram_oe <= 1;
    if (!sram_we_n)      seen_sram_we <= 1;
    if (!fl_loader_cs_n) seen_ld_cs   <= 1;
    if (!fl_code_cs_n)   seen_code_cs <= 1;
    if (!fl_oe_n)        seen_fl_oe   <= 1;
    if (!fl_we_n)        seen_fl_we   <= 1;
    if (ad_oe)           seen_oe      <= 1;
    if (!rd_n || !wr_n || !psen_n) seen_a_lo <= mem_a_lo;
  end
  task automatic clear_seen();
    seen_sram_cs = 0; seen_sram_oe = 0; seen_sram_we = 0; seen_ld_cs = 0;
    seen_code_cs = 0; seen_fl_oe = 0; seen_fl_we = 0; seen_oe = 0;
  endtask

  // receiver of the FPE serial link
  logic [7:0] rx_shift;
  int rx_bits, rx_frames;
  logic prev_sclk, prev_sync;
  always @(posedge clk) begin
    prev_sclk <= ser_clk;
    prev_sync <= ser_sync;
    if (ser_sync && !prev_sync) rx_bits <= 0;
    if (ser_sync && ser_clk && !prev_sclk) begin
      rx_shift <= {rx_shift[6:0], ser_tx};
      rx_bits  <= rx_bits + 1;
    end
    if (rst_n && !ser_sync && prev_sync) rx_frames <= rx_frames + 1;
  end

  // line-sync pulse counters
  int pan_pulses, ms_pulses;
  logic prev_pan, prev_ms;
  always @(posedge clk) begin
    prev_pan <= pan_line_sync;
    prev_ms  <= ms_line_sync;
    if (rst_n && pan_line_sync && !prev_pan) pan_pulses <= pan_pulses + 1;
    if (rst_n && ms_line_sync && !prev_ms)   ms_pulses  <= ms_pulses + 1;
  end

  // converter model: value = 8'hA0 ^ channel*3, ready 7 clocks after start
  initial begin
    adc_ready = 0; adc_data = 0;
    forever begin
      @(posedge clk);
      if (rst_n && adc_start && !adc_ready) begin
        repeat (7) @(posedge clk);
        adc_data  <= 8'hA0 ^ 8'(amux_sel * 3);
        adc_ready <= 1;
      end else if (!adc_start) adc_ready <= 0;
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
    clear_seen();
    bus_addr(a);
    ad_in = d; wr_n = 0;
    repeat (4) @(negedge clk);
    wr_n = 1;
    @(negedge clk);
    ad_in = 8'($urandom);
    repeat (3) @(negedge clk);
  endtask

  task automatic bus_read(logic [15:0] a, output logic [7:0] d);
    clear_seen();
    bus_addr(a);
    ad_in = 8'($urandom); rd_n = 0;
    repeat (4) @(negedge clk);
    d = ad_out;
    rd_n = 1;
    repeat (4) @(negedge clk);
  endtask

  task automatic fetch(logic [15:0] a);
    clear_seen();
    bus_addr(a);
    psen_n = 0;
    repeat (4) @(negedge clk);
    psen_n = 1;
    repeat (4) @(negedge clk);
  endtask

  task automatic pmu_line();
    @(negedge clk);
    pmu_line_sync = 1;
    repeat (3) @(negedge clk);
    pmu_line_sync = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d;
    int f0;
    fpe_clk_pulses[0] = 0; fpe_clk_pulses[1] = 0;
    rx_shift = 0; rx_bits = 0; rx_frames = 0; pan_pulses = 0; ms_pulses = 0;
    clear_seen();
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);

    // discrete lines
    chk(discretes == '0, "discretes reset");
    bus_write({REG_PAGE, REG_DISCRETE}, 8'h1C);
    chk(discretes == 5'h1C, "discretes written");
    chk(fpe_clk_pulses[0] == 0 && fpe_clk_pulses[1] == 0, "FPE clocks held while EN_CLKS low");
    repeat (20) @(negedge clk);
    chk(fpe_clk_pulses[0] > 20 && fpe_clk_pulses[1] > 15, "FPE clocks forwarded with EN_CLKS");
    bus_read({REG_PAGE, REG_DISCRETE}, d);
    chk(d == 8'h1C && seen_oe, "discretes read back");
    chk(!seen_sram_cs && !seen_ld_cs && !seen_code_cs, "register access selects no memory");

    // FPE serial link
    f0 = rx_frames;
    bus_write({REG_PAGE, REG_SERIAL}, 8'hA5);
    bus_read({REG_PAGE, REG_SERIAL}, d);
    chk(d[0] == 1'b1, "serial busy");
    bus_write({REG_PAGE, REG_SERIAL}, 8'h11);       // dropped: frame running
    bus_read({REG_PAGE, REG_SERIAL}, d);
    chk(d[1] == 1'b1, "serial overrun");
    while (rx_frames == f0) @(negedge clk);
    chk(rx_shift == 8'hA5 && rx_bits == 8, $sformatf("FPE received %h", rx_shift));
    bus_read({REG_PAGE, REG_SERIAL}, d);
    chk(d == 8'h00, "serial idle, overrun cleared");

    // line syncs: enable both, 8 PMU lines -> 8 PAN, 2 MS
    bus_write({REG_PAGE, REG_DISCRETE}, 8'h03);
    for (int i = 0; i < 8; i++) pmu_line();
    chk(pan_pulses == 8, $sformatf("PAN pulses %0d", pan_pulses));
    chk(ms_pulses == 2, $sformatf("MS pulses %0d", ms_pulses));
    bus_write({REG_PAGE, REG_DISCRETE}, 8'h00);
    pmu_line();
    chk(pan_pulses == 8 && ms_pulses == 2, "line syncs disabled");
    fpe_clk_pulses[0] = 0; fpe_clk_pulses[1] = 0;
    repeat (20) @(negedge clk);
    chk(fpe_clk_pulses[0] == 0 && fpe_clk_pulses[1] == 0, "FPE clocks stopped again");

    // telemetry conversion on channel 9
    bus_write({REG_PAGE, REG_A2D_CTRL}, 8'h09);
    chk(amux_sel == 5'd9, "multiplexer channel");
    do bus_read({REG_PAGE, REG_A2D_CTRL}, d); while (!d[7]);
    bus_read({REG_PAGE, REG_A2D_DATA}, d);
    chk(d == (8'hA0 ^ 8'(9 * 3)), $sformatf("A/D result %h", d));
    bus_read({REG_PAGE, REG_A2D_CTRL}, d);
    chk(d[7] == 1'b0, "done cleared");

    // SRAM
    bus_write(16'h1234, 8'h77);
    chk(seen_sram_cs && seen_sram_we && !seen_sram_oe && !seen_oe, "SRAM write strobes");
    chk(seen_a_lo == 8'h34, "latched low address to memories");
    bus_read(16'h7FFF, d);
    chk(seen_sram_cs && seen_sram_oe && !seen_sram_we && !seen_oe, "SRAM read strobes");

    // flash
    fetch(16'h0100);
    chk(seen_ld_cs && !seen_code_cs && seen_fl_oe && !seen_sram_cs, "fetch from loader flash");
    bus_read(16'h8000, d);
    chk(seen_code_cs && !seen_ld_cs && !seen_oe, "code flash read through window");
    bus_write({REG_PAGE, REG_FLASH_CTRL}, 8'h02);
    bus_write(16'h8010, 8'h3C);
    chk(seen_code_cs && seen_fl_we, "code flash programmed");
    bus_write({REG_PAGE, REG_FLASH_CTRL}, 8'h01);
    bus_read({REG_PAGE, REG_FLASH_CTRL}, d);
    chk(d == 8'h01, "flash control read back");
    fetch(16'h0100);
    chk(seen_code_cs && !seen_ld_cs, "fetch from code flash");

    // watchdog: several periods of regular toggling first
    repeat (5000) @(negedge clk);
    chk(wdo_n && wd_timeouts == 0, "no watchdog reset while toggled");
    kick_en = 0;
    f0 = 0;
    while (wdo_n && f0 < 5000) begin @(negedge clk); f0++; end
    chk(f0 <= 1600 + 3, $sformatf("watchdog fired %0d clocks after kicks stopped", f0));
    chk(wd_timeouts == 1, "timeout counted");
    f0 = 0;
    while (!wdo_n) begin @(negedge clk); f0++; end
    chk(f0 == 200, $sformatf("reset pulse %0d clocks", f0));
    kick_en = 1;
    mr_n = 0;
    repeat (3) @(negedge clk);
    chk(!wdo_n, "manual reset");
    mr_n = 1;
    repeat (3) @(negedge clk);
    chk(wdo_n, "manual reset released");

    // RS-422 lines
    for (int s = 0; s < 8; s++) begin
      {uart_txd, mcu_pri_txd, mcu_red_txd} = 3'(s);
      rs422_rxd = s[0];
      repeat (4) @(negedge clk);
      chk(rs422_txd == (s == 7), $sformatf("transmit AND for %b", 3'(s)));
      chk(uart_rxd == s[0] && mcu_pri_rxd == s[0] && mcu_red_rxd == s[0], "receive fan-out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
