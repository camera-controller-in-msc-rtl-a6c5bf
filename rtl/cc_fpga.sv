// cc_fpga: the camera controller's FPGA.
//
// Three blocks: decode_latch (bus decoding, discrete enables, FPE serial
// link, line syncs, memory chip selects, A/D control), watch_dog (1.6 s
// supervisor of the microcontroller with manual reset) and comm_uart
// (combination of the UART lines towards the PMU's RS-422 link). The
// division into these three blocks follows the controller's description.
// All logic runs on one clock, except the two fast-clock gates inside
// decode_latch, which run on the clocks they forward; asynchronous inputs are
// synchronised in the block that uses them.
module cc_fpga
  import cc_pkg::*;
#(
  parameter int unsigned CLK_HZ        = cc_pkg::DEFAULT_CLK_HZ,
  parameter int unsigned WD_TIMEOUT_MS = 1600,
  parameter int unsigned WD_PULSE_MS   = 200,
  parameter int unsigned SER_CLK_HALF  = 4,
  parameter int unsigned MS_RATIO      = 4,
  parameter int unsigned SYNC_PULSE_W  = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  // microcontroller bus
  input  logic [7:0] ad_in,
  output logic [7:0] ad_out,
  output logic       ad_oe,
  input  logic [7:0] a_hi,
  input  logic       ale,
  input  logic       rd_n,
  input  logic       wr_n,
  input  logic       psen_n,
  output logic [7:0] mem_a_lo,
  // memories
  output logic       sram_cs_n,
  output logic       sram_oe_n,
  output logic       sram_we_n,
  output logic       fl_loader_cs_n,
  output logic       fl_code_cs_n,
  output logic       fl_oe_n,
  output logic       fl_we_n,
  // focal plane electronics
  output logic       ser_tx,
  output logic       ser_clk,
  output logic       ser_sync,
  input  logic       pmu_line_sync,
  output logic       pan_line_sync,
  output logic       ms_line_sync,
  output discrete_t  discretes,
  input  logic [1:0] fast_clk_in,   // master and serial clock from the oscillators
  output logic [1:0] fpe_clk_out,   // the same, gated by EN_CLKS, to the FPEs
  // telemetry A/D converter
  input  logic       adc_ready,
  input  logic [7:0] adc_data,
  output logic       adc_start,
  output logic [4:0] amux_sel,
  // watchdog
  input  logic       wdi,
  input  logic       mr_n,
  output logic       wdo_n,
  output logic [7:0] wd_timeouts,
  // serial lines
  input  logic       uart_txd,
  input  logic       mcu_pri_txd,
  input  logic       mcu_red_txd,
  input  logic       rs422_rxd,
  output logic       rs422_txd,
  output logic       uart_rxd,
  output logic       mcu_pri_rxd,
  output logic       mcu_red_rxd
);

  decode_latch #(
    .SER_CLK_HALF(SER_CLK_HALF), .MS_RATIO(MS_RATIO), .SYNC_PULSE_W(SYNC_PULSE_W),
    .NUM_FAST_CLKS(2)
  ) u_decode_latch (
    .clk, .rst_n, .ad_in, .ad_out, .ad_oe, .a_hi, .ale, .rd_n, .wr_n, .psen_n,
    .mem_a_lo, .sram_cs_n, .sram_oe_n, .sram_we_n,
    .fl_loader_cs_n, .fl_code_cs_n, .fl_oe_n, .fl_we_n,
    .ser_tx, .ser_clk, .ser_sync, .pmu_line_sync, .pan_line_sync, .ms_line_sync,
    .discretes, .fast_clk_in, .fpe_clk_out, .adc_ready, .adc_data, .adc_start, .amux_sel
  );

  watch_dog #(
    .CLK_HZ(CLK_HZ), .TIMEOUT_MS(WD_TIMEOUT_MS), .PULSE_MS(WD_PULSE_MS)
  ) u_watch_dog (
    .clk, .rst_n, .wdi, .mr_n, .wdo_n, .timeout_cnt(wd_timeouts)
  );

  comm_uart u_comm_uart (
    .clk, .rst_n, .uart_txd, .mcu_pri_txd, .mcu_red_txd, .rs422_rxd,
    .rs422_txd, .uart_rxd, .mcu_pri_rxd, .mcu_red_rxd
  );

endmodule
