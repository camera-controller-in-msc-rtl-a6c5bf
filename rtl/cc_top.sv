// cc_top: the camera controller (CC) of a two-channel push-broom camera.
//
// Two parts stand side by side, each with its own ports:
//   cc_fpga       the controller FPGA: microcontroller bus decoding, memory
//                 chip selects, discrete enables, the TX/CLK/SYNC link to
//                 the focal plane electronics, PAN/MS line syncs, gating of
//                 the fast master and serial clocks to the FPEs, telemetry
//                 A/D control, the watchdog and the RS-422 line combining.
//   cc_mode_ctrl  the operating-mode state machine (INIT, WAIT, STANDBY,
//                 READY_IMAGE, default READY_IMAGE, IMAGING, IBIT) driven by
//                 PMU commands. In the original controller it runs as
//                 software on the microcontroller, which is not part of this
//                 RTL; its PMU command input and mode outputs are ports here.
// The microcontroller, SRAM, flash devices, A/D converter and multiplexer,
// RS-422 transceivers, oscillators and regulators are external parts; their
// signals are the ports of cc_fpga.
module cc_top
  import cc_pkg::*;
#(
  parameter int unsigned CLK_HZ        = cc_pkg::DEFAULT_CLK_HZ,
  parameter int unsigned WD_TIMEOUT_MS = 1600,
  parameter int unsigned WD_PULSE_MS   = 200,
  parameter int unsigned WAIT_S        = 20,
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
  output logic       mcu_red_rxd,
  // mode control
  input  logic                 init_done,
  input  logic                 cmd_valid,
  input  pmu_cmd_e             cmd,
  input  logic [NUM_BANDS-1:0] cmd_bands,
  input  logic                 ibit_done,
  output cc_mode_e             mode,
  output logic [NUM_BANDS-1:0] band_en,
  output logic                 imaging,
  output logic                 tlm_mon_en,
  output logic                 pbit_en,
  output logic                 ibit_active,
  output logic                 default_params,
  output logic                 cmd_rejected
);

  cc_fpga #(
    .CLK_HZ(CLK_HZ), .WD_TIMEOUT_MS(WD_TIMEOUT_MS), .WD_PULSE_MS(WD_PULSE_MS),
    .SER_CLK_HALF(SER_CLK_HALF), .MS_RATIO(MS_RATIO), .SYNC_PULSE_W(SYNC_PULSE_W)
  ) u_fpga (
    .clk, .rst_n, .ad_in, .ad_out, .ad_oe, .a_hi, .ale, .rd_n, .wr_n, .psen_n,
    .mem_a_lo, .sram_cs_n, .sram_oe_n, .sram_we_n,
    .fl_loader_cs_n, .fl_code_cs_n, .fl_oe_n, .fl_we_n,
    .ser_tx, .ser_clk, .ser_sync, .pmu_line_sync, .pan_line_sync, .ms_line_sync,
    .discretes, .fast_clk_in, .fpe_clk_out, .adc_ready, .adc_data, .adc_start, .amux_sel,
    .wdi, .mr_n, .wdo_n, .wd_timeouts,
    .uart_txd, .mcu_pri_txd, .mcu_red_txd, .rs422_rxd,
    .rs422_txd, .uart_rxd, .mcu_pri_rxd, .mcu_red_rxd
  );

  cc_mode_ctrl #(.CLK_HZ(CLK_HZ), .WAIT_S(WAIT_S)) u_mode_ctrl (
    .clk, .rst_n, .init_done, .cmd_valid, .cmd, .cmd_bands, .ibit_done,
    .mode, .band_en, .imaging, .tlm_mon_en, .pbit_en, .ibit_active,
    .default_params, .cmd_rejected
  );

endmodule
