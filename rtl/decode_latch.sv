// decode_latch: the central block of the controller FPGA.
//
// It connects the microcontroller's multiplexed bus to the FPGA functions:
//   address_latch    captures A[7:0] on ALE
//   d_a_adapter      forms the 16-bit address, turns RD_n/WR_n into access
//                    strobes and drives register read data onto AD[7:0]
//   discrete_line    enable lines (line-sync enables, RST_LOW, EN_BUF_DA,
//                    EN_CLKS)
//   serial_data      synchronous TX/CLK/SYNC command link to the FPEs
//   line_sync_pan_ms PAN and MS line syncs from the PMU line sync
//   ram_interface    SRAM chip select and strobes
//   flash_interface  chip selects of the loader and code flash devices
//   a2d_interface    telemetry A/D converter start, multiplexer and read-back
//   fpe_clk_gate     one per fast clock: lets the clock out to the FPEs
//                    while EN_CLKS is set
// The read multiplexer for the FPGA register page (see cc_pkg) lives here.
// The split into these sub-blocks and their connections follow the FPGA
// block diagram; the register map is this design's own choice.
module decode_latch
  import cc_pkg::*;
#(
  parameter int unsigned SER_CLK_HALF = 4,
  parameter int unsigned MS_RATIO     = 4,
  parameter int unsigned SYNC_PULSE_W = 4,
  parameter int unsigned NUM_FAST_CLKS = 2   // master clock and serial clock
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
  output logic [7:0] mem_a_lo,       // latched A[7:0] to the memories
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
  input  logic [NUM_FAST_CLKS-1:0] fast_clk_in,   // fast clocks from the oscillators
  output logic [NUM_FAST_CLKS-1:0] fpe_clk_out,   // fast clocks to the FPEs
  // telemetry A/D converter
  input  logic       adc_ready,
  input  logic [7:0] adc_data,
  output logic       adc_start,
  output logic [4:0] amux_sel
);

  logic [7:0]  addr_lo;
  logic [15:0] addr;
  logic        rd_act, wr_act;
  cpu_acc_t    acc;
  logic [7:0]  rdata;
  logic [7:0]  disc_rd, ser_rd, a2d_ctrl_rd, a2d_data_rd, flash_rd;

  assign mem_a_lo = addr_lo;

  address_latch u_address_latch (
    .clk, .rst_n, .ale, .ad_in, .addr_lo
  );

  d_a_adapter u_d_a_adapter (
    .clk, .rst_n, .ad_in, .a_hi, .addr_lo, .rd_n, .wr_n, .rdata,
    .ad_out, .ad_oe, .acc, .addr, .rd_act, .wr_act
  );

  discrete_line u_discrete_line (
    .clk, .rst_n, .acc, .lines(discretes), .rdata(disc_rd)
  );

  serial_data #(.CLK_HALF(SER_CLK_HALF)) u_serial_data (
    .clk, .rst_n, .acc, .ser_tx, .ser_clk, .ser_sync, .busy(), .rdata(ser_rd)
  );

  line_sync_pan_ms #(.MS_RATIO(MS_RATIO), .PULSE_W(SYNC_PULSE_W)) u_line_sync (
    .clk, .rst_n, .pmu_line_sync,
    .en_pan(discretes.line_sync_en_pan), .en_ms(discretes.line_sync_en_ms),
    .pan_sync(pan_line_sync), .ms_sync(ms_line_sync)
  );

  ram_interface u_ram_interface (
    .clk, .rst_n, .addr, .rd_act, .wr_act, .sram_cs_n, .sram_oe_n, .sram_we_n
  );

  flash_interface u_flash_interface (
    .clk, .rst_n, .acc, .addr, .psen_n, .rd_act, .wr_act,
    .fl_loader_cs_n, .fl_code_cs_n, .fl_oe_n, .fl_we_n,
    .code_sel(), .prog_en(), .rdata(flash_rd)
  );

  a2d_interface u_a2d_interface (
    .clk, .rst_n, .acc, .adc_ready, .adc_data, .adc_start, .amux_sel,
    .done(), .ctrl_rdata(a2d_ctrl_rd), .data_rdata(a2d_data_rd)
  );

  for (genvar i = 0; i < NUM_FAST_CLKS; i++) begin : g_clk_gate
    fpe_clk_gate u_fpe_clk_gate (
      .clk_in(fast_clk_in[i]), .rst_n, .en(discretes.en_clks), .clk_out(fpe_clk_out[i])
    );
  end

  // Register read multiplexer (the 8-bit data path back to the CPU).
  always_comb begin
    unique case (addr_lo)
      REG_DISCRETE:   rdata = disc_rd;
      REG_SERIAL:     rdata = ser_rd;
      REG_A2D_CTRL:   rdata = a2d_ctrl_rd;
      REG_A2D_DATA:   rdata = a2d_data_rd;
      REG_FLASH_CTRL: rdata = flash_rd;
      default:        rdata = 8'h00;
    endcase
  end

endmodule
