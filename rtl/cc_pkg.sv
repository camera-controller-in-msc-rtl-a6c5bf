// cc_pkg: types and constants shared by the camera-controller FPGA logic and
// the mode controller.
//
// The controller sits on the multiplexed address/data bus of an 80C32-class
// microcontroller. The bus is sampled synchronously in the FPGA clock domain;
// a completed CPU access is handed to the functional sub-blocks as a one-cycle
// strobe in a cpu_acc_t. The memory map and register layout below are this
// design's own choice: the partitioning into SRAM, two flash devices and FPGA
// registers follows the controller's block diagram, the addresses do not.
package cc_pkg;

  // FPGA/CPU clock frequency (Hz). Used to turn the specified times
  // (1.6 s watchdog, 20 s WAIT timeout) into cycle counts.
  parameter int unsigned DEFAULT_CLK_HZ = 12_000_000;

  // ---------------------------------------------------------------- memory map
  // 0x0000-0x7FFF  external data SRAM
  // 0x8000-0xBFFF  data window onto the flash device that is not executing
  // 0xC000-0xC0FF  FPGA registers
  localparam logic [15:0] SRAM_LAST      = 16'h7FFF;
  localparam logic [1:0]  FLASH_WIN_A15_14 = 2'b10;
  localparam logic [7:0]  REG_PAGE       = 8'hC0;

  // FPGA register offsets (low address byte inside REG_PAGE)
  localparam logic [7:0] REG_DISCRETE   = 8'h00; // R/W enables, see discrete_t
  localparam logic [7:0] REG_SERIAL     = 8'h01; // W: byte to FPE, R: {6'b0, overrun, busy}
  localparam logic [7:0] REG_A2D_CTRL   = 8'h02; // W: start on channel, R: {done, busy, 1'b0, chan}
  localparam logic [7:0] REG_A2D_DATA   = 8'h03; // R: last conversion (clears done)
  localparam logic [7:0] REG_FLASH_CTRL = 8'h04; // R/W {6'b0, prog_en, code_sel}

  // One completed CPU access, valid for a single clock.
  typedef struct packed {
    logic        wr;    // write strobe (end of WR_n pulse)
    logic        rd;    // read strobe (start of RD_n pulse)
    logic [15:0] addr;  // full 16-bit address
    logic [7:0]  data;  // write data (don't care for reads)
  } cpu_acc_t;

  // Discrete enable lines, one bit each in REG_DISCRETE (bit 0 first).
  typedef struct packed {
    logic en_clks;          // bit 4: forward the fast clocks to the FPEs
    logic en_buf_da;        // bit 3: enable of the data/address buffers
    logic rst_low;          // bit 2: detector reset line (level as written)
    logic line_sync_en_ms;  // bit 1: enable of the MS line sync
    logic line_sync_en_pan; // bit 0: enable of the PAN line sync
  } discrete_t;

  // ------------------------------------------------------------- mode control
  typedef enum logic [2:0] {
    MODE_INIT              = 3'd0,
    MODE_WAIT              = 3'd1,
    MODE_STANDBY           = 3'd2,
    MODE_READY_IMAGE       = 3'd3,
    MODE_DEF_READY_IMAGE   = 3'd4,
    MODE_IMAGING           = 3'd5,
    MODE_IBIT              = 3'd6
  } cc_mode_e;

  typedef enum logic [2:0] {
    CMD_NONE          = 3'd0,
    CMD_STANDBY       = 3'd1, // "IDLE mode" request
    CMD_READY_IMAGE   = 3'd2,
    CMD_START_IMAGING = 3'd3,
    CMD_STOP_IMAGING  = 3'd4,
    CMD_IBIT          = 3'd5,
    CMD_OTHER         = 3'd6  // any other PMU message (telemetry request ...)
  } pmu_cmd_e;

  // Spectral bands: bit 0 PAN, bits 1..4 MS bands 1..4.
  localparam int unsigned NUM_BANDS = 5;

endpackage
