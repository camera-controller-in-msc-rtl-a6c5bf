// cc_mode_ctrl: operating-mode state machine of the camera controller.
//
// The controller is a slave of the PMU: apart from power-up and the loss of
// communication, every mode change is requested by a PMU command. Modes:
//   INIT            after reset; left when init_done reports the end of the
//                   initialisation and the power-up BIT.
//   WAIT            waits WAIT_S seconds (20 s) for a PMU command.
//                   - READY_IMAGE command      -> READY_IMAGE
//                   - any other command        -> STANDBY, and the command is
//                                                 then executed there
//                   - no command in time       -> DEF_READY_IMAGE
//   DEF_READY_IMAGE ready-imaging with the default parameters (all bands);
//                   START_IMAGING is set automatically, so the next clock is
//                   IMAGING with default_params set. The first PMU command in
//                   this default operation means communication is up: the
//                   controller goes to STANDBY and executes the command there.
//   STANDBY         all bands off, no FPE telemetry, periodic BIT running.
//                   READY_IMAGE command -> READY_IMAGE, IBIT command -> IBIT.
//   READY_IMAGE     selected bands powered, their telemetry monitored,
//                   periodic BIT on the selected bands.
//                   START_IMAGING -> IMAGING, STANDBY command -> STANDBY.
//   IMAGING         as READY_IMAGE with imaging running.
//                   STOP_IMAGING -> READY_IMAGE, STANDBY command -> STANDBY.
//   IBIT            initiated BIT with all FPEs disabled; ibit_done -> STANDBY.
// A command that has no meaning in the current mode is dropped and reported
// by a one-clock cmd_rejected pulse.
//
// The modes, their transitions and what is active in each follow the
// controller's mode description. In the original controller this state
// machine is software on the microcontroller; here it is written as a
// hardware state machine. The command encoding, the band mask, the single
// pending-command register and leaving IMAGING directly on a STANDBY command
// are this design's own choices. Timing: a command (cmd_valid for one
// clock) changes the mode on the next clock; a pending command is executed
// one clock after STANDBY is entered.
module cc_mode_ctrl
  import cc_pkg::*;
#(
  parameter int unsigned CLK_HZ = cc_pkg::DEFAULT_CLK_HZ,
  parameter int unsigned WAIT_S = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init_done,     // initialisation and PUBIT finished
  input  logic                 cmd_valid,     // PMU command received
  input  pmu_cmd_e             cmd,
  input  logic [NUM_BANDS-1:0] cmd_bands,     // band selection of READY_IMAGE
  input  logic                 ibit_done,     // initiated BIT finished
  output cc_mode_e             mode,
  output logic [NUM_BANDS-1:0] band_en,       // band power enables
  output logic                 imaging,       // imaging running (line syncs on)
  output logic                 tlm_mon_en,    // FPE telemetry monitoring
  output logic                 pbit_en,       // periodic BIT running
  output logic                 ibit_active,
  output logic                 default_params,
  output logic                 cmd_rejected
);

  localparam longint unsigned WAIT_CYC = longint'(CLK_HZ) * WAIT_S;
  localparam int unsigned     TW       = $clog2(WAIT_CYC + 1);

  logic [TW-1:0]        wait_cnt;
  logic [NUM_BANDS-1:0] bands_q;
  logic                 pend_valid;
  pmu_cmd_e             pend_cmd;
  logic [NUM_BANDS-1:0] pend_bands;

  // Command seen by STANDBY/READY/IMAGING: a fresh one or the pending one.
  logic                 c_valid;
  pmu_cmd_e             c_cmd;
  logic [NUM_BANDS-1:0] c_bands;

  always_comb begin
    c_valid = cmd_valid;
    c_cmd   = cmd;
    c_bands = cmd_bands;
    if (pend_valid && mode == MODE_STANDBY) begin
      c_valid = 1'b1;
      c_cmd   = pend_cmd;
      c_bands = pend_bands;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode           <= MODE_INIT;
      wait_cnt       <= '0;
      bands_q        <= '0;
      default_params <= 1'b0;
      pend_valid     <= 1'b0;
      pend_cmd       <= CMD_NONE;
      pend_bands     <= '0;
      cmd_rejected   <= 1'b0;
    end else begin
      cmd_rejected <= 1'b0;
      unique case (mode)
        MODE_INIT: begin
          wait_cnt <= '0;
          if (init_done) mode <= MODE_WAIT;
          if (cmd_valid) cmd_rejected <= 1'b1;
        end
        MODE_WAIT: begin
          if (cmd_valid && cmd == CMD_READY_IMAGE) begin
            mode    <= MODE_READY_IMAGE;
            bands_q <= cmd_bands;
          end else if (cmd_valid && cmd != CMD_NONE) begin
            mode       <= MODE_STANDBY;
            pend_valid <= (cmd != CMD_STANDBY);
            pend_cmd   <= cmd;
            pend_bands <= cmd_bands;
          end else if (wait_cnt == TW'(WAIT_CYC - 1)) begin
            mode           <= MODE_DEF_READY_IMAGE;
            bands_q        <= '1;
            default_params <= 1'b1;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        MODE_DEF_READY_IMAGE: begin
          mode <= MODE_IMAGING;                    // automatic START_IMAGING
        end
        MODE_STANDBY: begin
          pend_valid <= 1'b0;
          if (c_valid) begin
            unique case (c_cmd)
              CMD_READY_IMAGE: begin
                mode    <= MODE_READY_IMAGE;
                bands_q <= c_bands;
              end
              CMD_IBIT:                       mode <= MODE_IBIT;
              CMD_STANDBY, CMD_OTHER, CMD_NONE: ;
              default:                        cmd_rejected <= 1'b1;
            endcase
          end
        end
        MODE_READY_IMAGE, MODE_IMAGING: begin
          if (cmd_valid && default_params && cmd != CMD_NONE) begin
            // first contact with the PMU during default imaging
            mode           <= MODE_STANDBY;
            default_params <= 1'b0;
            bands_q        <= '0;
            pend_valid     <= (cmd != CMD_STANDBY);
            pend_cmd       <= cmd;
            pend_bands     <= cmd_bands;
          end else if (cmd_valid) begin
            unique case (cmd)
              CMD_STANDBY: begin
                mode    <= MODE_STANDBY;
                bands_q <= '0;
              end
              CMD_START_IMAGING: begin
                if (mode == MODE_READY_IMAGE) mode <= MODE_IMAGING;
                else                          cmd_rejected <= 1'b1;
              end
              CMD_STOP_IMAGING: begin
                if (mode == MODE_IMAGING) mode <= MODE_READY_IMAGE;
                else                      cmd_rejected <= 1'b1;
              end
              CMD_OTHER, CMD_NONE: ;
              default: cmd_rejected <= 1'b1;
            endcase
          end
        end
        MODE_IBIT: begin
          if (ibit_done) mode <= MODE_STANDBY;
          if (cmd_valid && cmd != CMD_OTHER && cmd != CMD_NONE) cmd_rejected <= 1'b1;
        end
        default: mode <= MODE_INIT;
      endcase
    end
  end

  // Mode outputs
  always_comb begin
    band_en     = '0;
    imaging     = 1'b0;
    tlm_mon_en  = 1'b0;
    pbit_en     = 1'b0;
    ibit_active = 1'b0;
    unique case (mode)
      MODE_STANDBY: pbit_en = 1'b1;
      MODE_READY_IMAGE, MODE_DEF_READY_IMAGE: begin
        band_en    = bands_q;
        tlm_mon_en = 1'b1;
        pbit_en    = 1'b1;
      end
      MODE_IMAGING: begin
        band_en    = bands_q;
        tlm_mon_en = 1'b1;
        pbit_en    = 1'b1;
        imaging    = 1'b1;
      end
      MODE_IBIT: ibit_active = 1'b1;
      default: ;
    endcase
  end

endmodule
