// watch_dog: supervisor of the microcontroller.
//
// The microcontroller must toggle the watchdog input wdi. Every edge of wdi
// (after a two-flop synchroniser) restarts a timer. If no edge arrives for
// TIMEOUT_MS milliseconds (1.6 s), the block pulls its active-low reset
// output wdo_n low for PULSE_MS milliseconds; this acts as an interrupt that
// resets the microcontroller. The timer then starts again. The active-low
// manual reset input mr_n forces wdo_n low for as long as it is held low and
// restarts the timer. timeout_cnt counts the resets issued by the timer.
//
// The polling scheme, the 1.6 s period and the active-low manual reset
// follow the controller's description; the clock rate, the width of the
// reset pulse and the restart after a pulse are this design's own choice.
// Timing: wdo_n falls TIMEOUT_MS*CLK_HZ/1000 clocks after the last
// synchronised wdi edge, and two clocks after mr_n falls.
module watch_dog #(
  parameter int unsigned CLK_HZ     = cc_pkg::DEFAULT_CLK_HZ,
  parameter int unsigned TIMEOUT_MS = 1600,
  parameter int unsigned PULSE_MS   = 200
) (
  input  logic       clk,
  input  logic       rst_n,        // power-on reset
  input  logic       wdi,          // toggled by the microcontroller
  input  logic       mr_n,         // manual reset, active low
  output logic       wdo_n,        // reset / interrupt to the microcontroller
  output logic [7:0] timeout_cnt   // number of timeouts seen (saturating)
);

  localparam longint unsigned TIMEOUT_CYC = longint'(CLK_HZ) * TIMEOUT_MS / 1000;
  localparam longint unsigned PULSE_CYC   = longint'(CLK_HZ) * PULSE_MS / 1000;
  localparam int unsigned     CW = $clog2((TIMEOUT_CYC > PULSE_CYC ? TIMEOUT_CYC : PULSE_CYC) + 1);

  logic [2:0]    wdi_q;
  logic [1:0]    mr_q;
  logic [CW-1:0] cnt;
  logic          pulsing;
  logic          kick;

  assign kick  = wdi_q[1] ^ wdi_q[2];
  assign wdo_n = ~(pulsing || !mr_q[1]);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wdi_q       <= '0;
      mr_q        <= 2'b11;
      cnt         <= '0;
      pulsing     <= 1'b0;
      timeout_cnt <= '0;
    end else begin
      wdi_q <= {wdi_q[1:0], wdi};
      mr_q  <= {mr_q[0], mr_n};
      if (!mr_q[1]) begin
        cnt     <= '0;
        pulsing <= 1'b0;
      end else if (pulsing) begin
        if (cnt == CW'(PULSE_CYC - 1)) begin
          pulsing <= 1'b0;
          cnt     <= '0;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end else if (kick) begin
        cnt <= '0;
      end else if (cnt == CW'(TIMEOUT_CYC - 1)) begin
        pulsing <= 1'b1;
        cnt     <= '0;
        if (timeout_cnt != 8'hFF) timeout_cnt <= timeout_cnt + 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
