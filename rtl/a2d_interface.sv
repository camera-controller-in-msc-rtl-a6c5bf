// a2d_interface: control of the telemetry A/D converter and its analog
// multiplexer.
//
// A CPU write to REG_A2D_CTRL selects the multiplexer channel (data bits
// 4:0) and starts a conversion: adc_start (the converter's enable) goes high
// and stays high until the converter raises adc_ready. The block then latches
// adc_data, drops adc_start and sets done. The CPU reads the result at
// REG_A2D_DATA; that read clears done. REG_A2D_CTRL reads as
// {done, busy, 1'b0, chan[4:0]}. A start while a conversion is running is
// ignored.
//
// That this block tells the converter when to sample and carries converted
// data back to the microcontroller's 8-bit bus follows the controller's
// description; the handshake (enable held until ready), the 8-bit result,
// the 32-channel multiplexer and the register layout are this design's own
// choice. Timing: adc_start rises one clock after the write strobe; the
// result is latched three clocks after adc_ready rises (two-flop
// synchroniser plus one).
module a2d_interface
  import cc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  cpu_acc_t   acc,
  input  logic       adc_ready,   // conversion complete, from the converter
  input  logic [7:0] adc_data,    // converted value
  output logic       adc_start,   // enable / start of conversion
  output logic [4:0] amux_sel,    // analog multiplexer channel
  output logic       done,
  output logic [7:0] ctrl_rdata,  // REG_A2D_CTRL read value
  output logic [7:0] data_rdata   // REG_A2D_DATA read value
);

  logic [1:0] rdy_sync;
  logic [7:0] result;

  assign ctrl_rdata = {done, adc_start, 1'b0, amux_sel};
  assign data_rdata = result;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdy_sync  <= '0;
      result    <= '0;
      adc_start <= 1'b0;
      amux_sel  <= '0;
      done      <= 1'b0;
    end else begin
      rdy_sync <= {rdy_sync[0], adc_ready};
      if (acc.rd && acc.addr == {REG_PAGE, REG_A2D_DATA}) done <= 1'b0;
      if (acc.wr && acc.addr == {REG_PAGE, REG_A2D_CTRL} && !adc_start) begin
        amux_sel  <= acc.data[4:0];
        adc_start <= 1'b1;
        done      <= 1'b0;
      end else if (adc_start && rdy_sync[1]) begin
        result    <= adc_data;
        adc_start <= 1'b0;
        done      <= 1'b1;
      end
    end
  end

endmodule
