// serial_data: synchronous serial command link to the focal plane
// electronics (FPEs).
//
// Commands from the PMU are written by the CPU, one byte at a time, into
// REG_SERIAL. The block sends each byte over three lines: TX (data), CLK
// (serial clock) and SYNC (frame). SYNC is high for the whole frame of
// BITS bits, sent MSB first. Each bit lasts 2*CLK_HALF system clocks: TX
// changes while CLK is low and CLK then rises in the middle of the bit, so
// the receiver samples TX on the rising CLK edge. Outside a frame TX, CLK
// and SYNC are low.
//
// REG_SERIAL reads as {6'b0, overrun, busy}. A write while a frame is being
// sent is dropped and sets overrun, which a read of REG_SERIAL clears.
//
// That the link is synchronous and uses TX, CLK and SYNC is the controller's
// own definition; the frame format, bit order, clock rate and overrun
// handling are this design's choice. Timing: SYNC rises one clock after the
// write strobe; a frame takes BITS*2*CLK_HALF clocks; busy falls one clock
// after SYNC does.
module serial_data
  import cc_pkg::*;
#(
  parameter int unsigned BITS     = 8,
  parameter int unsigned CLK_HALF = 4   // system clocks per half serial clock
) (
  input  logic       clk,
  input  logic       rst_n,
  input  cpu_acc_t   acc,
  output logic       ser_tx,
  output logic       ser_clk,
  output logic       ser_sync,
  output logic       busy,
  output logic [7:0] rdata
);

  localparam int unsigned DW = (CLK_HALF > 1) ? $clog2(CLK_HALF) : 1;
  localparam int unsigned BW = $clog2(BITS + 1);

  logic [BITS-1:0] shreg;
  logic [DW-1:0]   div_cnt;
  logic [BW-1:0]   bits_left;
  logic            overrun;
  logic            sel;

  assign sel   = (acc.addr == {REG_PAGE, REG_SERIAL});
  assign rdata = {6'b0, overrun, busy};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg     <= '0;
      div_cnt   <= '0;
      bits_left <= '0;
      busy      <= 1'b0;
      overrun   <= 1'b0;
      ser_tx    <= 1'b0;
      ser_clk   <= 1'b0;
      ser_sync  <= 1'b0;
    end else begin
      if (acc.rd && sel) overrun <= 1'b0;
      if (acc.wr && sel && busy) overrun <= 1'b1;

      if (!busy) begin
        if (acc.wr && sel) begin
          busy      <= 1'b1;
          ser_sync  <= 1'b1;
          ser_clk   <= 1'b0;
          ser_tx    <= acc.data[BITS-1];
          shreg     <= acc.data[BITS-1:0] << 1;
          bits_left <= BW'(BITS);
          div_cnt   <= '0;
        end
      end else if (div_cnt != DW'(CLK_HALF - 1)) begin
        div_cnt <= div_cnt + 1'b1;
      end else begin
        div_cnt <= '0;
        if (!ser_clk) begin
          ser_clk <= 1'b1;                  // middle of the bit
        end else begin
          ser_clk   <= 1'b0;                // end of the bit
          bits_left <= bits_left - 1'b1;
          if (bits_left == BW'(1)) begin
            busy     <= 1'b0;
            ser_sync <= 1'b0;
            ser_tx   <= 1'b0;
          end else begin
            ser_tx <= shreg[BITS-1];
            shreg  <= shreg << 1;
          end
        end
      end
    end
  end

endmodule
