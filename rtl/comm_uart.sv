// comm_uart: routing of the RS-422 command link between the PMU and the
// controller's UARTs.
//
// Transmit data to the PMU can come from the on-board UART device or from
// the serial ports of the primary and the redundant microcontroller. An idle
// serial line is high, so the block combines the three transmit lines with
// an AND: whichever source is sending sets the line. Receive data from the
// PMU is fanned out to all three receivers. Inputs from outside the FPGA
// pass a two-flop synchroniser and outputs are registered, so the block
// adds three clocks of delay in each direction and no glitches.
//
// The AND of the primary and redundant lines follows the controller's
// description; including the on-board UART in the same AND, the fan-out of
// the receive line and the synchronisers are this design's own choice.
module comm_uart (
  input  logic clk,
  input  logic rst_n,
  input  logic uart_txd,      // on-board UART transmit
  input  logic mcu_pri_txd,   // primary microcontroller transmit
  input  logic mcu_red_txd,   // redundant microcontroller transmit
  input  logic rs422_rxd,     // from the PMU (via line receiver)
  output logic rs422_txd,     // to the PMU (via line driver)
  output logic uart_rxd,
  output logic mcu_pri_rxd,
  output logic mcu_red_rxd
);

  logic [1:0] tx_u, tx_p, tx_r, rx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_u <= 2'b11; tx_p <= 2'b11; tx_r <= 2'b11; rx_q <= 2'b11;
      rs422_txd   <= 1'b1;
      uart_rxd    <= 1'b1;
      mcu_pri_rxd <= 1'b1;
      mcu_red_rxd <= 1'b1;
    end else begin
      tx_u <= {tx_u[0], uart_txd};
      tx_p <= {tx_p[0], mcu_pri_txd};
      tx_r <= {tx_r[0], mcu_red_txd};
      rx_q <= {rx_q[0], rs422_rxd};
      rs422_txd   <= tx_u[1] & tx_p[1] & tx_r[1];
      uart_rxd    <= rx_q[1];
      mcu_pri_rxd <= rx_q[1];
      mcu_red_rxd <= rx_q[1];
    end
  end

endmodule
