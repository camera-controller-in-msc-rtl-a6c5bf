// Testbench for comm_uart: random line levels against a reference AND of the
// three transmit lines and fan-out of the receive line, three clocks later.
module tb_comm_uart;
  logic clk = 0, rst_n = 0;
  logic uart_txd = 1, mcu_pri_txd = 1, mcu_red_txd = 1, rs422_rxd = 1;
  logic rs422_txd, uart_rxd, mcu_pri_rxd, mcu_red_rxd;
  logic [3:0] hist_tx [0:3];
  logic [3:0] hist_rx;
  int checks = 0, failures = 0, zeros = 0;

  comm_uart dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] tx_hist, rx_hist;
    tx_hist = '1; rx_hist = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      uart_txd    = ($urandom_range(0, 3) != 0);
      mcu_pri_txd = ($urandom_range(0, 3) != 0);
      mcu_red_txd = ($urandom_range(0, 3) != 0);
      rs422_rxd   = 1'($urandom);
      tx_hist = {tx_hist[2:0], uart_txd & mcu_pri_txd & mcu_red_txd};
      rx_hist = {rx_hist[2:0], rs422_rxd};
      @(negedge clk);
      // values driven three clocks ago appear now
      if (i >= 3) begin
        checks++;
        if (rs422_txd !== tx_hist[2] || uart_rxd !== rx_hist[2] ||
            mcu_pri_rxd !== rx_hist[2] || mcu_red_rxd !== rx_hist[2]) begin
          failures++;
          $display("mismatch at %0d", i);
        end
        if (!tx_hist[2]) zeros++;
      end
    end
    checks++;
    if (zeros < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
