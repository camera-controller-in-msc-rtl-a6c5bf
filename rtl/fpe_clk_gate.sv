// fpe_clk_gate: glitch-free gate that lets one fast clock out to the focal
// plane electronics only while the EN_CLKS discrete line is set.
//
// The enable comes from the controller clock domain, so it first passes a
// two-flop synchroniser clocked by the fast clock. The synchronised enable is
// then re-registered on the falling edge of the fast clock and ANDed with the
// clock: it can only change while the clock is low, so the output never
// carries a shortened high phase. clk_out starts or stops after two to three
// fast-clock cycles and always with a whole pulse.
//
// Forwarding the fast clocks to the FPEs under EN_CLKS follows the
// controller's description; the gating circuit is this design's own choice.
// In an FPGA this maps onto the device's clock-enable buffer.
module fpe_clk_gate (
  input  logic clk_in,    // fast clock from the oscillator
  input  logic rst_n,     // asynchronous reset, active low
  input  logic en,        // EN_CLKS, from the controller clock domain
  output logic clk_out    // gated clock to the FPEs
);

  logic [1:0] en_sync;
  logic       en_neg;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) en_sync <= '0;
    else        en_sync <= {en_sync[0], en};
  end

  always_ff @(negedge clk_in or negedge rst_n) begin
    if (!rst_n) en_neg <= 1'b0;
    else        en_neg <= en_sync[1];
  end

  assign clk_out = clk_in & en_neg;

endmodule
