// address_latch: lower-address latch for the multiplexed 80C32 bus.
//
// The microcontroller drives the low address byte on its AD[7:0] port while
// ALE is high and then reuses the same pins for data. This block captures
// AD[7:0] in every clock cycle in which ALE is high and holds the value once
// ALE has fallen, so that the low address bits stay valid for the rest of the
// bus cycle. The captured byte feeds the FPGA's address decoding and is also
// driven out as A[7:0] to the external memories.
//
// That the block latches the low address from ALE in the CPU clock follows
// the controller's block diagram; sampling ALE synchronously (instead of a
// transparent latch) is this design's own choice, made so the whole FPGA is
// one clock domain. Timing: addr_lo follows ad_in one clock after a cycle
// with ale high.
module address_latch (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ale,     // address latch enable from the CPU
  input  logic [7:0] ad_in,   // multiplexed address/data port
  output logic [7:0] addr_lo  // latched low address byte
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   addr_lo <= '0;
    else if (ale) addr_lo <= ad_in;
  end

endmodule
