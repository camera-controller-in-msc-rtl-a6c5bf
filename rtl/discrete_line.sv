// discrete_line: register of the discrete enable lines.
//
// The CPU writes REG_DISCRETE; each bit drives one enable line that serves
// other FPGA sub-blocks or leaves the FPGA: the PAN and MS line-sync enables
// (used by line_sync_pan_ms), the detector reset line RST_LOW, the buffer
// enable EN_BUF_DA and EN_CLKS, which lets the fast clocks out to the focal
// plane electronics. The register reads back at the same address.
//
// The set of lines and their use follow the controller's description; the
// bit positions and the reset value (all lines low, so the clocks are held
// off and RST_LOW holds the detectors in reset) are this design's own choice.
// Timing: the lines change one clock after the write strobe.
module discrete_line
  import cc_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  cpu_acc_t  acc,
  output discrete_t lines,
  output logic [7:0] rdata   // read-back value of REG_DISCRETE
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      lines <= '0;
    else if (acc.wr && acc.addr == {REG_PAGE, REG_DISCRETE})
      lines <= acc.data[4:0];
  end

  assign rdata = {3'b000, lines};

endmodule
