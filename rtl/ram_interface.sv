// ram_interface: chip select and strobes of the external data SRAM.
//
// The SRAM occupies the lower half of the CPU's external data space
// (0x0000-0x7FFF). During a read or write of that range the block asserts
// the active-low chip select together with the output enable (read) or the
// write enable (write). Address and data lines go to the SRAM directly; only
// the control lines pass through the FPGA.
//
// That the FPGA makes the SRAM access signals and chip select follows the
// controller's block diagram; the address range and the registered outputs
// are this design's own choice. Timing: outputs follow the synchronised
// RD/WR levels by one clock.
module ram_interface
  import cc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] addr,
  input  logic        rd_act,    // synchronised read level
  input  logic        wr_act,    // synchronised write level
  output logic        sram_cs_n,
  output logic        sram_oe_n,
  output logic        sram_we_n
);

  logic hit;
  assign hit = (addr <= SRAM_LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_cs_n <= 1'b1;
      sram_oe_n <= 1'b1;
      sram_we_n <= 1'b1;
    end else begin
      sram_cs_n <= ~(hit && (rd_act || wr_act));
      sram_oe_n <= ~(hit && rd_act);
      sram_we_n <= ~(hit && wr_act && !rd_act);
    end
  end

endmodule
