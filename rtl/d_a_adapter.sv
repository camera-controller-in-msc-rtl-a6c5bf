// d_a_adapter: data/address adapter between the 80C32 bus and the FPGA
// sub-blocks.
//
// It joins the high address byte (port 2) and the latched low byte into a
// 16-bit address, watches the RD_n and WR_n strobes and turns each completed
// access into a one-cycle cpu_acc_t strobe for the sub-blocks:
//   * write: the data on AD[7:0] is sampled directly (before the
//     synchroniser) while WR_n is low; when the synchronised WR_n rises the
//     strobe carries the last byte sampled, so the CPU may release the bus
//     right after WR_n.
//   * read : while RD_n is low and the address is in the FPGA register page,
//     AD[7:0] is driven with rdata. A strobe is issued when RD_n rises, after
//     the CPU has taken the data; sub-blocks use it for read side effects
//     such as clearing a flag, which therefore never hides the value read.
// It also gives the level versions of RD_n/WR_n and the full address for the
// memory chip-select logic.
//
// The block's name and its place between the CPU and the sub-blocks follow
// the FPGA block diagram; strobe timing and the register page are this
// design's own choice. RD_n and WR_n are passed through two flip-flops, so
// strobes come two to three clocks after the CPU edge.
module d_a_adapter
  import cc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [7:0]  ad_in,     // AD[7:0] from the CPU
  input  logic [7:0]  a_hi,      // A[15:8] (port 2)
  input  logic [7:0]  addr_lo,   // from address_latch
  input  logic        rd_n,
  input  logic        wr_n,
  input  logic [7:0]  rdata,     // register read data for the current address
  output logic [7:0]  ad_out,    // data driven to the CPU
  output logic        ad_oe,     // drive enable for ad_out
  output cpu_acc_t    acc,       // one-cycle access strobe
  output logic [15:0] addr,      // current full address
  output logic        rd_act,    // read in progress (synchronised, level)
  output logic        wr_act     // write in progress (synchronised, level)
);

  logic [1:0] rd_sync, wr_sync;
  logic       rd_q, wr_q;
  logic [7:0] wdata_q;

  assign addr   = {a_hi, addr_lo};
  assign rd_act = ~rd_sync[1];
  assign wr_act = ~wr_sync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_sync <= 2'b11;
      wr_sync <= 2'b11;
      rd_q    <= 1'b0;
      wr_q    <= 1'b0;
      wdata_q <= '0;
      acc     <= '0;
    end else begin
      rd_sync <= {rd_sync[0], rd_n};
      wr_sync <= {wr_sync[0], wr_n};
      rd_q    <= rd_act;
      wr_q    <= wr_act;
      if (!wr_n) wdata_q <= ad_in;          // data is valid while WR_n is low
      acc.wr   <= wr_q & ~wr_act;          // WR_n has risen
      acc.rd   <= rd_q & ~rd_act;          // RD_n has risen
      acc.addr <= addr;
      acc.data <= wdata_q;
    end
  end

  assign ad_oe  = rd_act && (a_hi == REG_PAGE);
  assign ad_out = ad_oe ? rdata : 8'h00;

endmodule
