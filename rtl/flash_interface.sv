// flash_interface: chip selects of the two flash devices, FLASH-Loader and
// FLASH-Code.
//
// After reset the CPU executes from the loader flash. Program fetches
// (PSEN_n low) select the flash named by code_sel: 0 = loader, 1 = code.
// The other flash is reachable as data at 0x8000-0xBFFF, so the running
// program can read it and, with prog_en set, write (program) it; this is how
// the loader reads or loads the operational code. REG_FLASH_CTRL holds
// {prog_en, code_sel} in bits 1:0 and reads back.
//
// Two flash devices operated by the FPGA, with chip selects and code read /
// loader write, follow the controller's description; the address window,
// the selection rule and the write protection bit are this design's own
// choice. Timing: outputs are registered, one clock after the synchronised
// strobes.
module flash_interface
  import cc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  cpu_acc_t    acc,
  input  logic [15:0] addr,
  input  logic        psen_n,     // program store enable from the CPU
  input  logic        rd_act,
  input  logic        wr_act,
  output logic        fl_loader_cs_n,
  output logic        fl_code_cs_n,
  output logic        fl_oe_n,
  output logic        fl_we_n,
  output logic        code_sel,
  output logic        prog_en,
  output logic [7:0]  rdata
);

  logic [1:0] psen_sync;
  logic       fetch, win, win_wr, sel_loader, sel_code;

  assign fetch  = ~psen_sync[1];
  assign win    = (addr[15:14] == FLASH_WIN_A15_14) && (rd_act || (wr_act && prog_en));
  assign win_wr = (addr[15:14] == FLASH_WIN_A15_14) && wr_act && prog_en;
  // Fetches go to the executing flash, the data window to the other one.
  assign sel_loader = (fetch && !code_sel) || (win && code_sel);
  assign sel_code   = (fetch &&  code_sel) || (win && !code_sel);
  assign rdata      = {6'b0, prog_en, code_sel};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      psen_sync      <= 2'b11;
      code_sel       <= 1'b0;
      prog_en        <= 1'b0;
      fl_loader_cs_n <= 1'b1;
      fl_code_cs_n   <= 1'b1;
      fl_oe_n        <= 1'b1;
      fl_we_n        <= 1'b1;
    end else begin
      psen_sync <= {psen_sync[0], psen_n};
      if (acc.wr && acc.addr == {REG_PAGE, REG_FLASH_CTRL}) begin
        code_sel <= acc.data[0];
        prog_en  <= acc.data[1];
      end
      fl_loader_cs_n <= ~sel_loader;
      fl_code_cs_n   <= ~sel_code;
      fl_oe_n        <= ~(fetch || (win && rd_act));
      fl_we_n        <= ~(win_wr && !fetch);
    end
  end

endmodule
