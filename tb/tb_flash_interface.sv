// Testbench for flash_interface: program fetches from the loader after
// reset, switching execution to the code flash, reading and programming the
// other flash through the data window, and write protection.
module tb_flash_interface;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  cpu_acc_t acc;
  logic [15:0] addr = 0;
  logic psen_n = 1, rd_act = 0, wr_act = 0;
  logic fl_loader_cs_n, fl_code_cs_n, fl_oe_n, fl_we_n, code_sel, prog_en;
  logic [7:0] rdata;
  int checks = 0, failures = 0;

  flash_interface dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic set_ctrl(logic [1:0] v);
    acc = '{wr: 1'b1, rd: 1'b0, addr: {REG_PAGE, REG_FLASH_CTRL}, data: {6'b0, v}};
    @(negedge clk);
    acc = '0;
    @(negedge clk);
    chk(rdata == {6'b0, v}, "control read-back");
  endtask

  // expect {loader_cs_n, code_cs_n, oe_n, we_n} after the synchroniser
  task automatic access(bit fetch, bit rd, bit wr, logic [15:0] a, logic [3:0] exp, string msg);
    addr = a; psen_n = !fetch; rd_act = rd; wr_act = wr;
    repeat (4) @(negedge clk);
    chk({fl_loader_cs_n, fl_code_cs_n, fl_oe_n, fl_we_n} == exp,
        $sformatf("%s: got %b expected %b", msg,
                  {fl_loader_cs_n, fl_code_cs_n, fl_oe_n, fl_we_n}, exp));
    psen_n = 1; rd_act = 0; wr_act = 0;
    repeat (4) @(negedge clk);
    chk({fl_loader_cs_n, fl_code_cs_n, fl_oe_n, fl_we_n} == 4'b1111, {msg, " idle"});
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    chk(!code_sel && !prog_en, "reset: run from loader, protected");
    access(1, 0, 0, 16'h0123, 4'b0101, "fetch from loader");
    access(0, 1, 0, 16'h8123, 4'b1001, "read code flash via window");
    access(0, 0, 1, 16'h8123, 4'b1111, "protected write ignored");
    access(0, 1, 0, 16'h4000, 4'b1111, "SRAM read not a flash access");
    set_ctrl(2'b10);
    access(0, 0, 1, 16'h9000, 4'b1010, "program code flash");
    set_ctrl(2'b01);
    chk(code_sel && !prog_en, "switched to code flash");
    access(1, 0, 0, 16'h0040, 4'b1001, "fetch from code flash");
    access(0, 1, 0, 16'hA000, 4'b0101, "read loader via window");
    set_ctrl(2'b11);
    access(0, 0, 1, 16'hBFFF, 4'b0110, "program loader flash");
    access(0, 0, 1, 16'hC000, 4'b1111, "register write not a flash access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
