// Testbench for ram_interface: random addresses and access types against a
// reference decode with one clock of latency.
module tb_ram_interface;
  logic clk = 0, rst_n = 0;
  logic [15:0] addr = 0;
  logic rd_act = 0, wr_act = 0;
  logic sram_cs_n, sram_oe_n, sram_we_n;
  logic e_cs, e_oe, e_we;
  int checks = 0, failures = 0, hits = 0;

  ram_interface dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      addr = 16'($urandom);
      case ($urandom_range(0, 2))
        0: begin rd_act = 1; wr_act = 0; end
        1: begin rd_act = 0; wr_act = 1; end
        default: begin rd_act = 0; wr_act = 0; end
      endcase
      e_cs = !(addr < 16'h8000 && (rd_act || wr_act));
      e_oe = !(addr < 16'h8000 && rd_act);
      e_we = !(addr < 16'h8000 && wr_act);
      if (!e_cs) hits++;
      @(negedge clk);
      checks++;
      if ({sram_cs_n, sram_oe_n, sram_we_n} !== {e_cs, e_oe, e_we}) begin
        failures++;
        $display("addr %h rd %b wr %b: got %b%b%b", addr, rd_act, wr_act,
                 sram_cs_n, sram_oe_n, sram_we_n);
      end
    end
    checks++;
    if (hits < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
