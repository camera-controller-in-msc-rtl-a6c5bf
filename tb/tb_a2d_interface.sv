// Testbench for a2d_interface with a small converter model: the model raises
// ready a random time after the start line rises and returns a value made
// from the selected channel. Checks the multiplexer channel, the start/ready
// handshake, the latched result, the done flag and that a start during a
// conversion is ignored.
module tb_a2d_interface;
  import cc_pkg::*;
  logic clk = 0, rst_n = 0;
  cpu_acc_t acc;
  logic adc_ready, adc_start, done;
  logic [7:0] adc_data, ctrl_rdata, data_rdata;
  logic [4:0] amux_sel;
  int checks = 0, failures = 0;
  int conv_delay;

  a2d_interface dut (.*);

  always #5 clk = ~clk;

  // converter model
  initial begin
    adc_ready = 0; adc_data = 0;
    forever begin
      @(posedge clk);
      if (rst_n && adc_start && !adc_ready) begin
        repeat (conv_delay) @(posedge clk);
        adc_data  <= {amux_sel, 3'b101} ^ 8'h5A;
        adc_ready <= 1;
      end else if (!adc_start) begin
        adc_ready <= 0;
      end
    end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wr(logic [7:0] off, logic [7:0] d);
    acc = '{wr: 1'b1, rd: 1'b0, addr: {REG_PAGE, off}, data: d};
    @(negedge clk);
    acc = '0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] ch;
    int t;
    acc = '0; conv_delay = 5;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!adc_start && !done, "idle after reset");
    for (int i = 0; i < 40; i++) begin
      ch = 5'($urandom);
      conv_delay = $urandom_range(1, 30);
      wr(REG_A2D_CTRL, {3'b0, ch});
      chk(adc_start, "start raised");
      chk(amux_sel == ch, "mux channel");
      chk(ctrl_rdata[6] && !ctrl_rdata[7], "status busy");
      // a second start is ignored
      wr(REG_A2D_CTRL, {3'b0, ~ch});
      chk(amux_sel == ch, "start during conversion ignored");
      t = 0;
      while (!done) begin @(negedge clk); t++; end
      chk(t >= conv_delay && t <= conv_delay + 6, $sformatf("conversion time %0d for delay %0d", t, conv_delay));
      chk(!adc_start, "start dropped after ready");
      chk(data_rdata == ({ch, 3'b101} ^ 8'h5A), "result");
      chk(ctrl_rdata == {1'b1, 1'b0, 1'b0, ch}, "status done");
      acc = '{wr: 1'b0, rd: 1'b1, addr: {REG_PAGE, REG_A2D_DATA}, data: 8'h0};
      @(negedge clk);
      acc = '0;
      chk(!done, "done cleared by reading the result");
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
