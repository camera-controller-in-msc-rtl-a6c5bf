// Testbench for serial_data: sends random bytes, decodes the TX/CLK/SYNC
// lines like a receiver (sample TX on rising CLK while SYNC is high), checks
// the frame length in clocks, the busy flag and the overrun flag.
module tb_serial_data;
  import cc_pkg::*;
  localparam int CLK_HALF = 3;
  logic clk = 0, rst_n = 0;
  cpu_acc_t acc;
  logic ser_tx, ser_clk, ser_sync, busy;
  logic [7:0] rdata;
  int checks = 0, failures = 0;

  // receiver
  logic [7:0] rx_shift;
  int rx_bits, sync_len, last_len, frames;
  logic prev_clk, prev_sync;

  serial_data #(.CLK_HALF(CLK_HALF)) dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    prev_clk  <= ser_clk;
    prev_sync <= ser_sync;
    if (ser_sync) sync_len <= sync_len + 1;
    if (ser_sync && !prev_sync) begin rx_bits <= 0; sync_len <= 1; end
    if (ser_sync && ser_clk && !prev_clk) begin
      rx_shift <= {rx_shift[6:0], ser_tx};
      rx_bits  <= rx_bits + 1;
    end
    if (!ser_sync && prev_sync) begin last_len <= sync_len; frames <= frames + 1; end
  end

  task automatic chk(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic write_reg(logic [7:0] d);
    acc.wr = 1; acc.rd = 0; acc.addr = {REG_PAGE, REG_SERIAL}; acc.data = d;
    @(negedge clk);
    acc = '0;
  endtask

  task automatic read_status(output logic [7:0] d);
    acc.wr = 0; acc.rd = 1; acc.addr = {REG_PAGE, REG_SERIAL}; acc.data = 0;
    d = rdata;
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
    logic [7:0] b, st;
    int f0;
    acc = '0; rx_shift = 0; rx_bits = 0; sync_len = 0; last_len = 0; frames = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!ser_sync && !ser_clk && !busy, "idle lines");
    for (int i = 0; i < 20; i++) begin
      b  = 8'($urandom);
      f0 = frames;
      write_reg(b);
      chk(busy && ser_sync, "frame started");
      // a write during the frame is dropped and flags overrun
      if (i % 4 == 1) begin
        write_reg(~b);
        read_status(st);
        chk(st[1] == 1'b1 && st[0] == 1'b1, "overrun and busy flags");
        read_status(st);
        chk(st[1] == 1'b0, "overrun cleared by read");
      end
      while (frames == f0) @(negedge clk);
      chk(rx_bits == 8, "8 bits in frame");
      chk(rx_shift == b, $sformatf("byte %h received as %h", b, rx_shift));
      chk(last_len == 8 * 2 * CLK_HALF, $sformatf("frame length %0d", last_len));
      @(negedge clk);
      chk(!busy, "busy cleared");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
