// Testbench for uart_rx. A line driver here sends frames at 16 x D clocks per bit with a
// random phase against the sample tick. It checks received bytes for every line format,
// and each error flag: a wrong parity bit (pe), a low stop bit and a glitch inside a data
// bit (frame), a line held low for two frame times (break), and 18 frames with no read
// (overrun: 16 bytes in the FIFO, one in the hold register, the 18th dropped). It also
// checks that rd clears the flags and that rx_empty follows the FIFO.
module tb_uart_rx;
  import uart_pkg::*;
  import uart_tb_pkg::*;
  localparam int D = 4;
  localparam int BIT = 16 * D;
  logic clk = 0, rst_n = 0;
  logic [7:0] lcr_byte = 8'h7F;
  lcr_t cfg;
  logic sample_tick = 0, rxin = 1, rd = 0, rx_empty;
  logic [7:0] rxout;
  err_t flags;
  int checks = 0, failures = 0;
  longint cyc = 0;

  assign cfg = lcr_t'(lcr_byte);

  uart_rx dut (.clk, .rst_n, .cfg, .sample_tick, .rxin, .rd, .rxout, .rx_empty, .flags);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    sample_tick <= (cyc % D) == 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // kind: 0 good, 1 wrong parity, 2 low stop bit, 3 glitch in data bit 1
  task automatic send(logic [7:0] d, int kind);
    logic [11:0] f;
    int n;
    n = ref_frame(d, lcr_byte, f);
    if (kind == 1) f[1 + ref_data_bits(lcr_byte)] = ~f[1 + ref_data_bits(lcr_byte)];
    if (kind == 2) f[n - 1 - int'(lcr_byte[7])] = 1'b0;
    repeat ($urandom % D) @(negedge clk);
    for (int b = 0; b < n; b++) begin
      @(negedge clk) rxin = f[b];
      if (kind == 3 && b == 2) begin
        // inverted for ticks 7 and 8 of the bit: two of the four centre samples
        repeat (7 * D - 1) @(negedge clk);
        rxin = ~f[b];
        repeat (2 * D) @(negedge clk);
        rxin = f[b];
        repeat (BIT - 9 * D) @(negedge clk);
      end else repeat (BIT - 1) @(negedge clk);
    end
    @(negedge clk) rxin = 1;
    if (kind == 2) repeat (BIT) @(negedge clk);
  endtask

  task automatic wait_data();
    int t = 0;
    while (rx_empty && t < 40 * BIT) begin @(negedge clk); t++; end
    check(!rx_empty, "byte arrived in the FIFO");
  endtask

  task automatic read_check(logic [7:0] exp);
    @(negedge clk) rd = 1;
    @(negedge clk) rd = 0;
    check(rxout == exp, $sformatf("rxout %h expected %h", rxout, exp));
  endtask

  initial begin
    logic [7:0] d;
    logic [7:0] q [$];
    #12 rst_n = 1;
    repeat (4) @(negedge clk);
    check(rx_empty && flags == '0, "empty and no flags after reset");
    // Good frames in random formats.
    for (int k = 0; k < 60; k++) begin
      lcr_byte = 8'($urandom);
      d = 8'($urandom);
      send(d, 0);
      wait_data();
      check(flags == '0, $sformatf("no error flags on a good frame (%b), lcr %h", flags, lcr_byte));
      read_check(ref_mask(d, lcr_byte));
      check(rx_empty, "FIFO empty after the read");
    end
    // Parity error.
    for (int k = 0; k < 10; k++) begin
      lcr_byte = 8'($urandom) | 8'h10;
      d = 8'($urandom);
      send(d, 1);
      wait_data();
      check(flags.parity && !flags.frame && !flags.overrun && !flags.brk, "parity error flagged alone");
      read_check(ref_mask(d, lcr_byte));
      @(negedge clk);
      check(flags == '0, "rd clears the flags");
    end
    // Low stop bit.
    for (int k = 0; k < 10; k++) begin
      lcr_byte = 8'($urandom);
      d = 8'($urandom);
      send(d, 2);
      wait_data();
      check(flags.frame && !flags.parity, "frame error on a low stop bit");
      read_check(ref_mask(d, lcr_byte));
    end
    // Glitch inside a data bit: samples disagree.
    for (int k = 0; k < 10; k++) begin
      lcr_byte = 8'($urandom) & 8'hEF;  // no parity, so only the frame error can show
      d = 8'($urandom);
      send(d, 3);
      wait_data();
      check(flags.frame, "frame error when the four samples of a bit disagree");
      read_check(ref_mask(d, lcr_byte));
    end
    // Break: line low for two frame times.
    lcr_byte = 8'h7F;
    @(negedge clk) rxin = 0;
    repeat (2 * 11 * BIT) @(negedge clk);
    check(flags.brk, "break flagged while the line is held low");
    check(flags.frame, "the break frame has a frame error");
    @(negedge clk) rxin = 1;
    repeat (2 * BIT) @(negedge clk);
    wait_data();
    read_check(8'h00);
    check(rx_empty, "one byte per break");
    @(negedge clk);
    send(8'h5A, 0);
    wait_data();
    check(flags == '0, "receiver works again after a break");
    read_check(8'h5A);
    // Overrun.
    lcr_byte = 8'h7B;  // 8E1 at any rate (rate unused here)
    q.delete();
    for (int k = 0; k < 18; k++) begin
      d = 8'($urandom);
      q.push_back(d);
      send(d, 0);
      repeat (BIT) @(negedge clk);
      if (k < 17) check(!flags.overrun, $sformatf("no overrun after %0d frames", k + 1));
    end
    check(flags.overrun, "overrun after 18 frames without a read");
    for (int k = 0; k < 17; k++) read_check(q[k]);
    @(negedge clk);
    check(rx_empty, "18th frame was dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
