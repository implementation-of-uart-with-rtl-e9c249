// Full-size testbench: uart_top with every parameter at its default (100 MHz clock,
// 16-byte FIFOs) and the reset line format (8 data bits, even parity, one stop bit,
// 115200 baud). txout is looped back to rxin. It checks the bit period on the line and on
// Baud Out (16 x round(100e6 / (16 x 115200)) = 864 clocks), sends a burst of 8 bytes through
// the whole transmitter and receiver, reads them back with rd, and checks the flags stay
// clear and the burst takes 8 back-to-back frames of 11 bits.
module tb_uart_top_full;
  import uart_tb_pkg::*;
  localparam int BITC = 864;
  logic clk = 0, rst_n = 0;
  logic lcr_wr = 0, wr = 0, rd = 0;
  logic [7:0] lcr_din = 0, txin = 0, rxout;
  logic txe, ff, txout, baud_out, rx_empty, be, oe, pe, fe;
  int checks = 0, failures = 0;
  longint cyc = 0;

  uart_top dut (
    .clk, .rst_n, .lcr_wr, .lcr_din, .wr, .txin, .txe, .ff, .txout, .baud_out,
    .rxin(txout), .rd, .rxout, .rx_empty, .be, .oe, .pe, .fe
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // Frame start times on the line: a falling edge seen while idle, then skip the frame.
  longint starts [8];
  int nstarts = 0;
  initial begin
    @(posedge rst_n);
    while (nstarts < 8) begin
      @(negedge txout);
      starts[nstarts] = cyc;
      nstarts++;
      repeat (10 * BITC + BITC / 2) @(posedge clk);
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] data [8] = '{8'h55, 8'hAA, 8'h00, 8'hFF, 8'h81, 8'h3C, 8'h7E, 8'hC5};
    longint t0;
    #12 rst_n = 1;
    repeat (4) @(negedge clk);
    check(txe && rx_empty && txout, "idle after reset");
    for (int i = 0; i < 8; i++) begin
      @(negedge clk) wr = 1; txin = data[i];
    end
    @(negedge clk) wr = 0;
    @(negedge txout); t0 = cyc;
    @(posedge txout);
    check(cyc - t0 == BITC, $sformatf("start bit %0d clocks, expected %0d", cyc - t0, BITC));
    @(posedge baud_out); t0 = cyc;
    @(posedge baud_out);
    check(cyc - t0 == BITC, $sformatf("Baud Out period %0d clocks", cyc - t0));
    wait (nstarts == 8);
    repeat (12 * BITC) @(posedge clk);  // let the last frame arrive
    for (int i = 1; i < 8; i++)
      check(starts[i] - starts[i-1] == 11 * BITC,
            $sformatf("frame %0d started %0d clocks after the previous one, expected %0d",
                      i, starts[i] - starts[i-1], 11 * BITC));
    for (int i = 0; i < 8; i++) begin
      check(!rx_empty, "byte waiting");
      @(negedge clk) rd = 1;
      @(negedge clk) rd = 0;
      check(rxout == data[i], $sformatf("byte %0d: %h expected %h", i, rxout, data[i]));
    end
    check(rx_empty, "receive FIFO empty after 8 reads");
    check(!be && !oe && !pe && !fe, "no error flags");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
