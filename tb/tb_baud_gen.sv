// Testbench for baud_gen at a reduced clock (5.5296 MHz, so 115200 baud needs 3 clocks per
// sample tick). For every rate selection it measures the clocks between sample ticks,
// between bit ticks and over one Baud Out period, and compares them with
// round(CLK/(16*rate)) and 16 times that.
module tb_baud_gen;
  localparam int unsigned CLK_HZ = 5_529_600;
  localparam int unsigned RATE [8] = '{1200, 2400, 4800, 9600, 19200, 38400, 57600, 115200};
  logic clk = 0, rst_n = 0;
  logic [2:0] sel;
  logic sample_tick, bit_tick, baud_out;
  int checks = 0, failures = 0;
  longint cyc = 0;

  baud_gen #(.CLK_HZ(CLK_HZ), .OVERSAMPLE(16)) dut (.clk, .rst_n, .sel, .sample_tick, .bit_tick, .baud_out);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

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

  // bit_tick must always coincide with a sample tick.
  always @(posedge clk)
    if (rst_n && bit_tick && !sample_tick) begin
      failures++; $display("FAIL: bit_tick without sample_tick");
    end

  initial begin
    int unsigned div;
    longint t0, t1, tb0, tb1, tr0, tr1;
    int nsample;
    sel = 3'd7;
    for (int s = 7; s >= 0; s--) begin
      div = $rtoi(real'(CLK_HZ) / (16.0 * real'(RATE[s])) + 0.5);
      rst_n = 0;
      sel = 3'(s);
      repeat (2) @(posedge clk);
      #1 rst_n = 1;
      // sample tick spacing
      @(posedge clk iff sample_tick); t0 = cyc;
      for (int k = 0; k < 6; k++) begin
        @(posedge clk iff sample_tick); t1 = cyc;
        check(t1 - t0 == longint'(div), $sformatf("sel %0d sample period %0d expected %0d", s, t1 - t0, div));
        t0 = t1;
      end
      // bit tick spacing, 16 sample ticks per bit
      @(posedge clk iff bit_tick); tb0 = cyc;
      nsample = 0;
      fork
        begin
          @(posedge clk iff bit_tick); tb1 = cyc;
        end
        begin
          forever @(posedge clk iff sample_tick) nsample++;
        end
      join_any
      disable fork;
      check(tb1 - tb0 == 16 * longint'(div), $sformatf("sel %0d bit period %0d expected %0d", s, tb1 - tb0, 16 * div));
      check(nsample == 16, $sformatf("sel %0d: %0d sample ticks per bit", s, nsample));
      // Baud Out: one full period per bit, half high
      @(posedge baud_out); tr0 = cyc;
      @(negedge baud_out); tr1 = cyc;
      check(tr1 - tr0 == 8 * longint'(div), $sformatf("sel %0d baud_out high %0d", s, tr1 - tr0));
      @(posedge baud_out);
      check(cyc - tr0 == 16 * longint'(div), $sformatf("sel %0d baud_out period %0d", s, cyc - tr0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
