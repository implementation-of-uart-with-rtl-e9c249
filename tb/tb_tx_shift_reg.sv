// Testbench for tx_shift_reg. A bit tick every P clocks is generated here; random bytes in
// random frame formats are loaded back to back, and the line is sampled in the middle of
// every bit period and compared with a frame built here (start 0, data LSB first, parity,
// stop bits 1). It also checks that the line changes only right after a bit tick, that
// every frame takes exactly frame-length x P clocks, and that only the low data bits go out.
module tb_tx_shift_reg;
  import uart_pkg::*;
  localparam int P = 7;
  logic clk = 0, rst_n = 0;
  logic bit_tick = 0, load = 0, empty, txout;
  logic [7:0] din = 0;
  lcr_t cfg;
  int checks = 0, failures = 0;
  longint cyc = 0;

  tx_shift_reg dut (.clk, .rst_n, .bit_tick, .cfg, .load, .din, .empty, .txout);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    bit_tick <= (cyc % P) == 0;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // The line may only change in the clock after a bit tick.
  logic prev_tx = 1, prev_tick = 0;
  always @(posedge clk) begin
    if (rst_n && cyc > 3 && txout !== prev_tx && !prev_tick) begin
      failures++; $display("FAIL: txout changed away from a bit tick at %0d", cyc);
    end
    prev_tx <= txout; prev_tick <= bit_tick;
  end

  function automatic int build(logic [7:0] d, lcr_t c, output logic [11:0] f);
    int nd = 5 + c.wlen, n = 0, ones = 0;
    f = '1;
    f[n++] = 1'b0;
    for (int i = 0; i < nd; i++) begin f[n++] = d[i]; ones += d[i]; end
    if (c.par_en) f[n++] = c.par_even ? logic'(ones % 2) : logic'(1 - ones % 2);
    f[n++] = 1'b1;
    if (c.two_stop) f[n++] = 1'b1;
    return n;
  endfunction

  initial begin
    logic [11:0] f;
    int n;
    longint t_start, t_prev_start;
    cfg = lcr_t'(8'h7F);
    #12 rst_n = 1;
    check(txout == 1'b1 && empty, "idle line high and TSR empty after reset");
    t_prev_start = -1;
    for (int k = 0; k < 120; k++) begin
      @(negedge clk);
      cfg = lcr_t'(8'($urandom));
      din = 8'($urandom);
      n = build(din, cfg, f);
      while (!empty) @(negedge clk);
      load = 1;
      @(negedge clk);
      load = 0;
      din = 8'($urandom);  // must not matter after the load
      check(!empty, "TSR busy after load");
      @(negedge txout);
      t_start = cyc;
      if (t_prev_start >= 0 && k % 10 != 0)
        check(t_start - t_prev_start == longint'(n_prev) * P,
              $sformatf("frame %0d started %0d clocks after previous, expected %0d", k, t_start - t_prev_start, n_prev * P));
      repeat (P / 2) @(posedge clk);
      for (int b = 0; b < n; b++) begin
        #1 check(txout == f[b], $sformatf("frame %0d bit %0d = %b expected %b", k, b, txout, f[b]));
        if (b < n - 1) repeat (P) @(posedge clk);
      end
      t_prev_start = t_start;
      n_prev = n;
      if (k % 10 == 9) repeat (3 * P) @(posedge clk);  // now and then an idle gap
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  int n_prev = 0;
endmodule
