// Testbench for rx_ctrl. Sample groups (bit_valid with bit_val/bit_ok) are driven directly.
// For random line formats it checks that the first group clears the shift register and
// ends the hunt, that exactly frame-length - 1 further groups are shifted, that frame_done
// comes one clock after the last shift with the OR of the groups' sample errors, that a low
// last bit holds the controller until the line is high again, and that brk pulses once when
// the line has been low for one tick more than a frame time (16 ticks per bit).
module tb_rx_ctrl;
  import uart_pkg::*;
  import uart_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] lcr_byte = 8'h7F;
  lcr_t cfg;
  logic sample_tick = 0, rx_s = 1, bit_valid = 0, bit_val = 1, bit_ok = 1;
  logic hunt, clear, shift, frame_done, sample_err, brk;
  int checks = 0, failures = 0, n_shift = 0, n_clear = 0, n_done = 0, n_brk = 0;

  assign cfg = lcr_t'(lcr_byte);

  rx_ctrl dut (.clk, .rst_n, .cfg, .sample_tick, .rx_s, .bit_valid, .bit_val, .bit_ok,
               .hunt, .clear, .shift, .frame_done, .sample_err, .brk);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (shift) n_shift++;
    if (clear) n_clear++;
    if (frame_done) n_done++;
    if (brk) n_brk++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic group(logic v, logic ok);
    @(negedge clk);
    bit_valid = 1; bit_val = v; bit_ok = ok;
    #1;
    @(negedge clk);
    bit_valid = 0;
    repeat (2) @(negedge clk);
  endtask

  initial begin
    int n, s0, d0, bad_at;
    logic [11:0] f;
    #12 rst_n = 1;
    @(negedge clk);
    check(hunt, "hunting after reset");
    for (int k = 0; k < 200; k++) begin
      lcr_byte = 8'($urandom);
      n = ref_frame(8'($urandom), lcr_byte, f);
      bad_at = ($urandom % 3 == 0) ? int'($urandom % n) : -1;
      s0 = n_shift; d0 = n_done;
      check(hunt, "hunting before the frame");
      @(negedge clk);
      bit_valid = 1; bit_val = 0; bit_ok = (bad_at != 0);
      #1 check(clear && !shift, "start group clears the shift register");
      @(negedge clk);
      bit_valid = 0;
      check(!hunt, "hunt ends after the start group");
      for (int b = 1; b < n; b++) begin
        @(negedge clk);
        bit_valid = 1; bit_val = f[b]; bit_ok = (bad_at != b);
        if (b == n - 1 && k % 4 == 1) begin bit_val = 0; rx_s = 0; end  // a low stop bit now and then
        #1 check(shift && !clear, "group shifted");
        @(negedge clk);
        bit_valid = 0;
        if (b < n - 1) check(n_done == d0, "no frame_done before the last bit");
        else begin
          #1;
          check(frame_done, "frame_done one clock after the last shift");
          check(sample_err == (bad_at >= 0), $sformatf("sample_err %b expected %b", sample_err, bad_at >= 0));
        end
        repeat (2) @(negedge clk);
      end
      check(n_shift - s0 == n - 1, $sformatf("%0d shifts, expected %0d", n_shift - s0, n - 1));
      check(n_done - d0 == 1, "one frame_done per frame");
      if (k % 4 == 1) begin
        check(!hunt, "low last bit: waits for a high line");
        rx_s = 0;
        repeat (3) @(negedge clk);
        check(!hunt, "still waiting while the line is low");
        rx_s = 1;
        @(negedge clk);
        @(negedge clk);
      end
      check(hunt, "hunting again after the frame");
    end
    // Break detection.
    for (int k = 0; k < 8; k++) begin
      int b0, ticks;
      lcr_byte = 8'($urandom);
      n = ref_frame(8'h00, lcr_byte, f);
      b0 = n_brk;
      @(negedge clk) rx_s = 0;
      ticks = 0;
      while (n_brk == b0 && !brk && ticks < 400) begin
        @(negedge clk) sample_tick = 1;
        @(negedge clk) sample_tick = 0;
        ticks++;
      end
      @(negedge clk);
      check(ticks == n * 16 + 1, $sformatf("break after %0d low ticks, expected %0d", ticks, n * 16 + 1));
      repeat (100) begin
        @(negedge clk) sample_tick = 1;
        @(negedge clk) sample_tick = 0;
      end
      check(n_brk == b0 + 1, "break reported once per low period");
      @(negedge clk) rx_s = 1;
      @(negedge clk) sample_tick = 1;
      @(negedge clk) sample_tick = 0;
    end
    // A normal all-zero frame never looks like a break.
    begin
      int b0;
      b0 = n_brk;
      lcr_byte = 8'hFF;  // longest frame
      @(negedge clk) rx_s = 0;
      repeat (11 * 16) begin
        @(negedge clk) sample_tick = 1;
        @(negedge clk) sample_tick = 0;
      end
      @(negedge clk) rx_s = 1;
      repeat (16) begin
        @(negedge clk) sample_tick = 1;
        @(negedge clk) sample_tick = 0;
      end
      check(n_brk == b0, "11 low bits then high: no break");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
