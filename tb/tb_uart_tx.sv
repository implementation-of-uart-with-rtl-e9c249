// Testbench for uart_tx. Bit ticks every P clocks come from here. Bursts of bytes are
// written with wr, including more than 16 at once so the FIFO fills (ff) and drops; a
// receiver model here decodes txout in the middle of each bit and compares every frame
// with the bytes that were accepted. txe, ff and the back-to-back frame timing are checked.
module tb_uart_tx;
  import uart_pkg::*;
  import uart_tb_pkg::*;
  localparam int P = 6;
  logic clk = 0, rst_n = 0;
  logic bit_tick = 0, wr = 0, txe, ff, txout, idle;
  logic [7:0] txin = 0, lcr_byte;
  lcr_t cfg;
  logic [7:0] sent [$];
  int checks = 0, failures = 0, frames = 0, full_seen = 0;
  longint cyc = 0;

  assign cfg = lcr_t'(lcr_byte);

  uart_tx dut (.clk, .rst_n, .cfg, .bit_tick, .wr, .txin, .txe, .ff, .txout, .idle);

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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Line decoder: waits for a start bit, samples each bit at mid-period.
  initial begin
    logic [11:0] f;
    logic [7:0] exp_d;
    int n;
    longint t_end = -1;
    @(posedge rst_n);
    forever begin
      @(negedge txout);
      if (t_end >= 0 && sent.size() > 0)
        check(cyc - t_end <= P + 1, "next frame follows the stop bit without a gap");
      check(sent.size() > 0, "a frame only after a write");
      exp_d = (sent.size() > 0) ? sent.pop_front() : 8'h00;
      n = ref_frame(exp_d, lcr_byte, f);
      repeat (P / 2) @(posedge clk);
      for (int b = 0; b < n; b++) begin
        #1 check(txout == f[b], $sformatf("frame %0d bit %0d = %b expected %b", frames, b, txout, f[b]));
        if (b < n - 1) repeat (P) @(posedge clk);
      end
      frames++;
      repeat (P - P / 2) @(posedge clk);
      t_end = (sent.size() > 0) ? cyc : -1;
    end
  end

  task automatic write_byte(logic [7:0] v);
    @(negedge clk);
    if (!ff) sent.push_back(v);
    else full_seen++;
    wr = 1; txin = v;
    @(negedge clk);
    wr = 0;
  endtask

  initial begin
    lcr_byte = 8'h7F;
    #12 rst_n = 1;
    @(negedge clk);
    check(txe && !ff && txout && idle, "idle after reset");
    for (int burst = 0; burst < 6; burst++) begin
      lcr_byte = 8'($urandom);
      for (int i = 0; i < (burst == 2 ? 22 : 3 + $urandom % 5); i++) write_byte(8'($urandom));
      if (burst == 2) check(ff, "FIFO full after 22 quick writes");
      check(!txe, "txe low with bytes queued");
      wait (idle);
      repeat (20 * P) @(posedge clk);
      check(txe && sent.size() == 0, "all accepted bytes sent");
    end
    check(full_seen > 0, "writes to a full FIFO were seen");
    check(frames > 30, $sformatf("%0d frames decoded", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
