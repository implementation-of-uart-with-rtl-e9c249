// Testbench for hold_reg: random load and unload requests against a one-entry model,
// checking q, full and empty every clock, including a load and unload in the same clock.
module tb_hold_reg;
  logic clk = 0, rst_n = 0;
  logic load = 0, unload = 0;
  logic [7:0] din = 0, q;
  logic full, empty;
  bit   m_full = 0;
  logic [7:0] m_q = 0;
  int checks = 0, failures = 0;

  hold_reg dut (.clk, .rst_n, .load, .din, .unload, .q, .full, .empty);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int passes = 0;
    #12 rst_n = 1;
    check(!full && empty, "empty after reset");
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      load = ($urandom % 2) == 1;
      unload = m_full && (($urandom % 3) == 0);
      din = 8'($urandom);
      @(posedge clk);
      if (load && (!m_full || unload)) begin
        if (m_full && unload) passes++;
        m_q = din; m_full = 1;
      end else if (unload) m_full = 0;
      #1;
      check(full == m_full && empty == !m_full, "full/empty flags");
      if (m_full) check(q == m_q, $sformatf("q %h expected %h", q, m_q));
    end
    check(passes > 0, "same-clock unload and load exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
