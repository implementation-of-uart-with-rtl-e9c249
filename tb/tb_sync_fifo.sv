// Testbench for sync_fifo at its default 16 x 8 size: random pushes and pops against a
// queue model, checking dout, empty, full and count every clock, including pushes while
// full and pops while empty, and that exactly 16 bytes fit.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  logic push = 0, pop = 0;
  logic [7:0] din = 0, dout;
  logic empty, full;
  logic [4:0] count;
  logic [7:0] model [$];
  int checks = 0, failures = 0;

  sync_fifo dut (.clk, .rst_n, .push, .din, .pop, .dout, .empty, .full, .count);

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

  task automatic step(bit p, bit q, logic [7:0] v);
    bit was_full, was_empty;
    @(negedge clk);
    push = p; pop = q; din = v;
    was_full = (model.size() == 16);
    was_empty = (model.size() == 0);
    @(posedge clk);
    if (q && !was_empty) void'(model.pop_front());
    if (p && !was_full) model.push_back(v);
    #1;
    check(count == 5'(model.size()), $sformatf("count %0d expected %0d", count, model.size()));
    check(empty == (model.size() == 0), "empty flag");
    check(full == (model.size() == 16), "full flag");
    if (model.size() > 0) check(dout == model[0], $sformatf("dout %h expected %h", dout, model[0]));
  endtask

  initial begin
    #12 rst_n = 1;
    check(empty && !full && count == 0, "empty after reset");
    // Fill beyond capacity.
    for (int i = 0; i < 20; i++) step(1, 0, 8'(i * 7 + 1));
    check(model.size() == 16 && full, "exactly 16 entries held");
    // Drain beyond empty.
    for (int i = 0; i < 20; i++) step(0, 1, 8'h00);
    // Random traffic, with push and pop in the same clock.
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom % 100;
      step(r < 55, (r % 3) == 0 || r > 80, 8'($urandom));
    end
    // push+pop together when full and when empty
    while (model.size() < 16) step(1, 0, 8'($urandom));
    step(1, 1, 8'hA5);
    while (model.size() > 0) step(0, 1, 8'h00);
    step(1, 1, 8'h5A);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
