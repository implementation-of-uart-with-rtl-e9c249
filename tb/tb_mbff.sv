// Testbench for mbff: random words on d must appear on q one clock later, in all bits at
// once, and an asynchronous reset must clear q without a clock edge. Besides the expected
// values worked out here, q is compared after every clock edge with a latch-level model of
// the multi-bit cell (shared clock inverters, a master and a slave latch per bit).
module tb_mbff;
  localparam int unsigned WIDTH = 2;
  logic clk = 0, rst_n = 0;
  logic [WIDTH-1:0] d, q, prev;
  int checks = 0, failures = 0;

  logic [WIDTH-1:0] q_cell;

  mbff dut (.clk, .rst_n, .d, .q);
  mbff_cell_model #(.WIDTH(WIDTH)) u_cell (.clk, .d, .q(q_cell));

  // Compare with the cell model between edges, once reset is over and the model has clocked.
  int edges = 0;
  always @(negedge clk) begin
    if (rst_n) edges++;
    if (rst_n && edges > 2) begin
      checks++;
      if (q !== q_cell) begin
        failures++;
        $display("FAIL: q=%b but the latch-level cell holds %b", q, q_cell);
      end
    end
  end

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '1;
    #12 check(q == '0, "q cleared in reset");
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      prev = d;
      d = WIDTH'($urandom);
      @(negedge clk);
      check(q == d, $sformatf("q=%b expected %b", q, d));
      prev = d;
    end
    // Every value once, back to back.
    for (int v = 0; v < (1 << WIDTH); v++) begin
      @(negedge clk) d = WIDTH'(v);
      @(posedge clk) #1 check(q == WIDTH'(v), $sformatf("value %0d", v));
    end
    // Asynchronous clear between clock edges.
    @(negedge clk) d = '1;
    @(negedge clk) check(q == '1, "q set before async clear");
    #2 rst_n = 0;
    #1 check(q == '0, "asynchronous clear");
    rst_n = 1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
