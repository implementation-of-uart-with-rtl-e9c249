// Testbench for lcr: reset value, writes only with wr high, and field decoding against the
// register byte layout (bit 7 stop, 6:5 word length, 4 parity enable, 3 even/odd, 2:0 rate).
module tb_lcr;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0;
  logic [7:0] din, q;
  lcr_t cfg;
  int checks = 0, failures = 0;

  lcr dut (.clk, .rst_n, .wr, .din, .q, .cfg);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] expect_q;
    din = 8'h00;
    #12 check(q == 8'h7F, "reset value 0x7F");
    check(cfg.wlen == 2'b11 && cfg.par_en && cfg.par_even && !cfg.two_stop && cfg.baud_sel == 3'd7,
          "reset value decodes to 8E1 at rate 7");
    rst_n = 1;
    expect_q = 8'h7F;
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      din = 8'($urandom);
      wr  = ($urandom % 2) == 1;
      if (wr) expect_q = din;
      @(negedge clk);
      wr = 0;
      check(q == expect_q, $sformatf("q=%h expected %h", q, expect_q));
      check(cfg.two_stop == expect_q[7], "stop bit field");
      check(cfg.wlen == expect_q[6:5], "word length field");
      check(cfg.par_en == expect_q[4], "parity enable field");
      check(cfg.par_even == expect_q[3], "even/odd field");
      check(cfg.baud_sel == expect_q[2:0], "baud select field");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
