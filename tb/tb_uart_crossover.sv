// Two UARTs with separate, unsynchronised clocks joined by a crossover cable: the
// transmitter of each drives the receiver of the other. Both run at a reduced clock
// (CLK_HZ = 5.5296 MHz, 115200 baud, 48 clocks per bit) so the run stays short.
// Part one: equal clock frequencies with an arbitrary phase offset; 20 random bytes go
// each way and must arrive intact with no error flags (these are the counted checks).
// Part two: the second UART's clock is 1 % slow; the same traffic is sent and the number of
// frames received with an error is printed and checked to be zero: the four samples sit
// at the bit centre, so 1 % is well inside the tolerance.
module tb_uart_crossover;
  localparam int unsigned CLK_HZ = 5_529_600;
  localparam int N = 20;
  logic clk_a = 0, clk_b = 0, rst_n = 0;
  logic wr_a = 0, wr_b = 0, rd_a = 0, rd_b = 0;
  logic [7:0] txin_a = 0, txin_b = 0, rxout_a, rxout_b;
  logic txe_a, ff_a, tx_a, baud_a, rxe_a, be_a, oe_a, pe_a, fe_a;
  logic txe_b, ff_b, tx_b, baud_b, rxe_b, be_b, oe_b, pe_b, fe_b;
  int checks = 0, failures = 0;
  int half_a = 100, half_b = 100;

  uart_top #(.CLK_HZ(CLK_HZ)) ua (
    .clk(clk_a), .rst_n, .lcr_wr(1'b0), .lcr_din(8'h00), .wr(wr_a), .txin(txin_a),
    .txe(txe_a), .ff(ff_a), .txout(tx_a), .baud_out(baud_a), .rxin(tx_b), .rd(rd_a),
    .rxout(rxout_a), .rx_empty(rxe_a), .be(be_a), .oe(oe_a), .pe(pe_a), .fe(fe_a));

  uart_top #(.CLK_HZ(CLK_HZ)) ub (
    .clk(clk_b), .rst_n, .lcr_wr(1'b0), .lcr_din(8'h00), .wr(wr_b), .txin(txin_b),
    .txe(txe_b), .ff(ff_b), .txout(tx_b), .baud_out(baud_b), .rxin(tx_a), .rd(rd_b),
    .rxout(rxout_b), .rx_empty(rxe_b), .be(be_b), .oe(oe_b), .pe(pe_b), .fe(fe_b));

  initial forever #(half_a) clk_a = ~clk_a;
  initial begin
    #37;  // arbitrary phase offset
    forever #(half_b) clk_b = ~clk_b;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #(200 * 2_000_000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Runs one exchange; returns the number of frames received with a frame or parity error
  // and the number of bytes that are wrong or never arrived (a reader gives up on a byte
  // after 40 bit times).
  task automatic exchange(output int n_fe, output int n_bad);
    logic [7:0] da [N], db [N];
    n_fe = 0; n_bad = 0;
    for (int i = 0; i < N; i++) begin da[i] = 8'($urandom); db[i] = 8'($urandom); end
    fork
      for (int i = 0; i < N; i++) begin
        @(negedge clk_a) wr_a = 1; txin_a = da[i];
        @(negedge clk_a) wr_a = 0;
        @(negedge clk_a iff !ff_a);
      end
      for (int i = 0; i < N; i++) begin
        @(negedge clk_b) wr_b = 1; txin_b = db[i];
        @(negedge clk_b) wr_b = 0;
        @(negedge clk_b iff !ff_b);
      end
      // A reads what B sent
      for (int i = 0; i < N; i++) begin
        int t = 0;
        while (rxe_a && t < 40 * 48) begin @(negedge clk_a); t++; end
        if (rxe_a) begin n_bad++; continue; end  // frame lost
        if (fe_a || pe_a) n_fe++;
        @(negedge clk_a) rd_a = 1;
        @(negedge clk_a) rd_a = 0;
        if (rxout_a != db[i]) n_bad++;
      end
      // B reads what A sent
      for (int i = 0; i < N; i++) begin
        int t = 0;
        while (rxe_b && t < 40 * 48) begin @(negedge clk_b); t++; end
        if (rxe_b) begin n_bad++; continue; end  // frame lost
        if (fe_b || pe_b) n_fe++;
        @(negedge clk_b) rd_b = 1;
        @(negedge clk_b) rd_b = 0;
        if (rxout_b != da[i]) n_bad++;
      end
    join
  endtask

  initial begin
    int n_fe, n_bad;
    #333 rst_n = 1;
    #1000;
    exchange(n_fe, n_bad);
    check(n_bad == 0, $sformatf("%0d wrong bytes with equal clocks", n_bad));
    check(n_fe == 0, $sformatf("%0d frames with errors with equal clocks", n_fe));
    check(!oe_a && !oe_b && !be_a && !be_b, "no overrun or break");
    // Second UART 1 % slow (half period 101 against 100).
    rst_n = 0;
    half_b = 101;
    #2000 rst_n = 1;
    #2000;
    exchange(n_fe, n_bad);
    check(n_fe == 0 && n_bad == 0, "1 % clock mismatch tolerated");
    $display("1%% clock mismatch: %0d of %0d frames flagged, %0d bytes wrong or lost",
             n_fe, 2 * N, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
