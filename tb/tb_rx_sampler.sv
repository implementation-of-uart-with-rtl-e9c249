// Testbench for rx_sampler (16 ticks per bit, four samples at ticks 6 to 9). A sample tick
// every D clocks comes from here. Part one is directed: a low glitch of five ticks while
// hunting is not taken for a start bit; a real start bit reports one good low group nine
// ticks after the first low tick; later groups follow every 16 ticks; a group with two odd
// centre samples reports bit_ok low; an odd sample outside the centre is ignored. Part two
// drives a random line and random hunt against a cycle-level reference model.
module tb_rx_sampler;
  localparam int D = 3;
  localparam int OS = 16;
  logic clk = 0, rst_n = 0;
  logic sample_tick = 0, rxin = 1, hunt = 1;
  logic rx_s, bit_valid, bit_val, bit_ok;
  int checks = 0, failures = 0, groups = 0, bad_groups = 0;
  longint cyc = 0, nticks = 0;

  rx_sampler dut (.clk, .rst_n, .sample_tick, .rxin, .hunt, .rx_s, .bit_valid, .bit_val, .bit_ok);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    sample_tick <= (cyc % D) == 0;
    if (sample_tick) nticks++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  logic m_s1 = 1, m_s2 = 1, m_valid = 0, m_val = 1, m_ok = 1, m_active = 0, m_hunt_d = 1;
  logic [3:0] m_win = '1;
  int m_ph = 0;
  always @(posedge clk) begin
    logic [3:0] nw;
    if (rst_n && cyc > 2) begin
      check(rx_s == m_s2, "synchronised line");
      check(bit_valid == m_valid, $sformatf("bit_valid %b expected %b at %0d", bit_valid, m_valid, cyc));
      if (m_valid) begin
        check(bit_val == m_val, "bit value");
        check(bit_ok == m_ok, "bit_ok");
        groups++;
        if (!m_ok) bad_groups++;
      end
    end
    m_valid <= 0;
    m_hunt_d <= hunt;
    if (hunt && !m_hunt_d) begin
      m_active <= 0; m_ph <= 0;
    end else if (sample_tick) begin
      if (!m_active) begin
        if (hunt && !m_s2) begin m_active <= 1; m_ph <= 1; end
      end else begin
        m_ph <= (m_ph + 1) % OS;
        nw = {m_win[2:0], m_s2};
        if (m_ph >= 6 && m_ph <= 9) m_win <= nw;
        if (m_ph == 9) begin
          if (hunt && nw != 4'h0) begin m_active <= 0; m_ph <= 0; end
          else begin m_valid <= 1; m_val <= m_s2; m_ok <= (nw == 4'h0 || nw == 4'hF); end
        end
      end
    end
    m_s1 <= rxin; m_s2 <= m_s1;
  end

  task automatic ticks(int n);
    repeat (n * D) @(negedge clk);
  endtask

  initial begin
    int g0;
    longint t0;
    #12 rst_n = 1;
    // Idle line while hunting: nothing.
    g0 = groups;
    ticks(40);
    check(groups == g0, "no group on an idle line");
    // Low glitch of five ticks: not a start bit.
    @(negedge clk) rxin = 0;
    ticks(5);
    rxin = 1;
    ticks(30);
    check(groups == g0, "glitch shorter than half a bit ignored while hunting");
    // Start bit.
    @(negedge clk iff sample_tick);
    rxin = 0;
    t0 = nticks;
    @(posedge clk iff bit_valid);
    #1 check(bit_val == 0 && bit_ok == 1, "start group low and consistent");
    check(nticks - t0 >= 9 && nticks - t0 <= 11, $sformatf("start group after %0d ticks", nticks - t0));
    @(negedge clk) hunt = 0;
    // Next bits: high, high with two odd centre samples, high with an odd sample at tick 2.
    ticks(OS - 10);  // rest of the start bit, roughly
    rxin = 1;
    t0 = nticks;
    @(posedge clk iff bit_valid);
    #1 check(bit_val == 1 && bit_ok, "data bit high");
    check(nticks - t0 >= 8 && nticks - t0 <= 11, "data bit group in the centre of the bit");
    t0 = nticks;
    @(posedge clk iff bit_valid);
    check(nticks - t0 == OS || nticks - t0 == OS + 1, $sformatf("groups %0d ticks apart", nticks - t0));
    ticks(OS - 9 + 6);  // to about tick 6 of the following bit
    rxin = 0;
    ticks(2);
    rxin = 1;
    @(posedge clk iff bit_valid);
    #1 check(!bit_ok, "odd samples in the centre give bit_ok low");
    ticks(OS - 9 + 1);  // about tick 1 of the next bit
    rxin = 0;
    ticks(1);
    rxin = 1;
    @(posedge clk iff bit_valid);
    #1 check(bit_ok, "an odd sample away from the centre is ignored");
    @(negedge clk) hunt = 1;
    ticks(20);
    check(bad_groups > 0, "a group with disagreeing samples seen");
    // Random part.
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      if ($urandom % 12 == 0) rxin = ~rxin;
      if ($urandom % 200 == 0) hunt = ~hunt;
    end
    check(groups > 200, $sformatf("%0d groups", groups));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
