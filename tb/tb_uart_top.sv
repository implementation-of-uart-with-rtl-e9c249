// End-to-end testbench for uart_top at a reduced clock (5.5296 MHz, so the fastest rate
// takes 48 clocks per bit). txout is looped back to rxin except while the testbench drives
// the line itself to inject errors. It sends bytes in many line formats and at several
// rates through the whole transmit and receive paths and reads them back with rd, and it
// makes every mechanism of the design happen: transmit FIFO full, each word length, parity
// off/even/odd, two stop bits, a rate change, parity, frame, break and overrun errors.
// Each is counted, and one that never happened counts as a failure. The bit period on the
// line and on Baud Out is checked against round(CLK/(16*rate)) x 16.
module tb_uart_top;
  import uart_tb_pkg::*;
  localparam int unsigned CLK_HZ = 5_529_600;
  localparam int unsigned RATE [8] = '{1200, 2400, 4800, 9600, 19200, 38400, 57600, 115200};
  logic clk = 0, rst_n = 0;
  logic lcr_wr = 0, wr = 0, rd = 0;
  logic [7:0] lcr_din = 0, txin = 0, rxout;
  logic txe, ff, txout, baud_out, rx_empty, be, oe, pe, fe;
  logic loop = 1, drv = 1, rxin;
  logic [7:0] lcr_byte = 8'h7F;
  int checks = 0, failures = 0;
  longint cyc = 0;
  // mechanism counters
  int m_ff = 0, m_wlen [4] = '{0, 0, 0, 0}, m_par_off = 0, m_par_even = 0, m_par_odd = 0;
  int m_two_stop = 0, m_rate_change = 0, m_pe = 0, m_fe = 0, m_be = 0, m_oe = 0, m_rd = 0;

  assign rxin = loop ? txout : drv;

  uart_top #(.CLK_HZ(CLK_HZ)) dut (
    .clk, .rst_n, .lcr_wr, .lcr_din, .wr, .txin, .txe, .ff, .txout, .baud_out,
    .rxin, .rd, .rxout, .rx_empty, .be, .oe, .pe, .fe
  );

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bit_clocks(logic [7:0] l);
    return 16 * $rtoi(real'(CLK_HZ) / (16.0 * real'(RATE[l[2:0]])) + 0.5);
  endfunction

  task automatic set_lcr(logic [7:0] v);
    if (v[2:0] != lcr_byte[2:0]) m_rate_change++;
    @(negedge clk) lcr_wr = 1; lcr_din = v;
    @(negedge clk) lcr_wr = 0;
    lcr_byte = v;
    // let the baud generator settle on the new divisor
    repeat (bit_clocks(v)) @(negedge clk);
  endtask

  task automatic write_byte(logic [7:0] v);
    @(negedge clk) wr = 1; txin = v;
    @(negedge clk) wr = 0;
  endtask

  task automatic read_byte(output logic [7:0] v);
    int t = 0;
    while (rx_empty && t < 40 * bit_clocks(lcr_byte)) begin @(negedge clk); t++; end
    check(!rx_empty, "a byte is waiting");
    @(negedge clk) rd = 1;
    @(negedge clk) rd = 0;
    v = rxout;
    m_rd++;
  endtask

  task automatic count_format();
    m_wlen[lcr_byte[6:5]]++;
    if (!lcr_byte[4]) m_par_off++;
    else if (lcr_byte[3]) m_par_even++;
    else m_par_odd++;
    if (lcr_byte[7]) m_two_stop++;
  endtask

  // Drive one frame from the testbench; kind 1 = wrong parity, 2 = low stop bit.
  task automatic inject(logic [7:0] d, int kind);
    logic [11:0] f;
    int n, bc;
    bc = bit_clocks(lcr_byte);
    n = ref_frame(d, lcr_byte, f);
    if (kind == 1) f[1 + ref_data_bits(lcr_byte)] = ~f[1 + ref_data_bits(lcr_byte)];
    if (kind == 2) f[n - 1 - int'(lcr_byte[7])] = 1'b0;
    loop = 0;
    for (int b = 0; b < n; b++) begin
      @(negedge clk) drv = f[b];
      repeat (bc - 1) @(negedge clk);
    end
    @(negedge clk) drv = 1;
    repeat (2 * bc) @(negedge clk);
    loop = 1;
  endtask

  initial begin
    logic [7:0] d, got;
    logic [7:0] sent [$];
    longint t0;
    int bc;
    #12 rst_n = 1;
    repeat (4) @(negedge clk);
    check(txe && !ff && rx_empty && txout && !be && !oe && !pe && !fe, "idle after reset");

    // Line timing at the reset format (115200 baud): start bit length and Baud Out period.
    bc = bit_clocks(lcr_byte);
    write_byte(8'hC3);
    @(negedge txout); t0 = cyc;
    @(posedge txout);
    check(cyc - t0 == longint'(bc), $sformatf("start bit %0d clocks, expected %0d", cyc - t0, bc));
    @(posedge baud_out); t0 = cyc;
    @(posedge baud_out);
    check(cyc - t0 == longint'(bc), $sformatf("Baud Out period %0d clocks, expected %0d", cyc - t0, bc));
    read_byte(got);
    check(got == 8'hC3, "first loop-back byte");
    count_format();

    // Every word length, parity mode and stop setting, at several rates.
    for (int k = 0; k < 40; k++) begin
      logic [7:0] l;
      l = {1'($urandom), 2'(k % 4), 1'(k % 3 != 0), 1'((k / 3) % 2), 3'(4 + ($urandom % 4))};
      if (k == 39) l[2:0] = 3'd1;  // one slow rate too
      set_lcr(l);
      count_format();
      sent.delete();
      for (int i = 0; i < 3; i++) begin
        d = 8'($urandom);
        sent.push_back(ref_mask(d, l));
        write_byte(d);
      end
      for (int i = 0; i < 3; i++) begin
        read_byte(got);
        check(got == sent[i], $sformatf("format %h byte %0d: %h expected %h", l, i, got, sent[i]));
      end
      check(!pe && !fe && !oe && !be, "no error flags on loop-back traffic");
    end

    // Transmit FIFO full and receive overrun: 22 quick writes, no reads.
    set_lcr(8'h7F);
    sent.delete();
    for (int i = 0; i < 22; i++) begin
      if (!ff) sent.push_back(8'(i + 8'h40));
      else m_ff++;
      write_byte(8'(i + 8'h40));
    end
    check(m_ff > 0, "ff seen while writing");
    // the transmitter keeps draining; top the transmit side up to 18 bytes in total
    while (sent.size() < 18) begin
      @(negedge clk);
      if (!ff) begin sent.push_back(8'(sent.size() + 8'h40)); write_byte(8'(sent.size() - 1 + 8'h40)); end
    end
    while (!txe) @(negedge clk);
    repeat (30 * bit_clocks(lcr_byte)) @(negedge clk);
    check(oe, "overrun after 18 frames without a read");
    if (oe) m_oe++;
    for (int i = 0; i < 17; i++) begin
      read_byte(got);
      check(got == sent[i], $sformatf("after overrun byte %0d: %h expected %h", i, got, sent[i]));
    end
    @(negedge clk);
    check(rx_empty, "the 18th frame was dropped");
    check(!oe, "rd cleared the overrun flag");

    // Parity error.
    set_lcr(8'h7E);
    inject(8'hA7, 1);
    check(pe && !fe, "parity error flagged");
    if (pe) m_pe++;
    read_byte(got);
    check(got == 8'hA7, "byte with a parity error is still delivered");

    // Frame error.
    inject(8'h3C, 2);
    check(fe, "frame error flagged");
    if (fe) m_fe++;
    read_byte(got);

    // Break.
    loop = 0;
    @(negedge clk) drv = 0;
    repeat (3 * 11 * bit_clocks(lcr_byte)) @(negedge clk);
    check(be, "break flagged");
    if (be) m_be++;
    @(negedge clk) drv = 1;
    repeat (3 * bit_clocks(lcr_byte)) @(negedge clk);
    loop = 1;
    read_byte(got);
    check(got == 8'h00, "break delivers one zero byte");
    write_byte(8'h99);
    read_byte(got);
    check(got == 8'h99 && !be, "loop-back works after the break");

    // Every mechanism must have happened.
    check(m_ff > 0, "mechanism: transmit FIFO full");
    for (int w = 0; w < 4; w++) check(m_wlen[w] > 0, $sformatf("mechanism: word length %0d", w + 5));
    check(m_par_off > 0 && m_par_even > 0 && m_par_odd > 0, "mechanism: parity off, even, odd");
    check(m_two_stop > 0, "mechanism: two stop bits");
    check(m_rate_change > 0, "mechanism: baud rate change");
    check(m_pe > 0, "mechanism: parity error");
    check(m_fe > 0, "mechanism: frame error");
    check(m_be > 0, "mechanism: break error");
    check(m_oe > 0, "mechanism: overrun error");
    check(m_rd > 0, "mechanism: read");
    $display("mechanisms: ff=%0d wlen5..8=%0d/%0d/%0d/%0d par off/even/odd=%0d/%0d/%0d two_stop=%0d rate_changes=%0d pe=%0d fe=%0d be=%0d oe=%0d reads=%0d",
             m_ff, m_wlen[0], m_wlen[1], m_wlen[2], m_wlen[3], m_par_off, m_par_even, m_par_odd,
             m_two_stop, m_rate_change, m_pe, m_fe, m_be, m_oe, m_rd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
