// Testbench for rx_shift_reg: random frames in random line formats are shifted in bit by
// bit (start bit with clear, the rest with shift), then frame, data, parity bit and stop
// check are compared with the frame built here, with stop bits and parity sometimes
// corrupted.
module tb_rx_shift_reg;
  import uart_pkg::*;
  import uart_tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [7:0] lcr_byte = 8'h7F;
  lcr_t cfg;
  logic clear = 0, shift = 0, bit_in = 1;
  logic [11:0] frame;
  logic [7:0] data;
  logic par_bit, stop_ok;
  int checks = 0, failures = 0, bad_stops = 0;

  assign cfg = lcr_t'(lcr_byte);

  rx_shift_reg dut (.clk, .rst_n, .cfg, .clear, .shift, .bit_in, .frame, .data, .par_bit, .stop_ok);

  always #5 clk = ~clk;

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

  initial begin
    logic [11:0] f;
    logic [7:0] d;
    int n, nd, pen, stop_at;
    #12 rst_n = 1;
    for (int k = 0; k < 500; k++) begin
      lcr_byte = 8'($urandom);
      d = 8'($urandom);
      n = ref_frame(d, lcr_byte, f);
      nd = ref_data_bits(lcr_byte);
      pen = int'(lcr_byte[4]);
      stop_at = 1 + nd + pen;
      if (k % 5 == 0) f[stop_at] = 1'b0;
      if (k % 7 == 0 && lcr_byte[7]) f[stop_at + 1] = 1'b0;
      if (k % 3 == 0) f[1 + nd] = ~f[1 + nd];
      for (int b = 0; b < n; b++) begin
        @(negedge clk);
        clear = (b == 0); shift = (b != 0); bit_in = f[b];
        if (b == 0 && k % 2 == 0) bit_in = 1'b0;
      end
      @(negedge clk);
      clear = 0; shift = 0;
      #1;
      check((frame & 12'((1 << n) - 1)) == (f & 12'((1 << n) - 1)), $sformatf("frame %h expected %h", frame, f));
      check(data == 8'((f >> 1) & (12'hFF >> (8 - nd))), $sformatf("data %h", data));
      check(par_bit == f[1 + nd], "parity bit");
      check(stop_ok == (f[stop_at] && (!lcr_byte[7] || f[stop_at + 1])), "stop check");
      if (!stop_ok) bad_stops++;
    end
    check(bad_stops > 50, "bad stop bits exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
