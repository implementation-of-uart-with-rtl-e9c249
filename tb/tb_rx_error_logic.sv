// Testbench for rx_error_logic: random inputs in random line formats, each output compared
// with the rule worked out here (parity mismatch only with parity enabled, frame error on a
// bad stop bit or disagreeing samples, overrun when the hold register cannot take the
// frame, break passed on, data accepted otherwise). Every error kind must occur.
module tb_rx_error_logic;
  import uart_pkg::*;
  import uart_tb_pkg::*;
  logic [7:0] lcr_byte;
  lcr_t cfg;
  logic frame_done, par_bit, stop_ok, sample_err, rhr_ready, brk, accept;
  logic [7:0] data;
  err_t err;
  int checks = 0, failures = 0;
  int n_par = 0, n_frm = 0, n_ovr = 0, n_brk = 0;

  assign cfg = lcr_t'(lcr_byte);

  rx_error_logic dut (.cfg, .frame_done, .data, .par_bit, .stop_ok, .sample_err, .rhr_ready,
                      .brk, .err, .accept);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_par;
    for (int k = 0; k < 2000; k++) begin
      lcr_byte = 8'($urandom);
      data = ref_mask(8'($urandom), lcr_byte);
      frame_done = ($urandom % 4) != 0;
      par_bit = ($urandom % 2) == 1;
      stop_ok = ($urandom % 3) != 0;
      sample_err = ($urandom % 4) == 0;
      rhr_ready = ($urandom % 3) != 0;
      brk = ($urandom % 5) == 0;
      #1;
      e_par = frame_done && lcr_byte[4] && (par_bit != ref_parity(data, lcr_byte));
      check(err.parity == e_par, "parity error");
      check(err.frame == (frame_done && (!stop_ok || sample_err)), "frame error");
      check(err.overrun == (frame_done && !rhr_ready), "overrun error");
      check(err.brk == brk, "break error");
      check(accept == (frame_done && rhr_ready), "accept");
      n_par += int'(err.parity); n_frm += int'(err.frame);
      n_ovr += int'(err.overrun); n_brk += int'(err.brk);
      #1;
    end
    check(n_par > 0 && n_frm > 0 && n_ovr > 0 && n_brk > 0, "every error kind seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
