// Testbench for status_register: random one-clock error events and clears against a sticky
// flag model (set wins over a clear in the same clock), flags visible one clock later.
module tb_status_register;
  import uart_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0;
  err_t set, flags;
  logic [3:0] model = 0;
  int checks = 0, failures = 0;

  status_register dut (.clk, .rst_n, .set, .clr, .flags);

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
    set = '0;
    #12 rst_n = 1;
    check(flags == '0, "flags clear after reset");
    for (int k = 0; k < 3000; k++) begin
      @(negedge clk);
      set = err_t'(($urandom % 3 == 0) ? 4'(1 << ($urandom % 4)) : 4'(0));
      clr = ($urandom % 10) == 0;
      @(posedge clk);
      model = (clr ? 4'b0 : model) | 4'(set);
      #1;
      check(4'(flags) == model, $sformatf("flags %b expected %b", flags, model));
      check(flags.brk == model[3] && flags.parity == model[2] && flags.frame == model[1] &&
            flags.overrun == model[0], "flag order break, parity, frame, overrun");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
