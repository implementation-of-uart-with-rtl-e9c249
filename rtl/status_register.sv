// Error status register, built from one multi-bit flip-flop.
//
// Holds the four error flags (break, parity, frame, overrun). All four bits are stored in a
// single four-bit multi-bit flip-flop, so they share one clock driver instead of four; this
// is the register the multi-bit flip-flop technique is applied to. A flag is set by a
// one-clock event on set and stays set until clr (a read of the receive FIFO); a set in the
// same clock as clr wins. Flags appear on the outputs the clock after the event. The bits
// and their sharing of one flip-flop follow the original design; the clear-on-read rule is this
// design's choice.
module status_register
  import uart_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  err_t set,
  input  logic clr,
  output err_t flags
);

  logic [3:0] d, q;

  assign d     = (clr ? 4'b0 : q) | set;
  assign flags = err_t'(q);

  mbff #(.WIDTH(4)) u_mbff (.clk, .rst_n, .d, .q);

endmodule
