// Receiver error logic: turns a finished frame into the four error events.
//
// Purely combinational, evaluated in the clock where frame_done is high (brk may come at
// any time):
//   parity  - parity is enabled and the received parity bit differs from the parity worked
//             out from the received data bits;
//   frame   - a stop bit was low, or the samples of some bit of the frame disagreed;
//   overrun - the frame is complete but the receiver hold register cannot take it, which
//             happens only while the receive FIFO is full; that frame is dropped;
//   brk     - the line was held low for longer than a frame.
//             It is detected in rx_ctrl and only passes through here, so that all four
//             events reach the status register as one err_t.
// accept moves the frame's data bits into the hold register. The four conditions are the
// original design's; that a frame with a parity or frame error is still stored is this design's.
module rx_error_logic
  import uart_pkg::*;
(
  input  lcr_t       cfg,
  input  logic       frame_done,
  input  logic [7:0] data,
  input  logic       par_bit,
  input  logic       stop_ok,
  input  logic       sample_err,
  input  logic       rhr_ready,
  input  logic       brk,
  output err_t       err,
  output logic       accept
);

  always_comb begin
    err.parity  = frame_done && cfg.par_en && (par_bit != parity_of(data, cfg));
    err.frame   = frame_done && (!stop_ok || sample_err);
    err.overrun = frame_done && !rhr_ready;
    err.brk     = brk;
    accept      = frame_done && rhr_ready;
  end

endmodule
