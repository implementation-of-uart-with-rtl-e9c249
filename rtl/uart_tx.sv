// UART transmitter: transmit FIFO -> transmitter hold register (THR) -> shift register (TSR).
//
// Each clock with wr high pushes txin into the 16-byte FIFO (dropped when the FIFO is full).
// Whenever the FIFO holds data and the THR is empty, the head byte moves into the THR;
// whenever the THR holds data and the TSR is empty, it moves into the TSR, which frames it
// and shifts it out on txout at one bit per bit_tick. A byte therefore needs two clocks from
// the FIFO head to the TSR, well inside one bit period. txe and ff are the FIFO's empty and
// full flags; idle is high when FIFO, THR and TSR are all empty (the last stop bit may still
// be on the line for one bit period). The three-stage chain and its ready handshakes follow
// the original design; the per-clock write strobe is this design's reading of the WR pin.
module uart_tx
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  lcr_t       cfg,
  input  logic       bit_tick,
  input  logic       wr,
  input  logic [7:0] txin,
  output logic       txe,
  output logic       ff,
  output logic       txout,
  output logic       idle
);

  logic [7:0] fifo_dout, thr_q;
  logic       thr_full, thr_empty, tsr_empty;
  logic       fifo_to_thr, thr_to_tsr;

  assign fifo_to_thr = !txe && thr_empty;
  assign thr_to_tsr  = thr_full && tsr_empty;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(wr), .din(txin),
    .pop(fifo_to_thr), .dout(fifo_dout),
    .empty(txe), .full(ff), .count()
  );

  hold_reg #(.WIDTH(8)) u_thr (
    .clk, .rst_n,
    .load(fifo_to_thr), .din(fifo_dout),
    .unload(thr_to_tsr), .q(thr_q),
    .full(thr_full), .empty(thr_empty)
  );

  tx_shift_reg u_tsr (
    .clk, .rst_n, .bit_tick, .cfg,
    .load(thr_to_tsr), .din(thr_q),
    .empty(tsr_empty), .txout
  );

  assign idle = txe && thr_empty && tsr_empty;

endmodule
