// UART with an error status register built from a multi-bit flip-flop: top level.
//
// The line control register sets frame format and baud rate; the baud rate generator turns
// the system clock into a 16x oversampling tick for the receiver and a bit tick for the
// transmitter, and drives Baud Out. Bytes written with wr go through the transmit FIFO,
// hold register and shift register onto txout; bytes arriving on rxin go through the
// sampling logic, shift register, hold register and receive FIFO to rxout, one per rd,
// while the error logic sets the break (be), overrun (oe), parity (pe) and frame (fe)
// flags of the status register. For loop-back, connect txout to rxin outside.
// All logic runs on clk; rst_n is an asynchronous active-low reset. The LCR write port
// (lcr_wr, lcr_din) and rx_empty are this design's additions to the published pin list.
module uart_top
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       lcr_wr,
  input  logic [7:0] lcr_din,
  input  logic       wr,
  input  logic [7:0] txin,
  output logic       txe,
  output logic       ff,
  output logic       txout,
  output logic       baud_out,
  input  logic       rxin,
  input  logic       rd,
  output logic [7:0] rxout,
  output logic       rx_empty,
  output logic       be,
  output logic       oe,
  output logic       pe,
  output logic       fe
);

  localparam int unsigned OVERSAMPLE = 16;  // sample ticks per bit
  localparam int unsigned SAMPLES    = 4;   // samples that must agree, per bit

  lcr_t       cfg;
  logic [7:0] lcr_q;
  logic       sample_tick, bit_tick, tx_idle;
  err_t       flags;

  lcr u_lcr (.clk, .rst_n, .wr(lcr_wr), .din(lcr_din), .q(lcr_q), .cfg);

  baud_gen #(.CLK_HZ(CLK_HZ), .OVERSAMPLE(OVERSAMPLE)) u_baud (
    .clk, .rst_n, .sel(cfg.baud_sel), .sample_tick, .bit_tick, .baud_out
  );

  uart_tx #(.FIFO_DEPTH(FIFO_DEPTH)) u_tx (
    .clk, .rst_n, .cfg, .bit_tick, .wr, .txin, .txe, .ff, .txout, .idle(tx_idle)
  );

  uart_rx #(.FIFO_DEPTH(FIFO_DEPTH), .OVERSAMPLE(OVERSAMPLE), .SAMPLES(SAMPLES)) u_rx (
    .clk, .rst_n, .cfg, .sample_tick, .rxin, .rd, .rxout, .rx_empty, .flags
  );

  assign be = flags.brk;
  assign oe = flags.overrun;
  assign pe = flags.parity;
  assign fe = flags.frame;

endmodule
