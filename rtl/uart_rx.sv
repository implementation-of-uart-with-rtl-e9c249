// UART receiver: sampling logic -> receive shift register (RSR) -> receiver hold register
// (RHR) -> receive FIFO, with error logic and the error status register.
//
// The sampling logic and the timing and control block find the start bit, take four samples
// at the centre of every bit (16 ticks per bit) and shift the frame into the RSR. When a frame is complete the error logic
// checks it; its data bits go into the RHR if that is free, otherwise the frame is dropped
// and an overrun is flagged. The RHR passes its byte into the 16-byte FIFO whenever the
// FIFO has room. A clock with rd high and the FIFO not empty pops the oldest byte into the
// rxout register, where it stays until the next read, and clears the error flags. A
// received byte reaches the FIFO three clocks after the last sample of its frame. The
// chain follows the original design; rx_empty and the clear-on-read flags are additions.
module uart_rx
  import uart_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned OVERSAMPLE = 16,
  parameter int unsigned SAMPLES    = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  lcr_t       cfg,
  input  logic       sample_tick,
  input  logic       rxin,
  input  logic       rd,
  output logic [7:0] rxout,
  output logic       rx_empty,
  output err_t       flags
);

  logic               rx_s, bit_valid, bit_val, bit_ok;
  logic               hunt, clear, shift, frame_done, sample_err, brk;
  logic [FRAME_W-1:0] frame;
  logic [7:0]         data, rhr_q, fifo_dout;
  logic               par_bit, stop_ok;
  logic               rhr_full, rhr_empty, rhr_ready, accept;
  logic               fifo_full, rhr_to_fifo, do_read;
  err_t               err;

  rx_sampler #(.OVERSAMPLE(OVERSAMPLE), .SAMPLES(SAMPLES)) u_sampler (
    .clk, .rst_n, .sample_tick, .rxin, .hunt,
    .rx_s, .bit_valid, .bit_val, .bit_ok
  );

  rx_ctrl #(.OVERSAMPLE(OVERSAMPLE)) u_ctrl (
    .clk, .rst_n, .cfg, .sample_tick, .rx_s, .bit_valid, .bit_val, .bit_ok,
    .hunt, .clear, .shift, .frame_done, .sample_err, .brk
  );

  rx_shift_reg u_rsr (
    .clk, .rst_n, .cfg, .clear, .shift, .bit_in(bit_val),
    .frame, .data, .par_bit, .stop_ok
  );

  assign rhr_to_fifo = rhr_full && !fifo_full;
  assign rhr_ready   = rhr_empty || rhr_to_fifo;

  rx_error_logic u_err (
    .cfg, .frame_done, .data, .par_bit, .stop_ok, .sample_err,
    .rhr_ready, .brk, .err, .accept
  );

  hold_reg #(.WIDTH(8)) u_rhr (
    .clk, .rst_n,
    .load(accept), .din(data),
    .unload(rhr_to_fifo), .q(rhr_q),
    .full(rhr_full), .empty(rhr_empty)
  );

  assign do_read = rd && !rx_empty;

  sync_fifo #(.WIDTH(8), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(rhr_to_fifo), .din(rhr_q),
    .pop(do_read), .dout(fifo_dout),
    .empty(rx_empty), .full(fifo_full), .count()
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       rxout <= '0;
    else if (do_read) rxout <= fifo_dout;

  status_register u_status (
    .clk, .rst_n, .set(err), .clr(rd), .flags
  );

endmodule
