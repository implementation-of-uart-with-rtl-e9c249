// Receiver sampling logic: takes SAMPLES samples at the centre of every bit and reports
// whether they agree.
//
// RXIN is asynchronous, so it first passes a two-flip-flop synchroniser (rx_s). The line
// is watched on every oversampling tick, OVERSAMPLE ticks per bit. While the controller
// hunts for a start bit, the first tick that sees the line low marks the falling edge and
// starts a phase counter; from then on every bit period is OVERSAMPLE ticks long, and the
// SAMPLES ticks centred in it (ticks 6 to 9 of 0 to 15 by default) are the samples of that
// bit. After the last of them bit_valid pulses for one clock with bit_val (the last
// sample) and bit_ok (all samples equal). If the start bit's samples are not all low the
// candidate is dropped and hunting resumes, so a low glitch shorter than half a bit is
// ignored. When the controller starts hunting again after a frame, the phase counter stops
// and waits for the next falling edge. The edge is found to within one tick, so the
// samples fall between 6/16 and 10/16 of each bit, leaving 3/8 of a bit for accumulated
// drift: some 3 % of clock mismatch over an 11-bit frame.
// Taking four samples of every bit and the all-equal rule follow the original design; their
// place at the bit centre, the 16-fold oversampling and the synchroniser are this design's
// choices. sample_tick must come at most every third clock (at the default clock the ticks
// are tens of clocks apart).
module rx_sampler #(
  parameter int unsigned OVERSAMPLE = 16,
  parameter int unsigned SAMPLES    = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic sample_tick,
  input  logic rxin,
  input  logic hunt,
  output logic rx_s,
  output logic bit_valid,
  output logic bit_val,
  output logic bit_ok
);

  localparam int unsigned PW    = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;
  localparam int unsigned FIRST = OVERSAMPLE / 2 - SAMPLES / 2;
  localparam int unsigned LAST  = FIRST + SAMPLES - 1;

  logic               sync1;
  logic               active;
  logic               hunt_d;
  logic [PW-1:0]      ph;
  logic [SAMPLES-1:0] win;
  logic [SAMPLES-1:0] win_next;
  logic               in_window;

  assign win_next  = {win[SAMPLES-2:0], rx_s};
  assign in_window = (ph >= PW'(FIRST)) && (ph <= PW'(LAST));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sync1 <= 1'b1;
      rx_s  <= 1'b1;
    end else begin
      sync1 <= rxin;
      rx_s  <= sync1;
    end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      active    <= 1'b0;
      hunt_d    <= 1'b1;
      ph        <= '0;
      win       <= '1;
      bit_valid <= 1'b0;
      bit_val   <= 1'b1;
      bit_ok    <= 1'b1;
    end else begin
      hunt_d    <= hunt;
      bit_valid <= 1'b0;
      if (hunt && !hunt_d) begin
        // controller is back to hunting: wait for the next falling edge
        active <= 1'b0;
        ph     <= '0;
      end else if (sample_tick) begin
        if (!active) begin
          if (hunt && !rx_s) begin
            active <= 1'b1;
            ph     <= PW'(1);
          end
        end else begin
          ph <= (ph == PW'(OVERSAMPLE - 1)) ? '0 : ph + 1'b1;
          if (in_window) win <= win_next;
          if (ph == PW'(LAST)) begin
            if (hunt && win_next != '0) begin
              active <= 1'b0;  // false start
              ph     <= '0;
            end else begin
              bit_valid <= 1'b1;
              bit_val   <= rx_s;
              bit_ok    <= (win_next == '0) || (win_next == '1);
            end
          end
        end
      end
    end

endmodule
