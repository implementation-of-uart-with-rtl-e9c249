// Baud rate generator.
//
// Divides the system clock down to the oversampling tick the receiver samples on
// (OVERSAMPLE ticks per bit) and to the bit tick the transmitter shifts on. The divisor is
// round(CLK_HZ / (OVERSAMPLE * rate)) for the rate chosen by the LCR baud-rate field, from
// the table in uart_pkg; the eight divisors are constants worked out at elaboration. Every
// output tick is a one-clock pulse; bit_tick coincides with every OVERSAMPLE-th
// sample_tick. baud_out is a square wave at the bit rate (high for the second half of each
// bit period). The counter structure, the rate table, the oversampling factor and the Baud
// Out waveform are this design's choices; only the block and its pins are given. A change
// of sel takes effect when the running count next reaches the new divisor.
module baud_gen
  import uart_pkg::*;
#(
  parameter int unsigned CLK_HZ     = 100_000_000,
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [2:0] sel,
  output logic       sample_tick,
  output logic       bit_tick,
  output logic       baud_out
);

  // Divisor per rate selection, worked out at elaboration time.
  localparam int unsigned DIV [8] = '{
    baud_divisor(CLK_HZ, OVERSAMPLE, 3'd0), baud_divisor(CLK_HZ, OVERSAMPLE, 3'd1),
    baud_divisor(CLK_HZ, OVERSAMPLE, 3'd2), baud_divisor(CLK_HZ, OVERSAMPLE, 3'd3),
    baud_divisor(CLK_HZ, OVERSAMPLE, 3'd4), baud_divisor(CLK_HZ, OVERSAMPLE, 3'd5),
    baud_divisor(CLK_HZ, OVERSAMPLE, 3'd6), baud_divisor(CLK_HZ, OVERSAMPLE, 3'd7)};
  localparam int unsigned MAX_DIV = DIV[0];
  localparam int unsigned DW      = (MAX_DIV > 1) ? $clog2(MAX_DIV) : 1;
  localparam int unsigned SW      = (OVERSAMPLE > 1) ? $clog2(OVERSAMPLE) : 1;

  logic [DW-1:0] div_cnt;
  logic [DW-1:0] div_last;
  logic [SW-1:0] smp_cnt;
  logic          wrap;

  always_comb begin
    div_last = DW'(DIV[sel] - 1);
    wrap     = (div_cnt >= div_last);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      div_cnt     <= '0;
      smp_cnt     <= '0;
      sample_tick <= 1'b0;
      bit_tick    <= 1'b0;
    end else begin
      sample_tick <= wrap;
      bit_tick    <= wrap && (smp_cnt == SW'(OVERSAMPLE - 1));
      if (wrap) begin
        div_cnt <= '0;
        smp_cnt <= (smp_cnt == SW'(OVERSAMPLE - 1)) ? '0 : smp_cnt + 1'b1;
      end else begin
        div_cnt <= div_cnt + 1'b1;
      end
    end

  assign baud_out = (smp_cnt >= SW'(OVERSAMPLE / 2));

endmodule
