// Transmitter shift register (TSR): frames a byte and sends it bit-serially, LSB first.
//
// On load (accepted only while empty) the 12-bit register is filled with the whole frame:
// a low start bit, the data bits of the configured word length (only the least significant
// bits of din are sent when fewer than 8 are used), the parity bit if enabled, and one or
// two high stop bits; unused positions are high. Each bit_tick then moves the lowest bit to
// txout, which is a register, so the line changes only on a bit tick and every bit lasts
// one bit period. empty goes high at the tick that drives the last stop bit, so a new load
// in the following cycles puts its start bit on the line exactly one bit period later.
// Twelve bits (start, 8 data, parity, 2 stop) and the bit order follow the original design; two
// stop bits as the use of the twelfth bit, and the parity rule, are this design's reading.
module tx_shift_reg
  import uart_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bit_tick,
  input  lcr_t       cfg,
  input  logic       load,
  input  logic [7:0] din,
  output logic       empty,
  output logic       txout
);

  logic [FRAME_W-1:0] sr;
  logic [3:0]         bits_left;
  logic [FRAME_W-1:0] frame;

  always_comb begin
    frame    = '1;
    frame[0] = 1'b0;
    for (int i = 0; i < 8; i++)
      if (i < int'(data_bits(cfg))) frame[1 + i] = din[i];
    if (cfg.par_en) frame[1 + data_bits(cfg)] = parity_of(din, cfg);
  end

  assign empty = (bits_left == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sr        <= '1;
      bits_left <= '0;
      txout     <= 1'b1;
    end else if (empty) begin
      if (load) begin
        sr        <= frame;
        bits_left <= 4'(frame_bits(cfg));
      end
    end else if (bit_tick) begin
      txout     <= sr[0];
      sr        <= {1'b1, sr[FRAME_W-1:1]};
      bits_left <= bits_left - 1'b1;
    end

endmodule
