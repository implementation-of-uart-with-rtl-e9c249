// Receiver shift register (RSR): holds the whole received frame, start bit included.
//
// clear loads the first (start) bit into the top position and empties the rest; each
// shift moves the register down one place and puts bit_in on top, so with the line sent
// LSB first the frame ends up in the top frame-length bits. The outputs re-align it by the
// frame length from the LCR: frame[0] is the start bit, data holds the data bits (bits
// above the word length read as zero), par_bit is the received parity bit and stop_ok is
// high when every stop bit was high. The outputs are combinational from the register and
// valid once the last bit has been shifted in. Twelve bits follow the original design.
module rx_shift_reg
  import uart_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  lcr_t               cfg,
  input  logic               clear,
  input  logic               shift,
  input  logic               bit_in,
  output logic [FRAME_W-1:0] frame,
  output logic [7:0]         data,
  output logic               par_bit,
  output logic               stop_ok
);

  logic [FRAME_W-1:0] sr;
  int unsigned        nd;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     sr <= '1;
    else if (clear) sr <= {bit_in, {(FRAME_W-1){1'b0}}};
    else if (shift) sr <= {bit_in, sr[FRAME_W-1:1]};

  always_comb begin
    nd      = data_bits(cfg);
    frame   = sr >> (FRAME_W - frame_bits(cfg));
    data    = frame[8:1] & (8'hFF >> (8 - nd));
    par_bit = frame[1 + nd];
    stop_ok = frame[1 + nd + int'(cfg.par_en)] &&
              (!cfg.two_stop || frame[2 + nd + int'(cfg.par_en)]);
  end

endmodule
