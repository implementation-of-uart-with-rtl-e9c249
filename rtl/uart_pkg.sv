// Shared types and helpers of the UART.
//
// lcr_t is the line control register byte, laid out as the register itself:
//   bit 7    stop bits     0 = one stop bit, 1 = two stop bits
//   bit 6:5  word length   00/01/10/11 = 5/6/7/8 data bits
//   bit 4    parity enable 1 = a parity bit follows the data
//   bit 3    parity mode   1 = even, 0 = odd
//   bit 2:0  baud rate     index into BAUD_RATE below
// The field positions are those of the register format; the encodings inside each field
// and the rate table are this design's own choices.
//
// err_t is the four-bit error status word: break, parity, frame and overrun error.
package uart_pkg;

  typedef struct packed {
    logic       two_stop;
    logic [1:0] wlen;
    logic       par_en;
    logic       par_even;
    logic [2:0] baud_sel;
  } lcr_t;

  typedef struct packed {
    logic brk;      // BL -> BE
    logic parity;   // PL -> PE
    logic frame;    // SL -> FE
    logic overrun;  // OL -> OE
  } err_t;

  // Longest frame: start + 8 data + parity + 2 stop.
  localparam int unsigned FRAME_W = 12;

  localparam int unsigned BAUD_RATE [8] = '{1200, 2400, 4800, 9600,
                                            19200, 38400, 57600, 115200};

  // Clock cycles per oversampling tick, rounded to nearest, never below 1.
  function automatic int unsigned baud_divisor(int unsigned clk_hz, int unsigned samples,
                                               logic [2:0] sel);
    int unsigned den;
    int unsigned div;
    den = samples * BAUD_RATE[sel];
    div = (clk_hz + den / 2) / den;
    return (div == 0) ? 1 : div;
  endfunction

  function automatic int unsigned data_bits(lcr_t c);
    return 5 + int'(c.wlen);
  endfunction

  // Bits in one frame, start bit included.
  function automatic int unsigned frame_bits(lcr_t c);
    return 1 + data_bits(c) + int'(c.par_en) + (c.two_stop ? 2 : 1);
  endfunction

  // Parity bit sent after the data: even parity makes the count of ones even.
  function automatic logic parity_of(logic [7:0] data, lcr_t c);
    logic [7:0] mask;
    mask = 8'hFF >> (3 - c.wlen);
    return (^(data & mask)) ^ ~c.par_even;
  endfunction

endpackage
