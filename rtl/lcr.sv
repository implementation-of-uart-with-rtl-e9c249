// Line control register (LCR): one byte that sets the frame format and the baud rate.
//
// The byte is written in one clock when wr is high and is presented both raw (q) and as
// the decoded lcr_t fields (cfg): bit 7 stop bits, bits 6:5 word length, bit 4 parity
// enable, bit 3 even/odd parity, bits 2:0 baud rate selection. Those positions follow the
// register's published format; the field encodings (see uart_pkg) and the reset value
// (8 data bits, even parity, one stop bit, 115200 baud) are this design's choice.
// Changing the LCR while a frame is on the line corrupts that frame.
module lcr
  import uart_pkg::*;
#(
  parameter logic [7:0] RESET_VALUE = 8'h7F
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       wr,
  input  logic [7:0] din,
  output logic [7:0] q,
  output lcr_t       cfg
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  q <= RESET_VALUE;
    else if (wr) q <= din;

  assign cfg = lcr_t'(q);

endmodule
