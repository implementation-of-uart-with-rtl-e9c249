// Multi-bit flip-flop: WIDTH storage bits clocked by one shared clock.
//
// A single-bit flip-flop cell is a master latch and a slave latch, with two inverters that
// make the inverted and re-buffered clock. Merging single-bit flip-flops into one multi-bit
// cell lets all bits share those clock inverters, so fewer clock loads and less clock power.
// At register-transfer level the merged cell is simply a WIDTH-bit register on one clock
// edge; a synthesis flow with a multi-bit cell library maps it onto one such cell. The
// two-bit default is the merge shown for the cell; the status register uses a four-bit one.
//
// Interface: d is captured on every rising clk edge into q. rst_n clears q asynchronously
// (the clear is this design's addition for reset).
module mbff #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) q <= '0;
    else        q <= d;

endmodule
