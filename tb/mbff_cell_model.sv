// Behavioural model of a multi-bit flip-flop cell, used as a reference by tb_mbff.
//
// The cell has one clock path shared by all bits: CLK goes through an inverter to CLK'
// and through a second inverter back to a buffered CLK. Every bit is a master latch fed
// by D and a slave latch driving Q; the master is controlled by CLK' and the slave by the
// buffered CLK. Here the master is transparent while CLK' is high (CLK low) and the slave
// while the buffered CLK is high, which makes each bit capture D at the rising edge of
// CLK. Each inverter has a delay of one time unit. The latches are intentional: this is
// a model of the cell's structure, not logic for synthesis.
module mbff_cell_model #(
  parameter int unsigned WIDTH = 2
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);

  logic             clk_n;   // CLK'
  logic             clk_b;   // buffered CLK
  logic [WIDTH-1:0] master;

  assign #1 clk_n = ~clk;
  assign #1 clk_b = ~clk_n;

  always_latch
    if (clk_n) master = d;

  always_latch
    if (clk_b) q = master;

endmodule
