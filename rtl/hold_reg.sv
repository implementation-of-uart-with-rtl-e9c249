// Hold register: one WIDTH-bit word plus an occupied flag, between two stages of a UART path.
//
// The transmitter hold register (THR) sits between the transmit FIFO and the transmit shift
// register; the receiver hold register (RHR) between the receive shift register and the
// receive FIFO. 'empty' is the ready signal the register gives its producer; 'full' is the
// data-present signal it gives its consumer. At a clock edge with unload high the consumer
// has taken q; with load high and the register empty (or being unloaded in the same cycle)
// din is stored. A load that finds the register occupied and not unloading is dropped and
// the producer is expected not to issue one. Eight bits and the two handshakes follow the
// described data flow; the same-cycle unload-and-load pass is this design's choice.
module hold_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] din,
  input  logic             unload,
  output logic [WIDTH-1:0] q,
  output logic             full,
  output logic             empty
);

  logic can_load;

  assign empty    = !full;
  assign can_load = !full || unload;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      q    <= '0;
      full <= 1'b0;
    end else begin
      if (load && can_load) begin
        q    <= din;
        full <= 1'b1;
      end else if (unload) begin
        full <= 1'b0;
      end
    end

endmodule
