// Receiver timing and control.
//
// A three-state controller. In IDLE it asks the sampling logic to hunt for a start bit;
// the first sample group reported there is a confirmed start bit, which is loaded into
// the receive shift register (clear) and moves the controller to FRAME. In FRAME every
// further group is shifted in (shift), and a group whose samples disagreed is remembered
// (sample_err). At the last bit of the frame, whose length follows the LCR, frame_done
// pulses for one clock together with the final sample_err, one clock after the last
// shift. If the last sample was low the controller waits in WAIT_HIGH for the line to go
// high, so a held-low line is not taken for a new start bit. Independently, brk pulses once
// when the line has been low for longer than one frame time (frame bits x OVERSAMPLE
// sample ticks). The break rule and the sample-mismatch frame error follow the original design; the
// states and the WAIT_HIGH rule are this design's choice.
module rx_ctrl
  import uart_pkg::*;
#(
  parameter int unsigned OVERSAMPLE = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  lcr_t cfg,
  input  logic sample_tick,
  input  logic rx_s,
  input  logic bit_valid,
  input  logic bit_val,
  input  logic bit_ok,
  output logic hunt,
  output logic clear,
  output logic shift,
  output logic frame_done,
  output logic sample_err,
  output logic brk
);

  typedef enum logic [1:0] {IDLE, FRAME, WAIT_HIGH} state_t;

  localparam int unsigned LW = $clog2(FRAME_W * OVERSAMPLE + 2);

  state_t        state;
  logic [3:0]    bits_left;
  logic [LW-1:0] low_cnt;
  logic [LW-1:0] frame_samples;

  assign frame_samples = LW'(frame_bits(cfg) * OVERSAMPLE);

  assign hunt  = (state == IDLE);
  assign clear = (state == IDLE)  && bit_valid;
  assign shift = (state == FRAME) && bit_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state      <= IDLE;
      bits_left  <= '0;
      frame_done <= 1'b0;
      sample_err <= 1'b0;
    end else begin
      frame_done <= 1'b0;
      unique case (state)
        IDLE:
          if (bit_valid) begin
            state      <= FRAME;
            bits_left  <= 4'(frame_bits(cfg) - 1);
            sample_err <= !bit_ok;
          end
        FRAME:
          if (bit_valid) begin
            sample_err <= sample_err || !bit_ok;
            bits_left  <= bits_left - 1'b1;
            if (bits_left == 4'd1) begin
              frame_done <= 1'b1;
              state      <= bit_val ? IDLE : WAIT_HIGH;
            end
          end
        WAIT_HIGH:
          if (rx_s) state <= IDLE;
        default:
          state <= IDLE;
      endcase
    end

  // Break detector: counts sample ticks with the line low.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      low_cnt <= '0;
      brk     <= 1'b0;
    end else begin
      brk <= 1'b0;
      if (sample_tick) begin
        if (rx_s) begin
          low_cnt <= '0;
        end else if (low_cnt <= frame_samples) begin
          low_cnt <= low_cnt + 1'b1;
          if (low_cnt == frame_samples) brk <= 1'b1;
        end
      end
    end

endmodule
