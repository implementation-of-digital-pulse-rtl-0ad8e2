`timescale 1ns / 1ps
// pwm_counter: N-bit synchronous up-counter of the frequency divider.
//
// All bits change on the same edge of clk, which is one of the DCM outputs
// (CLK0). The counter counts 0, 1, ..., PERIOD-1 and then returns to 0.
// It divides the clock by PERIOD (f_out = f_in / PERIOD), and that sets the
// PWM switching period. PERIOD defaults to 2^N, the full range of the
// counter. `wrap` is high for the whole cycle in which the count is
// PERIOD-1. The count restarts at 0 on the next edge.
//
// Following the document: a synchronous counter, 8 bits, cleared after its
// maximum, dividing by an integer. This design's choices: an active-high
// synchronous reset to 0, and the `wrap` output. Assertions check that the
// count stays below PERIOD and returns to 0 after `wrap`.
module pwm_counter #(
  parameter int unsigned N      = dpwm_pkg::COUNTER_BITS,
  parameter int unsigned PERIOD = 1 << N     // 2 .. 2^N
) (
  input  logic         clk,
  input  logic         rst,
  output logic [N-1:0] count,
  output logic         wrap
);
  if (PERIOD < 2 || PERIOD > (1 << N)) begin : g_bad_period
    $error("pwm_counter: PERIOD must be between 2 and 2^N");
  end

  assign wrap = (count == N'(PERIOD - 1));

  always_ff @(posedge clk) begin
    if (rst || wrap) count <= '0;
    else             count <= count + 1'b1;
  end

  // The count never leaves 0 .. PERIOD-1, and it returns to 0 after wrap.
  a_in_range: assert property (@(posedge clk) disable iff (rst)
                               32'(count) < PERIOD);
  a_wrap_to_zero: assert property (@(posedge clk) disable iff (rst)
                                   wrap |=> count == '0);
endmodule
