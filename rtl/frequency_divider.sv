`timescale 1ns / 1ps
// frequency_divider: counter and comparators of the DCM-based PWM.
//
// The N-bit counter runs on CLK0 of the DCM and divides it by PERIOD
// (default 2^N). That is the PWM period. The comparators turn the count
// and the duty-cycle command into two request pulses. `set` is high in the cycle where the
// count is 0, if the command is not zero. `clr` is high in the cycle where
// the count equals the N MSBs of the command. `phase_sel` carries the
// command's PHASE_BITS LSBs to the reset register, which delays the end of
// the pulse by that many quarter clock periods.
//
// Timing: the command `dc` is sampled into a holding register during reset
// and in the last cycle of each period (count = PERIOD-1). A new command
// therefore takes effect at the start of the next period and never
// changes mid-period. If the N MSBs of dc reach PERIOD or more, CLR never
// fires and the output stays high (100 %). The holding register is this
// design's choice. Counter, comparators and their rules follow the
// document. Assertions check that SET occurs only at count 0 and that the
// held command changes only at the period boundary.
module frequency_divider #(
  parameter int unsigned N          = dpwm_pkg::COUNTER_BITS,
  parameter int unsigned PHASE_BITS = dpwm_pkg::PHASE_BITS,
  parameter int unsigned PERIOD     = 1 << N   // clock cycles per PWM period
) (
  input  logic                    clk,        // DCM CLK0
  input  logic                    rst,        // synchronous, active high
  input  logic [N+PHASE_BITS-1:0] dc,         // duty-cycle command
  output logic [N-1:0]            count,
  output logic                    set,
  output logic                    clr,
  output logic [PHASE_BITS-1:0]   phase_sel
);
  logic                    wrap;
  logic [N+PHASE_BITS-1:0] dc_q;

  pwm_counter #(.N(N), .PERIOD(PERIOD)) u_counter (
    .clk  (clk),
    .rst  (rst),
    .count(count),
    .wrap (wrap)
  );

  always_ff @(posedge clk) begin
    if (rst || wrap) dc_q <= dc;
  end

  pwm_comparators #(.N(N), .PHASE_BITS(PHASE_BITS)) u_cmp (
    .count(count),
    .dc   (dc_q),
    .set  (set),
    .clr  (clr)
  );

  assign phase_sel = dc_q[PHASE_BITS-1:0];

  // SET only ever starts a period; the command is stable inside a period.
  a_set_at_zero: assert property (@(posedge clk) disable iff (rst)
                                  set |-> count == '0);
  a_dc_stable: assert property (@(posedge clk) disable iff (rst)
                                !wrap |=> $stable(dc_q));
endmodule
