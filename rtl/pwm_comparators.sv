`timescale 1ns / 1ps
// pwm_comparators: the two comparators of the frequency divider.
//
// SET is high while the counter is zero and the duty-cycle command is not
// zero. It starts the PWM pulse. CLR is high while the counter equals the
// N most significant bits of the duty-cycle command. It ends the pulse.
// The PHASE_BITS least significant bits of dc take no part here. The reset
// register uses them to pick a DCM phase. The logic is purely
// combinational: both outputs are valid one settling time after the
// counter changes.
//
// Both comparison rules follow the document. The width of dc (N plus the
// phase bits) is this design's reading of "the N MSBs of dc".
module pwm_comparators #(
  parameter int unsigned N          = dpwm_pkg::COUNTER_BITS,
  parameter int unsigned PHASE_BITS = dpwm_pkg::PHASE_BITS
) (
  input  logic [N-1:0]            count,
  input  logic [N+PHASE_BITS-1:0] dc,
  output logic                    set,
  output logic                    clr
);
  always_comb begin
    set = (count == '0) && (dc != '0);
    clr = (count == dc[N+PHASE_BITS-1 -: N]);
  end
endmodule
