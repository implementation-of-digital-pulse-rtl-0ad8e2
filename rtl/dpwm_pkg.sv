`timescale 1ns / 1ps
// dpwm_pkg: constants shared by the DCM-based digital PWM.
//
// COUNTER_BITS is the width N of the frequency-divider counter. The
// document uses an 8-bit counter. PHASE_BITS is the number of duty-cycle
// LSBs that pick one of the DCM's phase-shifted clocks. The DCM gives four
// phases (0, 90, 180 and 270 degrees), so two bits are needed. Using the
// phases to carry these two extra LSBs is this design's reading of the
// architecture.
package dpwm_pkg;
  localparam int unsigned COUNTER_BITS = 8;
  localparam int unsigned PHASE_BITS   = 2;
endpackage
