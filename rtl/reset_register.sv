`timescale 1ns / 1ps
// reset_register: DFF2 of the PWM, the register between the CLR comparator
// and the R input of the SR latch. It adds the fine part of the pulse
// width from the DCM's phase-shifted clocks.
//
// Stage 1: CLR and the phase selection are sampled on CLK0 (clk_phase[0]).
// clr_q is then high for exactly one CLK0 cycle, starting on edge k+1,
// where k is the edge at which the counter reached the N MSBs of dc.
// Stage 2: for every other phase p (1..NUM_PHASES-1), one flip-flop
// clocked by clk_phase[p] re-samples clr_q. Its copy rises p/NUM_PHASES of
// a period after clr_q. The output is
//     r = clr_q & (phase_sel_q == 0 ? 1 : g_phase[phase_sel_q].ph_q),
// which is high from edge k+1 + p/NUM_PHASES up to edge k+2. Every
// transition of r comes from a flip-flop edge, so the latch reset is
// synchronous to a DCM clock, as the document requires. Cutting r off at
// edge k+2 keeps it from overlapping the next period's S pulse when dc is
// near its maximum.
//
// The document gives the register (DFF2), the four DCM phases and the
// synchronous reset of the latch. Selecting the phase with the dc LSBs and
// the gating with clr_q are this design's choices.
module reset_register #(
  parameter int unsigned PHASE_BITS = dpwm_pkg::PHASE_BITS,
  localparam int unsigned NUM_PHASES = 1 << PHASE_BITS
) (
  input  logic [NUM_PHASES-1:0] clk_phase,  // [0]=CLK0, [1]=CLK90, ...
  input  logic                  rst,        // synchronous to clk_phase[0]
  input  logic                  clr,        // combinational CLR request
  input  logic [PHASE_BITS-1:0] phase_sel,  // dc LSBs of the current period
  output logic                  r           // to the latch R input
);
  logic                  clr_q;
  logic [PHASE_BITS-1:0] phase_sel_q;
  logic [NUM_PHASES-1:0] ph_open;  // per phase: r may be high

  always_ff @(posedge clk_phase[0]) begin
    if (rst) begin
      clr_q       <= 1'b0;
      phase_sel_q <= '0;
    end else begin
      clr_q       <= clr;
      phase_sel_q <= phase_sel;
    end
  end

  for (genvar p = 1; p < NUM_PHASES; p++) begin : g_phase
    logic ph_q;  // clr_q re-sampled on phase p
    always_ff @(posedge clk_phase[p]) begin
      if (rst) ph_q <= 1'b0;
      else     ph_q <= clr_q;
    end
    assign ph_open[p] = ph_q;
  end

  // Phase 0 needs no second stage: clr_q itself is on CLK0.
  assign ph_open[0] = 1'b1;
  assign r       = clr_q & ph_open[phase_sel_q];
endmodule
