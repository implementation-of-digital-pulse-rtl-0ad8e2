`timescale 1ns / 1ps
// dpwm_top: hybrid digital pulse-width modulator built from a clock
// manager (DCM), a counter-based frequency divider and an SR latch.
//
// Data path (left to right):
//   CLKIN -> DCM -> CLK0, CLK90, CLK180, CLK270
//   CLK0  -> frequency divider (N-bit counter + two comparators)
//         -> SET -> DFF1 (set_register)   -> S -+
//         -> CLR -> DFF2 (reset_register) -> R -+-> SR latch -> pwm_out
// The PWM period is PERIOD CLK0 cycles (the divider ratio, default 2^N).
// The duty-cycle command dc has N + PHASE_BITS bits and counts in steps of
// 1/NUM_PHASES of a clock period:
//   high time = dc * T_clk / NUM_PHASES, for dc < PERIOD * NUM_PHASES;
// larger commands keep the output high for the whole period.
// The N MSBs count whole CLK0 cycles with the counter. The PHASE_BITS LSBs
// pick the DCM phase that times the latch reset. With the document's
// N = 8 and four phases, dc is 10 bits, from 0 to 1023/1024 of the period.
// pwm_out rises one CLK0 edge after the counter passes 0, that is on edge
// 1 of each period, and is low for the whole period when dc = 0.
//
// Interface: clk_in is the board clock (CLKIN_PERIOD ns). rst is active
// high and may be asynchronous: it resets the DCM and, through a
// synchronizer on CLK0, holds the logic in reset until the DCM has locked
// and CLK0 has run RST_SYNC_STAGES cycles. dc may change at any time. It
// is taken at the start of the next PWM period. count, locked and the
// phase clocks are brought out for observation.
//
// From the document: the block structure, the 8-bit counter, the SET and
// CLR rules, DFF1/DFF2 and the SR latch. This design's choices: the dc
// format (N MSBs + phase LSBs), the phase selection, the dc holding
// register and the reset synchronizer. The DCM is a behavioural model.
// Everything else synthesizes.
module dpwm_top #(
  parameter int unsigned N               = dpwm_pkg::COUNTER_BITS,
  parameter int unsigned PHASE_BITS      = dpwm_pkg::PHASE_BITS,
  parameter int unsigned PERIOD          = 1 << N,  // CLK0 cycles per PWM period
  parameter real         CLKIN_PERIOD    = 20.0,
  parameter int          PHASE_SHIFT     = 0,
  parameter int unsigned RST_SYNC_STAGES = 3,
  localparam int unsigned NUM_PHASES     = 1 << PHASE_BITS
) (
  input  logic                    clk_in,
  input  logic                    rst,
  input  logic [N+PHASE_BITS-1:0] dc,
  output logic                    pwm_out,
  output logic                    locked,
  output logic [N-1:0]            count,
  output logic [NUM_PHASES-1:0]   clk_phase
);
  logic clk0, clk90, clk180, clk270;
  logic clk2x_unused, clkdv_unused, clkfx_unused;

  dcm_model #(
    .CLKIN_PERIOD(CLKIN_PERIOD),
    .PHASE_SHIFT (PHASE_SHIFT)
  ) u_dcm (
    .CLKIN (clk_in),
    .CLKFB (clk0),
    .RST   (rst),
    .CLK0  (clk0),
    .CLK90 (clk90),
    .CLK180(clk180),
    .CLK270(clk270),
    .CLK2X (clk2x_unused),
    .CLKDV (clkdv_unused),
    .CLKFX (clkfx_unused),
    .LOCKED(locked)
  );

  // The four DCM phases, in order, as one vector. With PHASE_BITS = 1
  // only CLK0 and CLK180 are used. All logic takes CLK0 from this vector,
  // never from clk0 itself, so that every CLK0 flip-flop sees the same
  // clock net.
  logic [3:0] dcm_phases;
  assign dcm_phases = {clk270, clk180, clk90, clk0};
  if (NUM_PHASES == 4) begin : g_four
    assign clk_phase = dcm_phases;
  end else begin : g_two
    assign clk_phase = {clk180, clk0};
  end

  // Reset synchronizer: asserted at once, released on CLK0.
  logic                       rst_raw;
  logic [RST_SYNC_STAGES-1:0] rst_sync;
  logic                       rst_core;
  assign rst_raw = rst | ~locked;
  always_ff @(posedge clk_phase[0] or posedge rst_raw) begin
    if (rst_raw) rst_sync <= '1;
    else         rst_sync <= {rst_sync[RST_SYNC_STAGES-2:0], 1'b0};
  end
  assign rst_core = rst_sync[RST_SYNC_STAGES-1];

  logic                  set, clr, s, r;
  logic [PHASE_BITS-1:0] phase_sel;

  frequency_divider #(.N(N), .PHASE_BITS(PHASE_BITS), .PERIOD(PERIOD)) u_div (
    .clk      (clk_phase[0]),
    .rst      (rst_core),
    .dc       (dc),
    .count    (count),
    .set      (set),
    .clr      (clr),
    .phase_sel(phase_sel)
  );

  set_register u_dff1 (
    .clk(clk_phase[0]),
    .rst(rst_core),
    .set(set),
    .s  (s)
  );

  reset_register #(.PHASE_BITS(PHASE_BITS)) u_dff2 (
    .clk_phase(clk_phase),
    .rst      (rst_core),
    .clr      (clr),
    .phase_sel(phase_sel),
    .r        (r)
  );

  sr_latch u_latch (
    .s  (s),
    .r  (r),
    .rst(rst_core),
    .q  (pwm_out)
  );
endmodule
