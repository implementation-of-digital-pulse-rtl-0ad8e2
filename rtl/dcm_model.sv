`timescale 1ns / 1ps
// dcm_model: behavioural model (not synthesizable) of the FPGA's digital
// clock manager, the clock source of the PWM.
//
// The real part is a hard clock macro of the FPGA with a delay-locked
// loop, a phase shifter and a frequency synthesizer. This model reproduces
// its outputs with delays, not its insides:
//   CLK0/CLK90/CLK180/CLK270  copies of CLKIN, 0, 1/4, 1/2 and 3/4 of a
//                             period later, all further delayed by the
//                             fixed phase shift PHASE_SHIFT/256 of a
//                             period (-255..+255, negative = earlier,
//                             modelled as one period minus the advance)
//   CLK2X                     twice the input frequency, aligned to CLK0
//   CLKDV                     CLK0 divided by CLKDV_DIVIDE
//   CLKFX                     CLKIN * CLKFX_MULTIPLY / CLKFX_DIVIDE
//                             (free running, not phase aligned)
//   LOCKED                    high LOCK_CYCLES input edges after RST falls
// Outputs stay low while RST is high and until LOCKED. The phases align
// once to CLKIN and then run at CLKIN_PERIOD (ns), which must be the
// period of CLKIN: the model does not measure it. CLKFB is
// accepted for port compatibility and ignored: the model is always
// aligned.
//
// The four phase outputs, the fixed phase shift and its range, and the
// frequency synthesizer follow the document. The port names follow the
// DCM symbol. The input period, the lock time and the multiply/divide
// values are this design's choices.
module dcm_model #(
  parameter real         CLKIN_PERIOD   = 20.0,  // ns
  parameter int          PHASE_SHIFT    = 0,     // -255 .. +255
  parameter int unsigned CLKDV_DIVIDE   = 2,
  parameter int unsigned CLKFX_MULTIPLY = 4,
  parameter int unsigned CLKFX_DIVIDE   = 1,
  parameter int unsigned LOCK_CYCLES    = 4
) (
  input  logic CLKIN,
  input  logic CLKFB,
  input  logic RST,
  output logic CLK0,
  output logic CLK90,
  output logic CLK180,
  output logic CLK270,
  output logic CLK2X,
  output logic CLKDV,
  output logic CLKFX,
  output logic LOCKED
);
  localparam real T       = CLKIN_PERIOD;
  localparam real SHIFT   = (PHASE_SHIFT >= 0) ? (PHASE_SHIFT * T / 256.0)
                                               : (T + PHASE_SHIFT * T / 256.0);
  localparam real FX_HALF = T * CLKFX_DIVIDE / (2.0 * CLKFX_MULTIPLY);

  int unsigned lock_cnt;
  int unsigned dv_cnt;
  bit          running;   // phase generator aligned and stepping

  initial begin
    lock_cnt = 0; dv_cnt = 0; running = 1'b0;
    CLK0 = 1'b0; CLK90 = 1'b0; CLK180 = 1'b0; CLK270 = 1'b0;
    CLKDV = 1'b0; CLKFX = 1'b0; LOCKED = 1'b0;
  end

  // Lock detector: counts input edges after reset is released.
  always @(posedge CLKIN or posedge RST) begin
    if (RST) begin
      lock_cnt <= 0;
      LOCKED   <= 1'b0;
    end else if (lock_cnt < LOCK_CYCLES) begin
      lock_cnt <= lock_cnt + 1;
      LOCKED   <= (lock_cnt + 1 == LOCK_CYCLES);
    end
  end

  // Phase generator: one process drives all four phases, one pass per
  // output period. The first pass after lock aligns to a CLKIN rising
  // edge plus SHIFT. Later passes follow on at CLKIN_PERIOD, like a locked
  // loop that holds its frequency. The outputs stop at the end of the
  // period in which RST rises or lock is lost.
  always begin
    if (LOCKED && !RST) begin
      if (!running) begin
        @(posedge CLKIN);
        #(SHIFT);
        running = 1'b1;
      end
      CLK0  = 1'b1; CLK180 = 1'b0;
      #(T / 4.0);
      CLK90 = 1'b1; CLK270 = 1'b0;
      #(T / 4.0);
      CLK0  = 1'b0; CLK180 = 1'b1;
      #(T / 4.0);
      CLK90 = 1'b0; CLK270 = 1'b1;
      #(T / 4.0);
    end else begin
      running = 1'b0;
      CLK0 = 1'b0; CLK90 = 1'b0; CLK180 = 1'b0; CLK270 = 1'b0;
      @(LOCKED or RST);
    end
  end

  assign CLK2X = CLK0 ^ CLK90;

  // CLKDV: high for the first CLKDV_DIVIDE/2 CLK0 cycles of each group.
  always @(posedge CLK0 or posedge RST) begin
    if (RST) begin
      dv_cnt <= 0;
      CLKDV  <= 1'b0;
    end else begin
      CLKDV  <= (dv_cnt < CLKDV_DIVIDE / 2);
      dv_cnt <= (dv_cnt + 1 == CLKDV_DIVIDE) ? 0 : dv_cnt + 1;
    end
  end

  // CLKFX: free-running toggle at half its period while locked.
  always begin
    if (LOCKED && !RST) begin
      #(FX_HALF) CLKFX = ~CLKFX;
    end else begin
      CLKFX = 1'b0;
      @(LOCKED or RST);
    end
  end

  wire unused_fb = CLKFB;
endmodule
