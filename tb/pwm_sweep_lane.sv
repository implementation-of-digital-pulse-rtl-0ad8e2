`timescale 1ns / 1ps
// pwm_sweep_lane: testbench helper that drives one dpwm_top with its own
// clock and applies every duty command once, from 0 to 2^(N+PB)-1. For
// each command it measures, in simulated time, how long pwm_out is high
// during one PWM period. The expected value is dc quarter cycles while the
// N MSBs of dc are below PERIOD, and the whole period otherwise (the
// output then never falls). Pulses
// must start on CLK0 edge 1 of the period. The counts of checks and
// failures are outputs; `done` rises when the sweep is over.
module pwm_sweep_lane #(
  parameter int unsigned N      = 4,
  parameter int unsigned PB     = 2,
  parameter int unsigned PERIOD = 1 << N
) (
  output int  checks,
  output int  failures,
  output bit  done
);
  localparam real T = 20.0;
  localparam real P = PERIOD * T;

  logic clk_in = 1'b0, rst = 1'b1;
  logic [N+PB-1:0] dc = '0;
  logic pwm_out, locked;
  logic [N-1:0] count;
  logic [(1<<PB)-1:0] clk_phase;

  dpwm_top #(.N(N), .PHASE_BITS(PB), .PERIOD(PERIOD)) dut (
    .clk_in(clk_in), .rst(rst), .dc(dc), .pwm_out(pwm_out),
    .locked(locked), .count(count), .clk_phase(clk_phase));

  always #(T / 2.0) clk_in = ~clk_in;

  realtime high_acc = 0, last_t = 0, last_rise = 0;
  logic    last_v = 1'b0;
  always @(pwm_out) begin
    if (last_v) high_acc += $realtime - last_t;
    last_t = $realtime;
    last_v = pwm_out;
    if (pwm_out) last_rise = $realtime;
  end

  task automatic wait_count(input int unsigned c);
    do begin
      @(posedge clk_phase[0]);
      #0.1;
    end while (count != N'(c));
  endtask

  initial begin
    realtime h0, t_start, got, want;
    checks = 0; failures = 0; done = 1'b0;
    #(5 * T) rst = 1'b0;
    wait (locked);
    for (int d = 0; d < (1 << (N + PB)); d++) begin
      dc = (N+PB)'(d);
      wait_count(PERIOD / 2);
      wait_count(PERIOD - 1);
      wait_count(0);
      #(T - 0.1 - T / 8);
      t_start = $realtime;
      h0 = high_acc + (last_v ? $realtime - last_t : 0.0);
      #(P);
      got  = high_acc + (last_v ? $realtime - last_t : 0.0) - h0;
      // A full-period command leaves the output high across the period
      // boundary. The window opens T/8 before edge 1, so that slice is high
      // only if the previous command was full as well.
      if ((d >> PB) < PERIOD)               want = d * T / (1 << PB);
      else if (((d - 1) >> PB) < PERIOD)    want = P - T / 8;
      else                                  want = P;
      checks++;
      if (got < want - 0.001 || got > want + 0.001) begin
        failures++;
        $display("FAIL PERIOD=%0d dc=%0d high %0.3f ns, expected %0.3f ns", PERIOD, d, got, want);
      end
      if (d != 0 && (d >> PB) < PERIOD) begin
        checks++;
        if (last_rise < t_start + T / 8 - 0.001 || last_rise > t_start + T / 8 + 0.001) begin
          failures++;
          $display("FAIL PERIOD=%0d dc=%0d pulse did not start on CLK0 edge 1", PERIOD, d);
        end
      end
    end
    done = 1'b1;
  end
endmodule
