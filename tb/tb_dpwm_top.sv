`timescale 1ns / 1ps
// tb_dpwm_top: end-to-end test of the whole PWM at its default sizes
// (8-bit counter, four DCM phases, 10-bit duty command, 20 ns input clock,
// so a PWM period of 256 x 20 ns = 5.12 us).
//
// For each duty command the testbench waits until the command is in
// effect. It then integrates the time pwm_out is high over one PWM period,
// in simulated time. The result must equal dc * T / 4, that is dc quarter
// clock periods, to 1 ps. The rising edge must fall on CLK0 edge 1 of
// the period. The commands cover: zero duty, pulses shorter than one clock
// cycle (S and R overlap in the latch), every phase selection, full scale,
// a command changed in the middle of a period (it must wait for the next
// period), and a reset with DCM relock, followed by a sweep of all 1024
// commands. Each mechanism is counted. One that never happened counts as
// a failure.
module tb_dpwm_top;
  localparam int unsigned N  = dpwm_pkg::COUNTER_BITS;
  localparam int unsigned PB = dpwm_pkg::PHASE_BITS;
  localparam int unsigned NP = 1 << PB;
  localparam int unsigned M  = 1 << N;
  localparam real T = 20.0;
  localparam real P = M * T;

  logic clk_in = 1'b0, rst = 1'b1;
  logic [N+PB-1:0] dc = '0;
  logic pwm_out, locked;
  logic [N-1:0] count;
  logic [NP-1:0] clk_phase;

  dpwm_top dut (.clk_in(clk_in), .rst(rst), .dc(dc), .pwm_out(pwm_out),
                .locked(locked), .count(count), .clk_phase(clk_phase));

  always #(T / 2.0) clk_in = ~clk_in;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_zero = 0, n_subcycle = 0, n_full = 0, n_midchange = 0, n_relock = 0;
  int n_phase[NP];

  // high-time integrator
  realtime high_acc = 0, last_t = 0, last_rise = 0;
  logic    last_v = 1'b0;
  always @(pwm_out) begin
    if (last_v) high_acc += $realtime - last_t;
    last_t = $realtime;
    last_v = pwm_out;
    if (pwm_out) last_rise = $realtime;
  end
  function automatic realtime high_now();
    return high_acc + (last_v ? $realtime - last_t : 0.0);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (dc=%0d, t=%0t)", what, dc, $realtime);
    end
  endtask

  // wait until just after the CLK0 edge that makes the count equal c
  task automatic wait_count(input int unsigned c);
    do begin
      @(posedge clk_phase[0]);
      #0.1;
    end while (count != N'(c));
  endtask

  // measure one period whose command is `d`; the command must be in effect
  task automatic measure(input int unsigned d, input int unsigned change_to = 0,
                         input bit change = 1'b0);
    realtime h0, t_start, expect_high, got;
    wait_count(M - 1);                // count 0 held in reset does not count
    wait_count(0);
    #(T - 0.1 - T / 8);               // 1/8 cycle before edge 1
    t_start = $realtime;
    h0 = high_now();
    if (change) begin
      #(P / 2);
      dc = (N+PB)'(change_to);        // mid-period change: must not act yet
      #(P / 2);
      n_midchange++;
    end else begin
      #(P);
    end
    got = high_now() - h0;
    expect_high = d * T / NP;
    check(got > expect_high - 0.001 && got < expect_high + 0.001, "high time");
    if (got < expect_high - 0.001 || got > expect_high + 0.001)
      $display("      measured %0.3f ns, expected %0.3f ns", got, expect_high);
    if (d != 0) check(last_rise > t_start + T / 8 - 0.001 &&
                      last_rise < t_start + T / 8 + 0.001, "rising edge on CLK0 edge 1");
    if (d == 0) n_zero++;
    if (d != 0 && (d >> PB) == 0) n_subcycle++;
    if (d == (1 << (N + PB)) - 1) n_full++;
    n_phase[d % NP]++;
  endtask

  // apply a command and measure the first period in which it is used
  task automatic run_dc(input int unsigned d);
    dc = (N+PB)'(d);
    wait_count(M / 2);                // taken at the next wrap
    measure(d);
  endtask

  initial begin
    #50ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_phase[i]) n_phase[i] = 0;
    dc = (N+PB)'(9);
    #(5 * T) rst = 1'b0;
    wait (locked);
    measure(9);                       // command present from reset
    run_dc(0);
    for (int d = 1; d <= 9; d++) run_dc(d);          // sub-cycle and all phases
    run_dc(4 * 100 + 1);
    run_dc(4 * 100 + 2);
    run_dc(4 * 100 + 3);
    run_dc(4 * 128);                  // 50 %
    run_dc((1 << (N + PB)) - 1);      // full scale
    run_dc((1 << (N + PB)) - 2);
    run_dc((1 << (N + PB)) - 4);
    for (int i = 0; i < 6; i++) run_dc($urandom_range((1 << (N + PB)) - 1));
    // command changed in the middle of a period
    dc = (N+PB)'(4 * 40 + 1);
    wait_count(M / 2);
    measure(4 * 40 + 1, 4 * 200 + 3, 1'b1);
    measure(4 * 200 + 3);             // the new command, one period later
    // reset and DCM relock
    rst = 1'b1;
    #(3 * T);
    check(pwm_out == 1'b0 && !locked, "outputs in reset");
    dc = (N+PB)'(4 * 7 + 2);
    #(2.3 * T) rst = 1'b0;
    wait (locked);
    n_relock++;
    measure(4 * 7 + 2);
    // exhaustive sweep of every duty command at full size
    for (int d = 0; d < (1 << (N + PB)); d++) run_dc(d);
    // every mechanism must have been exercised
    check(n_zero > 0, "zero duty exercised");
    check(n_subcycle > 0, "sub-cycle pulse exercised");
    check(n_full > 0, "full scale exercised");
    check(n_midchange > 0, "mid-period change exercised");
    check(n_relock > 0, "reset and relock exercised");
    foreach (n_phase[i]) check(n_phase[i] > 0, "phase selection exercised");
    $display("mechanisms: zero=%0d subcycle=%0d full=%0d midchange=%0d relock=%0d phases=%p",
             n_zero, n_subcycle, n_full, n_midchange, n_relock, n_phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
