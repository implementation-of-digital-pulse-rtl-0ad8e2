`timescale 1ns / 1ps
// tb_dpwm_n4_sweep: the whole PWM with a 4-bit counter and a 6-bit duty
// command, in three configurations side by side: the full 16-cycle
// period; a 12-cycle period (divider ratio not a power of two); and two
// phases (CLK0 and CLK180 only, half-cycle steps, 5-bit command). Each
// lane applies every duty command and measures the high time of one period
// for each (see pwm_sweep_lane). With PERIOD = 12, commands whose whole-
// cycle part is 12 or more must keep the output high for the full period.
module tb_dpwm_n4_sweep;
  int  checks16, failures16, checks12, failures12, checks2p, failures2p;
  bit  done16, done12, done2p;
  int  checks, failures;

  pwm_sweep_lane #(.N(4), .PB(2), .PERIOD(16)) lane16 (
    .checks(checks16), .failures(failures16), .done(done16));
  pwm_sweep_lane #(.N(4), .PB(2), .PERIOD(12)) lane12 (
    .checks(checks12), .failures(failures12), .done(done12));
  pwm_sweep_lane #(.N(4), .PB(1), .PERIOD(16)) lane2p (
    .checks(checks2p), .failures(failures2p), .done(done2p));

  initial begin
    #1ms;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks12 + checks2p,
             failures16 + failures12 + failures2p + 1);
    $finish;
  end

  initial begin
    wait (done16 && done12 && done2p);
    checks   = checks16 + checks12 + checks2p;
    failures = failures16 + failures12 + failures2p;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
