`timescale 1ns / 1ps
// tb_pwm_counter: checks the N-bit frequency-divider counter at its
// default width. A reference count is kept in the testbench: it must match
// after every edge, `wrap` must be high exactly when the count is 2^N-1,
// and the count must return to 0 exactly every 2^N cycles. A synchronous
// reset in mid-count must bring it back to 0. A second counter with
// PERIOD = 10 must count 0..9 and wrap, dividing the clock by 10.
module tb_pwm_counter;
  localparam int unsigned N = dpwm_pkg::COUNTER_BITS;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] count;
  logic wrap;
  int checks = 0, failures = 0;
  int unsigned ref_count, cycles;
  int last_zero = -1, periods = 0;

  pwm_counter dut (.clk(clk), .rst(rst), .count(count), .wrap(wrap));

  logic [N-1:0] count10;
  logic         wrap10;
  int unsigned  ref10 = 0;
  pwm_counter #(.PERIOD(10)) dut10 (.clk(clk), .rst(rst), .count(count10), .wrap(wrap10));

  always @(posedge clk) begin
    automatic logic rst_at_edge = rst;
    #2;
    if (rst_at_edge) ref10 = 0;
    else begin
      checks += 2;
      ref10 = (ref10 + 1) % 10;
      if (count10 != N'(ref10)) begin
        failures++;
        $display("FAIL PERIOD=10 count=%0d expected %0d", count10, ref10);
      end
      if (wrap10 != (ref10 == 9)) failures++;
    end
  end

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: count=%0d ref=%0d wrap=%0b", what, count, ref_count, wrap);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    ref_count = 0;
    check(count == 0, "reset value");
    for (cycles = 1; cycles <= 3 * (1 << N) + 7; cycles++) begin
      @(posedge clk); #1;
      ref_count = (ref_count + 1) % (1 << N);
      check(count == N'(ref_count), "count");
      check(wrap == (ref_count == (1 << N) - 1), "wrap");
      if (count == 0) begin
        if (last_zero >= 0) check(cycles - last_zero == (1 << N), "division ratio");
        last_zero = int'(cycles);
        periods++;
      end
    end
    check(periods == 3, "number of periods");
    // reset in mid-count
    rst = 1'b1;
    @(posedge clk); #1;
    check(count == 0, "mid-count reset");
    rst = 1'b0;
    @(posedge clk); #1;
    check(count == 1, "count after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
