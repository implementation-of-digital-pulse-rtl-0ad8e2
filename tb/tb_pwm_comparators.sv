`timescale 1ns / 1ps
// tb_pwm_comparators: exhaustive check of the SET and CLR comparators at
// the default sizes. For every count value and every duty-cycle command,
// SET must equal (count == 0 && dc != 0) and CLR must equal
// (count == dc >> PHASE_BITS), computed here with integer arithmetic.
module tb_pwm_comparators;
  localparam int unsigned N  = dpwm_pkg::COUNTER_BITS;
  localparam int unsigned PB = dpwm_pkg::PHASE_BITS;
  logic [N-1:0]    count;
  logic [N+PB-1:0] dc;
  logic set, clr;
  int checks = 0, failures = 0;
  int sets = 0, clrs = 0;

  pwm_comparators dut (.count(count), .dc(dc), .set(set), .clr(clr));

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < (1 << N); c++) begin
      for (int d = 0; d < (1 << (N + PB)); d++) begin
        count = N'(c);
        dc    = (N+PB)'(d);
        #1;
        checks += 2;
        if (set !== (c == 0 && d != 0)) begin
          failures++;
          if (failures < 10) $display("FAIL set count=%0d dc=%0d", c, d);
        end
        if (clr !== (c == (d >> PB))) begin
          failures++;
          if (failures < 10) $display("FAIL clr count=%0d dc=%0d", c, d);
        end
        sets += int'(set);
        clrs += int'(clr);
      end
    end
    // each non-zero dc sets once; each dc clears once over the count range
    checks += 2;
    if (sets != (1 << (N + PB)) - 1) failures++;
    if (clrs != (1 << (N + PB)))     failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
