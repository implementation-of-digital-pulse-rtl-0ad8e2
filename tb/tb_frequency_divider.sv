`timescale 1ns / 1ps
// tb_frequency_divider: runs the divider at its default sizes for many
// PWM periods with random duty-cycle commands, some changed in the middle
// of a period. A reference model in the testbench keeps its own count and
// its own copy of the command, which it takes only at the end of each
// period. After every edge SET, CLR, the count and phase_sel must match
// it, and CLR must fire exactly once per period.
module tb_frequency_divider;
  localparam int unsigned N  = dpwm_pkg::COUNTER_BITS;
  localparam int unsigned PB = dpwm_pkg::PHASE_BITS;
  localparam int unsigned M  = 1 << N;
  logic clk = 1'b0, rst = 1'b1;
  logic [N+PB-1:0] dc = '0;
  logic [N-1:0]    count;
  logic set, clr;
  logic [PB-1:0]   phase_sel;
  int checks = 0, failures = 0;
  int unsigned ref_count, ref_dc, clr_seen, mid_changes = 0;

  frequency_divider dut (.clk(clk), .rst(rst), .dc(dc), .count(count),
                         .set(set), .clr(clr), .phase_sel(phase_sel));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s: count=%0d set=%0b clr=%0b sel=%0d ref_count=%0d ref_dc=%0d",
                 what, count, set, clr, phase_sel, ref_count, ref_dc);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    dc = (N+PB)'(5);
    @(posedge clk); #1;
    rst = 1'b0;
    ref_count = 0;
    ref_dc = 5;            // taken during reset
    for (int period = 0; period < 24; period++) begin
      clr_seen = 0;
      for (int c = 0; c < M; c++) begin
        check(count == N'(ref_count), "count");
        check(set == (ref_count == 0 && ref_dc != 0), "set");
        check(clr == (ref_count == (ref_dc >> PB)), "clr");
        check(phase_sel == PB'(ref_dc), "phase_sel");
        clr_seen += int'(clr);
        // a new command arrives somewhere in the period
        if (c == int'(period * 37 % M)) begin
          case (period % 6)
            0: dc = '0;
            1: dc = '1;
            2: dc = (N+PB)'(period % 4);          // below one clock cycle
            default: dc = (N+PB)'($urandom);
          endcase
          mid_changes++;
        end
        @(posedge clk);
        if (ref_count == M - 1) ref_dc = dc;  // reference takes dc at the wrap
        ref_count = (ref_count + 1) % M;
        #1;
      end
      check(clr_seen == 1, "one CLR per period");
    end
    check(mid_changes == 24, "commands applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
