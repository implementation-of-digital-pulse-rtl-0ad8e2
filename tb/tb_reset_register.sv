`timescale 1ns / 1ps
// tb_reset_register: DFF2 with four phase clocks, T = 20 ns, made in the
// testbench. For every phase selection p and for several CLR positions,
// a one-cycle CLR pulse is applied after CLK0 edge k. R must rise at
// edge k+1 plus p*T/4 and fall at edge k+2, measured in simulated time.
// With no CLR, R must stay low.
module tb_reset_register;
  localparam int unsigned PB = dpwm_pkg::PHASE_BITS;
  localparam int unsigned NP = 1 << PB;
  localparam real T = 20.0;
  logic [NP-1:0] clk_phase = '0;
  logic rst = 1'b1, clr = 1'b0, r;
  logic [PB-1:0] phase_sel = '0;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall, t_edge;
  int rises = 0;

  reset_register dut (.clk_phase(clk_phase), .rst(rst), .clr(clr),
                      .phase_sel(phase_sel), .r(r));

  for (genvar p = 0; p < NP; p++) begin : g_clk
    initial begin
      #(10.0 + p * T / NP);
      forever begin
        clk_phase[p] = 1'b1;
        #(T / 2.0);
        clk_phase[p] = 1'b0;
        #(T / 2.0);
      end
    end
  end

  always @(posedge r) begin t_rise = $realtime; rises++; end
  always @(negedge r) t_fall = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: rise=%0t fall=%0t edge=%0t sel=%0d", what, t_rise, t_fall, t_edge, phase_sel);
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
    repeat (3) @(posedge clk_phase[0]);
    #1 rst = 1'b0;
    for (int rep = 0; rep < 3; rep++) begin
      for (int p = 0; p < int'(NP); p++) begin
        // comparator output changes just after CLK0 edge k
        @(posedge clk_phase[0]);
        t_edge = $realtime;
        #1 clr = 1'b1; phase_sel = PB'(p);
        @(posedge clk_phase[0]);
        #1 clr = 1'b0; phase_sel = PB'(p + 1);   // next period's value
        repeat (3) @(posedge clk_phase[0]);
        check(t_rise - t_edge > T + p * T / NP - 0.001 &&
              t_rise - t_edge < T + p * T / NP + 0.001, "rise time");
        check(t_fall - t_edge > 2 * T - 0.001 && t_fall - t_edge < 2 * T + 0.001, "fall time");
        repeat (rep) @(posedge clk_phase[0]);
      end
    end
    check(rises == 3 * NP, "one R pulse per CLR");
    repeat (10) @(posedge clk_phase[0]);
    check(rises == 3 * NP && r == 1'b0, "no R without CLR");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
