`timescale 1ns / 1ps
// tb_dcm_model: checks the clock-manager model with a 20 ns input clock.
// LOCKED must rise after the lock count. CLK0/90/180/270 must rise 0, 5,
// 10 and 15 ns after CLKIN. A second instance with PHASE_SHIFT = 64
// (a quarter period) must be 5 ns later. CLK2X, CLKDV (/2) and
// CLKFX (x4) periods must be 10, 40 and 5 ns. Reset must stop the outputs.
module tb_dcm_model;
  localparam real T = 20.0;
  logic clkin = 1'b0, rst = 1'b1;
  logic c0, c90, c180, c270, c2x, cdv, cfx, locked;
  logic s0, s90, s180, s270, s2x, sdv, sfx, slocked;
  int checks = 0, failures = 0;
  realtime t_in, t0, t90, t180, t270, ts0, t2x_a, t2x_b, tdv_a, tdv_b, tfx_a, tfx_b;

  dcm_model u_a (.CLKIN(clkin), .CLKFB(c0), .RST(rst), .CLK0(c0), .CLK90(c90),
                 .CLK180(c180), .CLK270(c270), .CLK2X(c2x), .CLKDV(cdv),
                 .CLKFX(cfx), .LOCKED(locked));
  dcm_model #(.PHASE_SHIFT(64)) u_b (
                 .CLKIN(clkin), .CLKFB(s0), .RST(rst), .CLK0(s0), .CLK90(s90),
                 .CLK180(s180), .CLK270(s270), .CLK2X(s2x), .CLKDV(sdv),
                 .CLKFX(sfx), .LOCKED(slocked));

  always #(T / 2.0) clkin = ~clkin;

  // phase of an edge time against the input edge, modulo one period
  function automatic realtime ph(input realtime t);
    realtime d = t - t_in;
    while (d >= T - 0.0005) d -= T;
    return d;
  endfunction

  task automatic near(input realtime a, input realtime b, input string what);
    checks++;
    if (a < b - 0.001 || a > b + 0.001) begin
      failures++;
      $display("FAIL %s: %0t expected %0t", what, a, b);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clkin);
    checks++; if (locked || c0) begin failures++; $display("FAIL output during reset"); end
    #1 rst = 1'b0;
    repeat (3) @(posedge clkin);
    #1; checks++; if (locked) begin failures++; $display("FAIL locked too early"); end
    repeat (2) @(posedge clkin);
    #1; checks++; if (!locked || !slocked) begin failures++; $display("FAIL not locked"); end
    repeat (4) @(posedge clkin);
    @(posedge clkin) t_in = $realtime;
    fork
      @(posedge c0)   t0   = $realtime;
      @(posedge c90)  t90  = $realtime;
      @(posedge c180) t180 = $realtime;
      @(posedge c270) t270 = $realtime;
      @(posedge s0)   ts0  = $realtime;
    join
    near(ph(t0), 0.0, "CLK0 phase");
    near(ph(t90), T / 4, "CLK90 phase");
    near(ph(t180), T / 2, "CLK180 phase");
    near(ph(t270), 3 * T / 4, "CLK270 phase");
    near(ph(ts0), T / 4, "fixed phase shift 64/256");
    @(posedge c2x) t2x_a = $realtime; @(posedge c2x) t2x_b = $realtime;
    near(t2x_b - t2x_a, T / 2, "CLK2X period");
    @(posedge cdv) tdv_a = $realtime; @(posedge cdv) tdv_b = $realtime;
    near(tdv_b - tdv_a, 2 * T, "CLKDV period");
    @(posedge cfx) tfx_a = $realtime; @(posedge cfx) tfx_b = $realtime;
    near(tfx_b - tfx_a, T / 4, "CLKFX period");
    rst = 1'b1;
    #(3 * T);
    checks++; if (locked || c0 || c90 || cfx) begin failures++; $display("FAIL outputs after reset %b%b%b%b", locked, c0, c90, cfx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
