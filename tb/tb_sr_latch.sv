`timescale 1ns / 1ps
// tb_sr_latch: walks the SR latch through set, hold, reset, hold, the
// overlap of S and R (reset must dominate; once R ends with S still high
// the latch sets again), rst, and a random sequence against a model.
module tb_sr_latch;
  logic s = 1'b0, r = 1'b0, rst = 1'b1, q;
  int checks = 0, failures = 0;

  sr_latch dut (.s(s), .r(r), .rst(rst), .q(q));

  task automatic expect_q(input logic v, input string what);
    #1;
    checks++;
    if (q !== v) begin
      failures++;
      $display("FAIL %s: s=%0b r=%0b rst=%0b q=%0b expected %0b", what, s, r, rst, q, v);
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
    expect_q(1'b0, "reset");
    rst = 1'b0;           expect_q(1'b0, "hold after reset");
    s = 1'b1;             expect_q(1'b1, "set");
    s = 1'b0;             expect_q(1'b1, "hold high");
    r = 1'b1;             expect_q(1'b0, "reset by r");
    r = 1'b0;             expect_q(1'b0, "hold low");
    s = 1'b1;             expect_q(1'b1, "set again");
    r = 1'b1;             expect_q(1'b0, "r during s: reset dominates");
    s = 1'b0;             expect_q(1'b0, "s ends first");
    r = 1'b0;             expect_q(1'b0, "hold low after overlap");
    s = 1'b1; r = 1'b1;   expect_q(1'b0, "s and r together");
    r = 1'b0;             expect_q(1'b1, "r ends first, s remains");
    rst = 1'b1;           expect_q(1'b0, "rst while s");
    rst = 1'b0; s = 1'b0; expect_q(1'b0, "hold after rst");
    for (int i = 0; i < 100; i++) begin
      logic exp_q;
      exp_q = q;
      s = 1'($urandom); r = 1'($urandom);
      if (r) exp_q = 1'b0; else if (s) exp_q = 1'b1;
      expect_q(exp_q, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
