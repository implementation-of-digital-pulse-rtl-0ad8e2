`timescale 1ns / 1ps
// tb_set_register: DFF1 must present, after each rising clock edge, the
// SET value that was applied before that edge, and must clear on reset.
module tb_set_register;
  logic clk = 1'b0, rst = 1'b1, set = 1'b0, s;
  logic prev;
  int checks = 0, failures = 0;

  set_register dut (.clk(clk), .rst(rst), .set(set), .s(s));

  always #5 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set = 1'b1;
    @(posedge clk); #1;
    checks++; if (s !== 1'b0) failures++;       // reset wins over set
    rst = 1'b0;
    for (int i = 0; i < 200; i++) begin
      set  = 1'($urandom);
      prev = set;
      @(posedge clk); #1;
      checks++;
      if (s !== prev) begin
        failures++;
        $display("FAIL cycle %0d: s=%0b expected %0b", i, s, prev);
      end
      set = ~prev;                               // glitch between edges is not seen
      #2;
      checks++; if (s !== prev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
