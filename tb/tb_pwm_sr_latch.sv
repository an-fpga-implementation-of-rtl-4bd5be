`timescale 1ns/1ps
// tb_pwm_sr_latch: checks that rising set edges raise the output, rising
// reset edges lower it, the last edge wins when the pulses overlap, and the
// asynchronous reset clears it.
module tb_pwm_sr_latch;
  logic rst_n = 1'b0, s = 1'b0, r = 1'b0, q;
  int checks = 0, failures = 0;

  pwm_sr_latch dut (.rst_n, .s, .r, .q);

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic expect_q(input logic v, input string what);
    #0.1;
    checks++;
    if (q !== v) begin failures++; $display("%s: q=%b expected %b at %0t", what, q, v, $time); end
  endtask

  initial begin
    #5; expect_q(1'b0, "reset");
    rst_n = 1'b1; #5;
    s = 1; expect_q(1'b1, "set edge"); #7;
    s = 0; expect_q(1'b1, "set released"); #5;
    s = 1; expect_q(1'b1, "second set"); #3; s = 0; #3;
    r = 1; expect_q(1'b0, "reset edge"); #7;
    r = 0; expect_q(1'b0, "reset released"); #5;
    // overlapping pulses: set, then reset while set is still high
    s = 1; expect_q(1'b1, "overlap set"); #2;
    r = 1; expect_q(1'b0, "overlap reset wins"); #3;
    s = 0; expect_q(1'b0, "overlap set falls"); #3;
    r = 0; #2;
    // reset high, then a set edge: set wins
    r = 1; #2; s = 1; expect_q(1'b1, "set after reset"); #2;
    r = 0; s = 0; expect_q(1'b1, "both released"); #2;
    for (int i = 0; i < 50; i++) begin
      logic v;
      v = 1'($urandom());
      if (v) begin s = 1; #1; s = 0; end else begin r = 1; #1; r = 0; end
      expect_q(v, "random edge");
      #1;
    end
    rst_n = 1'b0; expect_q(1'b0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
