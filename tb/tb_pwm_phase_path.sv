`timescale 1ns/1ps
// tb_pwm_phase_path: drives four 45-degree-shifted clocks of period 8 ns
// (one high-resolution step = 1 ns) and, for every select value, measures
// when a one-cycle pulse leaves the path: it must rise 1 cycle plus
// (8 - sel) steps (sel = 0: 8 steps) after the CLK_0 edge that sampled it
// and stay high for one cycle.
module tb_pwm_phase_path;
  localparam real T = 8.0;
  logic rst_n = 1'b0, clk_0 = 1'b0, clk_45 = 1'b0, clk_90 = 1'b0, clk_135 = 1'b0;
  logic pulse = 1'b0, out;
  logic [2:0] sel = '0;
  int checks = 0, failures = 0;

  pwm_phase_path dut (.rst_n, .clk_0, .clk_45, .clk_90, .clk_135, .pulse, .sel, .out);

  initial forever begin #(T/2) clk_0 = ~clk_0; end
  initial begin #(T/8);     forever begin #(T/2) clk_45  = ~clk_45;  end end
  initial begin #(2*T/8);   forever begin #(T/2) clk_90  = ~clk_90;  end end
  initial begin #(3*T/8);   forever begin #(T/2) clk_135 = ~clk_135; end end

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  realtime t_sample, t_rise, t_fall;

  initial begin
    repeat (3) @(posedge clk_0);
    rst_n = 1'b1;
    for (int rep = 0; rep < 3; rep++)
      for (int s = 0; s < 8; s++) begin
        @(posedge clk_0); #0.3;
        sel = 3'(s);
        pulse = 1'b1;
        @(posedge clk_0); t_sample = $realtime; #0.3;
        pulse = 1'b0;
        @(posedge out); t_rise = $realtime;
        @(negedge out); t_fall = $realtime;
        checks++;
        if (t_rise - t_sample != T + ((s == 0) ? 8.0 : real'(8 - s)))
          begin failures++; $display("sel %0d: rise %0.3f ns after sampling", s, t_rise - t_sample); end
        checks++;
        if (t_fall - t_rise != T) begin failures++; $display("sel %0d: width %0.3f", s, t_fall - t_rise); end
        repeat (3) @(posedge clk_0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
