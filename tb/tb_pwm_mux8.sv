`timescale 1ns/1ps
// tb_pwm_mux8: exhaustive check of the 8:1 output multiplexer.
module tb_pwm_mux8;
  logic [2:0] sel;
  logic [7:0] in;
  logic       out;
  int checks = 0, failures = 0;

  pwm_mux8 dut (.sel, .in, .out);

  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int s = 0; s < 8; s++)
      for (int v = 0; v < 256; v++) begin
        sel = 3'(s); in = 8'(v);
        #1;
        checks++;
        if (out !== ((v >> s) & 1)) begin failures++; $display("sel %0d in %b out %b", s, in, out); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
