`timescale 1ns/1ps
// pwm_mux8: asynchronous 8-to-1 multiplexer of the DPWM output stage.
//
// It picks one of the eight phase flip-flops of a SETD or CLRD path and
// feeds it to the output latch. It is purely combinational: the select is
// held stable by the coarse counter for a whole PWM period, and all
// flip-flop outputs are low whenever the select changes, so the output
// does not glitch. Input k is chosen by sel = k; the document's
// multiplexer is built the same way.
module pwm_mux8 (
  input  logic [2:0] sel,
  input  logic [7:0] in,
  output logic       out
);
  always_comb out = in[sel];
endmodule
