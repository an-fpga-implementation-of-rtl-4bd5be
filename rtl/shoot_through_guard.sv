`timescale 1ns/1ps
// shoot_through_guard: keeps the two gate signals of a half-bridge from
// being high at the same time.
//
// With `en` set, each output is its input ANDed with the XOR of both
// inputs, so whenever both inputs are high both outputs are low; with `en`
// clear the inputs pass unchanged. The document describes this XOR/AND
// protection as a configurable option for prototyping; which channels form
// a pair is decided by the instantiating module. Purely combinational.
module shoot_through_guard (
  input  logic en,
  input  logic a,
  input  logic b,
  output logic a_out,
  output logic b_out
);
  logic differ;
  always_comb begin
    differ = a ^ b;
    a_out  = en ? (a & differ) : a;
    b_out  = en ? (b & differ) : b;
  end
endmodule
