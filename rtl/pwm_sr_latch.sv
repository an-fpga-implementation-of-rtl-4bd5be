`timescale 1ns/1ps
// pwm_sr_latch: asynchronous set-reset output latch of a DPWM channel.
//
// A rising edge on `s` drives `q` high and a rising edge on `r` drives it
// low, as the document specifies; the last edge wins, so a set and a reset
// that follow each other by less than the width of their pulses still give
// the intended short pulse. The FPGA has no hard set-reset latch, so it is
// built here from two flip-flops clocked by the set and reset pulses
// themselves: `q` is the XOR of the two, the set flop makes them differ
// and the reset flop makes them equal. This avoids a combinational loop;
// the document builds the latch from gates instead. `rst_n` clears `q`
// asynchronously. `s` and `r` are the only clocks of this module.
module pwm_sr_latch (
  input  logic rst_n,
  input  logic s,
  input  logic r,
  output logic q
);
  logic fs, fr;

  always_ff @(posedge s or negedge rst_n) begin
    if (!rst_n) fs <= 1'b0;
    else        fs <= ~fr;
  end

  always_ff @(posedge r or negedge rst_n) begin
    if (!rst_n) fr <= 1'b0;
    else        fr <= fs;
  end

  assign q = fs ^ fr;
endmodule
