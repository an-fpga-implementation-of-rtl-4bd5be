`timescale 1ns/1ps
// pwm_phase_path: fine-resolution delay of one SETD or CLRD pulse.
//
// The one-cycle pulse from the coarse counter first passes two flip-flops
// on the rising edge of CLK_0, which move it safely out of the counter's
// timing into the phase-shifted clocks. From the second of them it is
// captured by eight flip-flops, two per clock, each on a different one of
// the eight edges of CLK_0/45/90/135 that follow: the first stage takes
// the rising edges of CLK_45, CLK_90, CLK_135 and the falling edge of CLK_0
// (1 to 4 eighths of a cycle), the second stage takes the next opposite
// edge of the same clock (5 to 8 eighths). An 8:1 multiplexer
// (pwm_mux8) then selects the tap: sel = 7 gives 1/8 of a cycle, sel = 4
// the falling edge of CLK_0 (4/8) and sel = 0 the next rising edge of
// CLK_0 (8/8), the encoding given in the document's text.
//
// Timing: a pulse that the coarse counter raises at rising CLK_0 edge n
// (and that is therefore sampled here at edge n+1) appears at the output
// 2 cycles + (8 - sel)/8 of a cycle (sel = 0: 3 cycles) after edge n, and
// stays high for one CLK_0 period. The select must be stable from the
// pulse's issue until it has left the path (4 cycles).
module pwm_phase_path (
  input  logic       rst_n,
  input  logic       clk_0,
  input  logic       clk_45,
  input  logic       clk_90,
  input  logic       clk_135,
  input  logic       pulse,   // SETD or CLRD, CLK_0 domain
  input  logic [2:0] sel,
  output logic       out
);
  logic a, b;
  // dN is the pulse delayed by N eighths of a cycle after b
  logic d1, d2, d3, d4, d5, d6, d7, d8;

  always_ff @(posedge clk_0 or negedge rst_n)
    if (!rst_n) begin a <= 1'b0; b <= 1'b0; end
    else        begin a <= pulse; b <= a;   end

  // first stage
  always_ff @(posedge clk_45  or negedge rst_n) if (!rst_n) d1 <= 1'b0; else d1 <= b;
  always_ff @(posedge clk_90  or negedge rst_n) if (!rst_n) d2 <= 1'b0; else d2 <= b;
  always_ff @(posedge clk_135 or negedge rst_n) if (!rst_n) d3 <= 1'b0; else d3 <= b;
  always_ff @(negedge clk_0   or negedge rst_n) if (!rst_n) d4 <= 1'b0; else d4 <= b;
  // second stage
  always_ff @(negedge clk_45  or negedge rst_n) if (!rst_n) d5 <= 1'b0; else d5 <= d1;
  always_ff @(negedge clk_90  or negedge rst_n) if (!rst_n) d6 <= 1'b0; else d6 <= d2;
  always_ff @(negedge clk_135 or negedge rst_n) if (!rst_n) d7 <= 1'b0; else d7 <= d3;
  always_ff @(posedge clk_0   or negedge rst_n) if (!rst_n) d8 <= 1'b0; else d8 <= d4;

  // multiplexer input k holds the tap with a delay of 8 - k (k = 0: 8)
  logic [7:0] mux_in;
  assign mux_in = {d1, d2, d3, d4, d5, d6, d7, d8};

  pwm_mux8 u_mux (.sel(sel), .in(mux_in), .out(out));
endmodule
