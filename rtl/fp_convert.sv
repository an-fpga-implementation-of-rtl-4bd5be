`timescale 1ns/1ps
// fp_convert: registered conversions between unsigned 32-bit integers and
// single-precision floating point (see fp_pkg for the rules).
//
// Both directions work side by side: `u_in` appears as `fp_out` and
// `fp_in` as `u_out` one clock after they are applied. The conversion
// rules follow the document; registering the result is this design's
// choice so that the conversion fits the controller's state machine like
// the other arithmetic units.
module fp_convert
  import fp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] u_in,
  input  fp32_t       fp_in,
  output fp32_t       fp_out,
  output logic [31:0] u_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fp_out <= FP_ZERO;
      u_out  <= '0;
    end else begin
      fp_out <= u32_to_fp(u_in);
      u_out  <= fp_to_u32(fp_in);
    end
  end
endmodule
