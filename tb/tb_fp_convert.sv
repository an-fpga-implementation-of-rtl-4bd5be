`timescale 1ns/1ps
// tb_fp_convert: checks both integer/float conversions against references
// computed with real arithmetic, including the one-cycle latency.
module tb_fp_convert;
  import fp_pkg::*;
  import tb_fp_util::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] u_in, u_out;
  fp32_t fp_in, fp_out;
  int checks = 0, failures = 0;

  fp_convert dut (.clk, .rst_n, .u_in, .fp_in, .fp_out, .u_out);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // reference u32 -> float with truncation: scale by powers of two in real
  function automatic logic [31:0] ref_u2f(input logic [31:0] u);
    real r; int e; logic [31:0] m;
    if (u == 0) return 32'd0;
    r = real'(u); e = 0;
    while (r >= 2.0) begin r = r / 2.0; e++; end
    m = 32'($floor((r - 1.0) * 8388608.0));
    return {1'b0, 8'(e + 127), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_f2u(input logic [31:0] f);
    real r;
    if (f[30:23] == 0) return 0;
    r = bits_to_real({1'b0, f[30:0]});
    if (r >= 4294967296.0) return 32'hFFFFFFFF;
    return 32'(longint'($floor(r)));
  endfunction

  task automatic check(input logic [31:0] u, input logic [31:0] f);
    u_in = u; fp_in = f;
    @(posedge clk); #1;
    checks++;
    if (fp_out !== ref_u2f(u)) begin failures++; $display("u2f %h -> %h exp %h", u, fp_out, ref_u2f(u)); end
    checks++;
    if (u_out !== ref_f2u(f)) begin failures++; $display("f2u %h -> %h exp %h", f, u_out, ref_f2u(f)); end
  endtask

  initial begin
    u_in = 0; fp_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    check(32'd0, 32'h3F800000);            // 0 ; 1.0
    check(32'd1, 32'h40490FDB);            // 1 ; 3.14159
    check(32'd2770, 32'h3F000000);         // 0.5 -> 0
    check(32'hFFFFFFFF, 32'h4F800000);     // 2^32 saturates
    check(32'h80000001, 32'hCB3C614E);     // negative: magnitude
    for (int i = 0; i < 2000; i++) begin
      logic [31:0] u, f;
      u = $urandom() >> ($urandom_range(0, 31));
      f = {1'($urandom()), 8'($urandom_range(100, 165)), 23'($urandom())};
      check(u, f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
