`timescale 1ns/1ps
// tb_fp_recip: sweeps the 11 mantissa bits the estimate uses over several
// exponents and signs, checks the relative error of 1/x against real
// arithmetic (limit 0.11 %, the document quotes about 0.1 %), exact powers of two, the one-cycle latency
// and the zero-input case.
module tb_fp_recip;
  import fp_pkg::*;
  import tb_fp_util::*;
  logic clk = 1'b0, rst_n = 1'b0;
  fp32_t op_a, result;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  fp_recip dut (.clk, .rst_n, .op_a, .result);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic try(input fp32_t x);
    real e, g, err;
    op_a = x;
    @(posedge clk); #1;
    e = 1.0 / bits_to_real(x);
    g = bits_to_real(result);
    err = (g - e) / e;
    if (err < 0.0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (err > 0.0011) begin failures++; $display("recip %e: got %e exp %e", bits_to_real(x), g, e); end
  endtask

  initial begin
    op_a = FP_ZERO;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int ex = 100; ex <= 150; ex += 10)
      for (int k = 0; k < 2048; k++)
        try({1'(k & 1), 8'(ex), 11'(k), 12'($urandom())});
    // powers of two are exact
    for (int ex = 110; ex <= 140; ex++) begin
      try({1'b0, 8'(ex), 23'd0});
      checks++;
      if (result !== {1'b0, 8'(254 - ex), 23'd0}) begin failures++; $display("2^%0d -> %h", ex - 127, result); end
    end
    // latency: the estimate of a new operand is there one edge later
    op_a = real_to_bits(4.0);
    @(posedge clk); #1;
    checks++;
    if (bits_to_real(result) != 0.25) begin failures++; $display("latency: %e", bits_to_real(result)); end
    // zero input gives the largest finite value
    op_a = FP_ZERO;
    @(posedge clk); #1;
    checks++;
    if (result !== 32'h7F7FFFFF) begin failures++; $display("zero input: %h", result); end
    $display("largest relative error %f %%", max_err * 100.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
