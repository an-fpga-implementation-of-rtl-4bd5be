`timescale 1ns/1ps
// tb_fp_sub: feeds a new pair of operands every cycle and compares each
// result, five cycles later, with a - b computed in double precision.
// Also checks the example of the document's simulation
// (5.3936e-6 - 1.2489e-7 = 5.2687e-6), zero results and saturation.
module tb_fp_sub;
  import fp_pkg::*;
  import tb_fp_util::*;
  localparam int LAT = 5;
  logic clk = 1'b0, rst_n = 1'b0;
  fp32_t op_a, op_b, result;
  int checks = 0, failures = 0;

  fp_sub dut (.clk, .rst_n, .op_a, .op_b, .result);

  always #5 clk = ~clk;
  initial begin #500000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic real to_real(input fp32_t f);
    return bits_to_real(f);
  endfunction

  function automatic fp32_t from_real(input real r);
    return fp32_t'(real_to_bits(r));
  endfunction

  real exp_q[$];
  int    cyc = 0;

  task automatic push(input fp32_t a, input fp32_t b);
    op_a = a; op_b = b;
    exp_q.push_back(to_real(a) - to_real(b));
    @(posedge clk); #1;
  endtask

  // compare on every cycle once the pipeline holds LAT entries
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (exp_q.size() >= LAT) begin
      real e, g, tol;
      e = exp_q.pop_front();
      #0.5;
      g = to_real(result);
      tol = (e < 0 ? -e : e) * pow2(-21);
      if (tol < 1.0e-37) tol = 1.0e-37;
      checks++;
      if ((g - e) > tol || (e - g) > tol) begin
        failures++;
        $display("sub mismatch: got %e exp %e", g, e);
      end
    end
  end

  initial begin
    op_a = FP_ZERO; op_b = FP_ZERO;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    #1;
    push(from_real(5.3936e-6), from_real(1.2489e-7));
    push(from_real(1.0), from_real(1.0));             // exact zero
    push(from_real(3.0), from_real(-5.0));            // effective addition
    push(from_real(-2.5), from_real(7.75));
    push(from_real(1.0), from_real(1.0e-20));         // tiny operand vanishes
    push(from_real(1.0000001), from_real(1.0));       // massive cancellation
    for (int i = 0; i < 3000; i++) begin
      fp32_t a, b;
      a = {1'($urandom()), 8'($urandom_range(90, 160)), 23'($urandom())};
      b = {1'($urandom()), (($urandom() % 4) == 0) ? a.exp : 8'($urandom_range(90, 160)), 23'($urandom())};
      push(a, b);
    end
    op_a = FP_ZERO; op_b = FP_ZERO;
    repeat (LAT + 2) begin exp_q.push_back(0.0); @(posedge clk); #1; end
    // saturation: largest finite minus its negative
    op_a = 32'h7F7FFFFF; op_b = 32'hFF7FFFFF;
    exp_q.delete();
    repeat (LAT) @(posedge clk);
    #1;
    checks++;
    if (result !== 32'h7F7FFFFF) begin failures++; $display("saturation: %h", result); end
    // latency: a changed operand is visible exactly LAT edges later
    op_a = from_real(8.0); op_b = from_real(2.0);
    repeat (LAT - 1) @(posedge clk);
    #1;
    checks++;
    if (to_real(result) == 6.0) begin failures++; $display("result appeared too early"); end
    @(posedge clk); #1;
    checks++;
    if (to_real(result) != 6.0) begin failures++; $display("result not ready after %0d cycles", LAT); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
