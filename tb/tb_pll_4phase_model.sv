`timescale 1ns/1ps
// tb_pll_4phase_model: checks lock after the input edges, the 130 MHz
// output period and the 45-degree spacing of the four outputs, and that
// RST stops them.
module tb_pll_4phase_model;
  logic clki = 1'b0, rst = 1'b1;
  logic c0, c45, c90, c135, lock;
  int checks = 0, failures = 0;
  realtime t0, t0b, t45, t90, t135;
  localparam real P = 1000.0 / 130.0;

  pll_4phase_model dut (.CLKI(clki), .RST(rst), .CLKOP(c0), .CLKOS(c45), .CLKOS2(c90),
                        .CLKOS3(c135), .LOCK(lock));

  always #5 clki = ~clki;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic logic near(input real a, input real b);
    return (a - b < 0.003) && (b - a < 0.003);
  endfunction

  initial begin
    #20 rst = 1'b0;
    checks++; if (lock) begin failures++; $display("locked too early"); end
    wait (lock);
    repeat (3) @(posedge c0);
    t0 = $realtime;
    @(posedge c45);  t45  = $realtime;
    @(posedge c90);  t90  = $realtime;
    @(posedge c135); t135 = $realtime;
    @(posedge c0);   t0b  = $realtime;
    checks++; if (!near(t0b - t0, P))        begin failures++; $display("period %f", t0b - t0); end
    checks++; if (!near(t45 - t0, P / 8))    begin failures++; $display("45: %f", t45 - t0); end
    checks++; if (!near(t90 - t0, P / 4))    begin failures++; $display("90: %f", t90 - t0); end
    checks++; if (!near(t135 - t0, 3 * P / 8)) begin failures++; $display("135: %f", t135 - t0); end
    rst = 1'b1;
    #50;
    checks++; if (lock) begin failures++; $display("lock kept in reset"); end
    t0 = $realtime;
    #50;
    checks++; if (c0 !== 1'b0) begin failures++; $display("clock runs in reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
