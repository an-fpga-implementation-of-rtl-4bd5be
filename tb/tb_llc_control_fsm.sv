`timescale 1ns/1ps
// tb_llc_control_fsm: runs the control-law state machine pass by pass with
// chosen ADC samples and checks every published command against values
// computed here independently:
//   - the pass length from adc_ready to control_done (CTRL_CYCLES),
//   - the period stays within 1.2 MHz .. 375 kHz, and rises (lower
//     frequency, more gain) while the output is below its reference,
//   - primary duty = period/2 - dead time, secondary duty limited to the
//     resonant half period, ADC point = period/8 - lead,
//   - the secondary phase against a real-number evaluation of
//     atan((K1 - K2 ts^2)/(K3 ts - K4 ts^3)) (within the error of the
//     piecewise-linear arctangent and the truncating arithmetic),
//   - over-current gives the maximum frequency, and a reference far below
//     the output drives the loop into over-frequency, which skips pulses
//     (FORCE_OFF on every channel) at the maximum frequency.
module tb_llc_control_fsm;
  import dpwm_pkg::*;
  import tb_fp_util::*;

  localparam int CTRL_CYCLES = 44;
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_ready = 1'b0, oc_in = 1'b0;
  logic [11:0] v_out = '0, v_ref = '0, i_pri = '0;
  cmd_t period;
  cmd_t [3:0] duty, sync;
  logic [3:0] force_off;
  logic [ADC_W-1:0] adc_time;
  logic control_done, oc_evt, of_evt;
  logic [5:0] state;
  int checks = 0, failures = 0;
  int n_oc = 0, n_of = 0, n_skip = 0, n_phase = 0;

  llc_control_fsm dut (.clk, .rst_n, .adc_ready, .v_out, .v_ref, .i_pri, .oc_in, .period,
                       .duty, .sync, .force_off, .adc_time, .control_done,
                       .overcurrent_evt(oc_evt), .overfreq_evt(of_evt), .state);

  always #5 clk = ~clk;
  initial begin #2000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) begin
    if (oc_evt) n_oc++;
    if (of_evt) n_of++;
  end

  function automatic real wrapf(input real x, input real p);
    real y = x;
    while (y < 0.0) y = y + p;
    while (y >= p) y = y - p;
    return y;
  endfunction

  // distance of a and b on a circle of circumference p
  function automatic real cdist(input real a, input real b, input real p);
    real d = wrapf(a - b, p);
    return (d > p / 2.0) ? p - d : d;
  endfunction

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (period %0d)", what, period); end
  endtask

  // one pass; returns the number of cycles from adc_ready to control_done
  task automatic pass(input int v, input int r, input int i, input logic oc, output int cyc);
    @(negedge clk);
    v_out = 12'(v); v_ref = 12'(r); i_pri = 12'(i); oc_in = oc;
    adc_ready = 1'b1;
    @(negedge clk);
    adc_ready = 1'b0;
    cyc = 1;
    while (!control_done) begin @(negedge clk); cyc++; end
  endtask

  task automatic check_cmds();
    real ts, num, den, phi, off, p, s2e, s3e;
    int  per, dp, ds;
    per = int'(period);
    p   = real'(per);
    check(per >= 867 && per <= 2773, "period out of range");
    dp = per / 2 - 112;
    ds = (dp > 933) ? 933 : dp;
    check(int'(duty[0]) == dp && int'(duty[1]) == dp, "primary duty");
    check(int'(duty[2]) == ds && int'(duty[3]) == ds, "secondary duty");
    check(int'(adc_time) == per / 8 - 40, "adc point");
    check(sync[1] == '0, "primary sync");
    ts  = p / (8.0 * 130.0e6);
    num = bits_to_real(32'h2608222D) - bits_to_real(32'h38F516A0) * ts * ts;
    den = bits_to_real(32'h300CD14B) * ts - bits_to_real(32'h4188C89A) * ts * ts * ts;
    phi = $atan(num / den);
    off = phi / (2.0 * PI) * p;
    s2e = wrapf(p / 2.0 - off, p);
    s3e = wrapf(-off, p);
    check(cdist(real'(sync[2]), s2e, p) <= 4.0 + 0.004 * p, "secondary sync 2");
    check(cdist(real'(sync[3]), s3e, p) <= 4.0 + 0.004 * p, "secondary sync 3");
    n_phase++;
  endtask

  int cyc, p0, p1;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check(period == cmd_t'(1387), "start period 750 kHz");

    // output below reference: the period must grow (frequency falls)
    pass(2000, 2400, 1500, 1'b0, cyc);
    check(cyc == CTRL_CYCLES, $sformatf("pass length %0d", cyc));
    check_cmds();
    p0 = int'(period);
    for (int k = 0; k < 40; k++) begin
      pass(2000, 2400, 1500, 1'b0, cyc);
      check(cyc == CTRL_CYCLES, "pass length");
      check_cmds();
    end
    p1 = int'(period);
    check(p1 > p0, $sformatf("period rises with low output %0d -> %0d", p0, p1));

    // random operating points across the range
    for (int k = 0; k < 200; k++) begin
      pass(int'($urandom_range(1000, 3000)), int'($urandom_range(1000, 3000)),
           int'($urandom_range(0, 3800)), 1'b0, cyc);
      check_cmds();
      check(force_off == '0 || force_off == '1, "force_off pattern");
    end

    // over-current: maximum frequency at once
    pass(2000, 2400, 1500, 1'b1, cyc);
    check(int'(period) == 867 && oc_evt == 1'b0, "over-current period");
    pass(2000, 2400, 3950, 1'b0, cyc);
    check(int'(period) == 867, "over-current by sample");
    check_cmds();

    // reference far below the output: frequency up to the limit, then skip
    for (int k = 0; k < 200 && force_off != '1; k++) pass(3500, 500, 3000, 1'b0, cyc);
    check(force_off == '1, "pulse skipping entered");
    check(int'(period) == 867, "skipping at maximum frequency");
    if (force_off == '1) n_skip++;
    // and back out once the output falls below the reference
    for (int k = 0; k < 400 && force_off != '0; k++) pass(500, 3500, 0, 1'b0, cyc);
    check(force_off == '0, "pulse skipping left");

    check(n_oc == 2, $sformatf("over-current events %0d", n_oc));
    check(n_of >= 1, "over-frequency events");
    check(n_skip == 1 && n_phase > 200, "mechanisms");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
