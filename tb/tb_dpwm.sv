`timescale 1ns/1ps
// tb_dpwm: the complete high-resolution DPWM with four 45-degree clocks.
// Edges of the gate outputs are time-stamped in nanoseconds and compared
// with the commands:
//   - reset commands (650-cycle period) until the first control_done, and
//     no change while the inputs change without control_done,
//   - the document's example: period 315.125 cycles (2424.04 ns) and duty
//     143.5 cycles (1103.85 ns), with each edge within 20 ps,
//   - the phase of every channel against channel 0 as set by its sync
//     command, to the 0.96 ns step,
//   - one ADC flag rise per period,
//   - overlapping pulses of a pair reach the gates with the guard off and
//     never with it on, and FORCE_OFF stops the pulses.
module tb_dpwm;
  import dpwm_pkg::*;

  // the clock period is measured from the PLL model (it is rounded to the
  // simulation precision), and every expectation is built from it
  real T  = 1000.0 / 130.0;
  real ST = 1000.0 / 1040.0;
  realtime t_a;

  logic clk_ctrl = 1'b0, rst_n = 1'b0, pll_rst = 1'b1;
  logic clk_0, clk_45, clk_90, clk_135, lock;
  logic control_done = 1'b0, guard_en = 1'b0;
  cmd_t period_in = RST_PERIOD;
  cmd_t [3:0] duty_in = '0, sync_in = '0;
  logic [3:0] force_off_in = '0;
  logic [ADC_W-1:0] adc_time_in = RST_ADC;
  logic [3:0] gate;
  logic adc_flag;
  int checks = 0, failures = 0;

  pll_4phase_model u_pll (.CLKI(clk_ctrl), .RST(pll_rst), .CLKOP(clk_0), .CLKOS(clk_45),
                          .CLKOS2(clk_90), .CLKOS3(clk_135), .LOCK(lock));

  dpwm #(.N_CH(4)) dut (.rst_n, .clk_ctrl, .clk_0, .clk_45, .clk_90, .clk_135, .control_done,
                        .period_in, .duty_in, .sync_in, .force_off_in, .adc_time_in,
                        .guard_en, .gate, .adc_flag);

  always #5 clk_ctrl = ~clk_ctrl;
  initial begin #400000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---- edge time stamps
  realtime rise[4][$], fall[4][$], adc_r[$];
  int overlap01 = 0;
  for (genvar i = 0; i < 4; i++) begin : g_mon
    always @(posedge gate[i]) rise[i].push_back($realtime);
    always @(negedge gate[i]) fall[i].push_back($realtime);
  end
  always @(posedge adc_flag) adc_r.push_back($realtime);
  always @(gate[0] or gate[1]) if (gate[0] && gate[1]) overlap01++;

  task automatic clear();
    for (int i = 0; i < 4; i++) begin rise[i].delete(); fall[i].delete(); end
    adc_r.delete();
    overlap01 = 0;
  endtask

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic near(input real a, input real b, input real tol);
    return (a - b <= tol) && (b - a <= tol);
  endfunction

  function automatic real wrapf(input real x, input real p);
    real y = x;
    while (y < 0.0) y = y + p;
    while (y >= p) y = y - p;
    return y;
  endfunction

  task automatic load();
    @(negedge clk_ctrl) control_done = 1'b1;
    @(negedge clk_ctrl) control_done = 1'b0;
  endtask

  // width and period of channel i, phase against channel 0, over the
  // edges collected since clear()
  task automatic check_channel(input int i, input int per, input int d, input real ph_steps);
    real width, pr, ph, ep;
    int  n;
    n = 0;
    for (int k = 1; k < rise[i].size() && k < fall[i].size(); k++) begin
      // pair each rise with the next fall
      width = -1.0;
      foreach (fall[i][j]) if (width < 0.0 && fall[i][j] > rise[i][k]) width = fall[i][j] - rise[i][k];
      if (width >= 0.0)  // the last rise of the window may have no fall yet
        check(near(width, real'(d) * ST, 0.02), $sformatf("ch%0d width %f", i, width));
      pr = rise[i][k] - rise[i][k-1];
      check(near(pr, real'(per) * ST, 0.02), $sformatf("ch%0d period %f", i, pr));
      n++;
    end
    check(n >= 3, $sformatf("ch%0d enough pulses (%0d)", i, n));
    if (i != 0 && rise[i].size() > 2 && rise[0].size() > 2) begin
      ph = wrapf(rise[i][2] - rise[0][2], real'(per) * ST);
      ep = wrapf(ph_steps * ST, real'(per) * ST);
      check(near(ph, ep, 0.02) || near(ph + real'(per) * ST, ep, 0.02) ||
            near(ph - real'(per) * ST, ep, 0.02), $sformatf("ch%0d phase %f want %f", i, ph, ep));
    end
  endtask

  // expected rise of channel i after channel 0, in steps
  function automatic real phase_of(input int per, input int s, input int d0, input int di);
    return real'((per >> 1) - s + (d0 >> 1) - (di >> 1));
  endfunction

  int per, d0, d1, d2, d3, s1, s2, s3;

  initial begin
    #30 pll_rst = 1'b0;
    wait (lock);
    @(posedge clk_0) t_a = $realtime;
    repeat (100) @(posedge clk_0);
    T  = ($realtime - t_a) / 100.0;
    ST = T / 8.0;
    check(near(T, 1000.0 / 130.0, 0.002), $sformatf("clock period %f", T));
    rst_n = 1'b1;

    // ---- reset commands until control_done
    clear();
    period_in = cmd_t'(2521);
    duty_in   = '{default: cmd_t'(1148)};
    repeat (8 * 650) @(posedge clk_0);
    check(rise[0].size() >= 5, "pulses at reset commands");
    if (rise[0].size() >= 3)
      check(near(rise[0][2] - rise[0][1], 650.0 * T, 0.02), "reset period 650 cycles held without control_done");
    // pair the third rise with the fall that follows it (a latch that came
    // out of power-up high adds one early fall)
    if (rise[0].size() >= 3) begin
      real w = -1.0;
      foreach (fall[0][j]) if (w < 0.0 && fall[0][j] > rise[0][2]) w = fall[0][j] - rise[0][2];
      check(near(w, 291.0 * T, 0.02), $sformatf("reset duty 291 cycles (%f ns)", w));
    end

    // ---- the document's example: 315.125 / 143.5 / sync 1.5
    per = 2521; d0 = 1148; d1 = 1148; d2 = 900; d3 = 700; s1 = 12; s2 = 400; s3 = 2000;
    duty_in = {cmd_t'(d3), cmd_t'(d2), cmd_t'(d1), cmd_t'(d0)};
    sync_in = {cmd_t'(s3), cmd_t'(s2), cmd_t'(s1), cmd_t'(0)};
    adc_time_in = 11'd100;
    load();
    repeat (12 * 650) @(posedge clk_0);
    clear();
    repeat (8 * 316) @(posedge clk_0);
    check_channel(0, per, d0, 0.0);
    check_channel(1, per, d1, phase_of(per, s1, d0, d1));
    check_channel(2, per, d2, phase_of(per, s2, d0, d2));
    check_channel(3, per, d3, phase_of(per, s3, d0, d3));
    check(overlap01 == 0, "example pulses do not overlap");
    check(adc_r.size() >= 7 && adc_r.size() <= 9, $sformatf("adc rises %0d", adc_r.size()));
    for (int k = 1; k < adc_r.size(); k++)
      check(adc_r[k] - adc_r[k-1] > 314.0 * T && adc_r[k] - adc_r[k-1] < 316.5 * T, "adc spacing");

    // ---- a fractional period and odd duty: every step of the fine path
    per = 1387; d0 = 555; d1 = 601; s1 = 3;
    period_in = cmd_t'(per);
    duty_in = {cmd_t'(400), cmd_t'(401), cmd_t'(d1), cmd_t'(d0)};
    sync_in = {cmd_t'(7), cmd_t'(5), cmd_t'(s1), cmd_t'(0)};
    load();
    repeat (20 * 175) @(posedge clk_0);
    clear();
    repeat (8 * 174) @(posedge clk_0);
    check_channel(0, per, d0, 0.0);
    check_channel(1, per, d1, phase_of(per, s1, d0, d1));
    check_channel(2, per, 401, phase_of(per, 5, d0, 401));
    check_channel(3, per, 400, phase_of(per, 7, d0, 400));

    // ---- overlapping pair: guard off lets it through, guard on blocks it
    per = 1600;
    period_in = cmd_t'(per);
    duty_in = {cmd_t'(400), cmd_t'(400), cmd_t'(1100), cmd_t'(1100)};
    sync_in = {cmd_t'(0), cmd_t'(0), cmd_t'(0), cmd_t'(0)};
    load();
    repeat (10 * 200) @(posedge clk_0);
    clear();
    repeat (6 * 200) @(posedge clk_0);
    check(overlap01 > 0, "overlap reaches gates with guard off");
    guard_en = 1'b1;
    repeat (2) @(posedge clk_0);
    clear();
    repeat (6 * 200) @(posedge clk_0);
    check(overlap01 == 0, "guard blocks overlap");
    check(rise[0].size() > 0 && rise[1].size() > 0, "guarded channels still pulse");
    guard_en = 1'b0;

    // ---- FORCE_OFF: no pulses
    force_off_in = 4'b1111;
    load();
    repeat (2 * 200) @(posedge clk_0);
    clear();
    repeat (6 * 200) @(posedge clk_0);
    for (int i = 0; i < 4; i++) check(rise[i].size() == 0, $sformatf("ch%0d off", i));
    force_off_in = 4'b0000;
    load();
    repeat (4 * 200) @(posedge clk_0);
    clear();
    repeat (4 * 200) @(posedge clk_0);
    check(rise[0].size() >= 2, "pulses resume");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
