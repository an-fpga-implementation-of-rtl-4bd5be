`timescale 1ns/1ps
// tb_llc_controller_top: the whole controller in a closed loop, at its
// default parameters.
//
// A converter stand-in closes the loop: every conversion the output
// voltage moves an eighth of the way towards a level proportional to the
// measured switching period (a longer period, i.e. a lower frequency, gives
// more gain, as below resonance in an LLC converter) and towards zero when
// no pulse was seen in the last microseconds. An ADC stand-in answers each
// `adc_start` after 360 ns (a 2.8 MSPS converter) with the samples.
//
// The run goes through regulation at a reference, an over-current signal,
// a reference far below the output (maximum frequency and pulse
// skipping), and recovery. It counts each mechanism and fails if one never
// happened: ADC triggers from the PWM counter, complete control passes,
// command loads seen at the gates, over-current events, over-frequency
// events with skipped pulses and secondary-channel pulses. Throughout, the
// primary pair must never conduct together, every pass must finish before
// the next samples arrive (also at 1.2 MHz, where conversion plus pass just
// fit one period), and the gate period must stay within 1.2 MHz .. 375 kHz.
// The stand-ins and all numbers in them are this testbench's own; the
// document supplies only the frequency range and the 2.8 MSPS converter.
module tb_llc_controller_top;

  logic clk = 1'b0, rst_n = 1'b0;
  logic adc_start, adc_ready = 1'b0, oc_in = 1'b0, guard_en = 1'b1;
  logic [11:0] v_out = '0, v_ref = 12'd2400, i_pri = 12'd1500;
  logic [3:0] gate;
  logic pll_lock, oc_evt, of_evt;
  logic [5:0] state;
  int checks = 0, failures = 0;

  llc_controller_top dut (.clk, .rst_n, .adc_start, .adc_ready, .v_out, .v_ref, .i_pri, .oc_in,
                          .guard_en, .gate, .pll_lock, .state,
                          .overcurrent_evt(oc_evt), .overfreq_evt(of_evt));

  always #5 clk = ~clk;
  initial begin #3000000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %t", what, $realtime); end
  endtask

  // ---- mechanism counters
  int n_trig = 0, n_pass = 0, n_oc = 0, n_of = 0, n_sec = 0, n_overlap = 0, n_busy = 0;
  int n_gap = 0, n_range = 0, n_perchg = 0;

  // ---- gate observation
  realtime last_rise = 0.0, per_ns = 1333.0, last_any = 0.0, prev_per = 0.0;
  always @(posedge gate[0]) begin
    if (last_rise > 0.0) begin
      per_ns = $realtime - last_rise;
      if (per_ns > 2667.0 + 1.0) n_gap++;                     // skipped pulses
      else if (per_ns < 833.0 - 1.0) n_range++;
      if (prev_per > 0.0 && (per_ns - prev_per > 2.0 || prev_per - per_ns > 2.0)) n_perchg++;
      prev_per = per_ns;
    end
    last_rise = $realtime;
    last_any  = $realtime;
  end
  always @(posedge gate[2]) n_sec++;
  always @(gate[0] or gate[1]) if (gate[0] && gate[1]) n_overlap++;
  always @(posedge clk) begin
    if (oc_evt) n_oc++;
    if (of_evt) n_of++;
    if (state == 6'd0 && $past(state) != 6'd0) n_pass++;
    if (adc_start) n_trig++;
    if (adc_ready && state != 6'd0) n_busy++;   // a sample the controller would miss
  end

  // ---- ADC and converter stand-ins
  int v_model = 0;
  initial begin
    forever begin
      @(posedge clk iff adc_start);
      begin
        int tgt;
        tgt = ($realtime - last_any > 4000.0) ? 0 : int'(per_ns * 1.2);
        if (tgt > 4000) tgt = 4000;
        v_model = v_model + (tgt - v_model) / 8;
      end
      repeat (36) @(posedge clk);
      @(negedge clk);
      v_out = 12'(v_model);
      adc_ready = 1'b1;
      @(negedge clk);
      adc_ready = 1'b0;
    end
  end

  int p_trig;

  initial begin
    #1 rst_n = 1'b1;          // a falling reset edge clears the CLK_0-domain flops
    #1 rst_n = 1'b0;
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    wait (pll_lock);

    // regulation
    repeat (150) @(posedge clk iff adc_start);
    check(v_model > 2400 - 200 && v_model < 2400 + 200, $sformatf("regulated output %0d", v_model));
    check(per_ns > 1600.0 && per_ns < 2400.0, $sformatf("period near resonance %f", per_ns));

    // over-current for a few conversions
    oc_in = 1'b1;
    repeat (3) @(posedge clk iff adc_start);
    repeat (2) @(posedge gate[0]);
    check(per_ns > 833.0 && per_ns < 835.0, $sformatf("over-current: maximum frequency %f", per_ns));
    oc_in = 1'b0;
    repeat (60) @(posedge clk iff adc_start);

    // reference far below the output: maximum frequency, then skipping
    v_ref = 12'd400;
    p_trig = n_trig;
    while (n_gap == 0 && n_trig - p_trig < 3000) @(posedge clk);
    check(n_gap > 0, "pulses skipped");
    repeat (200) @(posedge clk iff adc_start);

    // recovery
    v_ref = 12'd2400;
    repeat (200) @(posedge clk iff adc_start);
    check($realtime - last_any < 4000.0, "pulses resume");
    check(v_model > 2400 - 300 && v_model < 2400 + 300, $sformatf("regulated again %0d", v_model));

    $display("triggers %0d passes %0d oc %0d of %0d gaps %0d sec %0d perchg %0d",
             n_trig, n_pass, n_oc, n_of, n_gap, n_sec, n_perchg);
    check(n_trig > 300, "ADC triggers");
    check(n_pass >= n_trig - 1, "every trigger gave a control pass");
    check(n_busy == 0, "no samples while computing");
    check(n_oc >= 3, "over-current events");
    check(n_of > 0, "over-frequency events");
    check(n_gap > 0, "skip bursts");
    check(n_sec > 100, "secondary pulses");
    check(n_perchg > 5, "command loads change the period");
    check(n_overlap == 0, "primary pair never on together");
    check(n_range == 0, $sformatf("periods out of range %0d", n_range));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
