`timescale 1ns/1ps
// tb_pwm_counter: runs the coarse counter alone on CLK_0 and rebuilds every
// set and reset instant in high-resolution steps (8 per cycle) from the
// SETD/CLRD pulses and their selects. It checks, per channel, that each
// pulse is exactly as wide as its duty command, that the master pulses are
// exactly one period command apart (also for periods that are not a whole
// number of cycles, e.g. 260.125 and 315.125 cycles), that each channel
// sits at the phase its sync command asks for, that a zero duty, a duty
// at or above the period and FORCE_OFF suppress the right pulses, and that
// the ADC flag rises once per period at a fixed point of the carrier.
module tb_pwm_counter;
  import dpwm_pkg::*;
  localparam int N = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  cmd_t period;
  cmd_t [N-1:0] duty, sync;
  logic [N-1:0] force_off;
  logic [ADC_W-1:0] adc_time;
  logic [N-1:0] setd, clrd;
  logic [N-1:0][FINE_W-1:0] sel_set, sel_rst;
  logic adc_flag, master_mid;
  int checks = 0, failures = 0;

  pwm_counter #(.N_CH(N)) dut (.clk, .rst_n, .period, .duty, .sync, .force_off, .adc_time,
                               .setd, .clrd, .sel_set, .sel_rst, .adc_flag, .master_mid);

  always #4 clk = ~clk;
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  longint n = 0;                       // cycle index
  longint last_set[N], last_rst[N];
  int     n_set[N], n_rst[N];
  logic   checking = 1'b0;
  longint last_adc = -1, adc_off = -1;
  logic   adc_d = 1'b0;
  int     adc_rises = 0;

  function automatic longint modp(input longint a, input longint m);
    longint r;
    r = a % m;
    return (r < 0) ? r + m : r;
  endfunction

  always @(posedge clk) if (rst_n) begin
    n++;
    #1;
    for (int i = 0; i < N; i++) begin
      if (setd[i]) begin
        longint t;
        t = 8 * n + longint'(sel_delay(sel_set[i]));
        if (checking && i == 0 && n_set[0] > 0) begin
          checks++;
          if (t - last_set[0] != longint'(period)) begin
            failures++; $display("master period %0d, expected %0d", t - last_set[0], period);
          end
        end
        if (checking && i > 0 && n_set[0] > 0) begin
          longint want, got;
          got  = modp(t - last_set[0], longint'(period));
          want = modp(longint'(period >> 1) - longint'((sync[i] > period) ? period : sync[i])
                      + longint'(duty[0] >> 1) - longint'(duty[i] >> 1), longint'(period));
          checks++;
          if (got != want) begin
            failures++; $display("ch%0d phase %0d, expected %0d (t=%0d)", i, got, want, t);
          end
        end
        last_set[i] = t;
        n_set[i]++;
      end
      if (clrd[i]) begin
        longint t;
        t = 8 * n + longint'(sel_delay(sel_rst[i]));
        if (checking && n_set[i] > 0) begin
          checks++;
          if (t - last_set[i] != longint'(duty[i])) begin
            failures++; $display("ch%0d width %0d, expected %0d", i, t - last_set[i], duty[i]);
          end
        end
        last_rst[i] = t;
        n_rst[i]++;
      end
    end
    // ADC flag: one rising edge per period, at a fixed place after the master set
    if (adc_flag && !adc_d) begin
      adc_rises++;
      if (checking && (longint'(period) % 8 == 0) && n_set[0] > 0) begin
        checks++;
        if (adc_off >= 0 && (8 * n - last_set[0]) != adc_off) begin
          failures++; $display("ADC point moved: %0d vs %0d", 8 * n - last_set[0], adc_off);
        end
        adc_off = 8 * n - last_set[0];
      end
    end
    adc_d = adc_flag;
  end

  task automatic settle_and_check(input int periods);
    // let a command change take effect, then check for the given number of periods
    checking = 1'b0;
    repeat (8 * (int'(period) / 8 + 1)) @(posedge clk);
    for (int i = 0; i < N; i++) begin n_set[i] = 0; n_rst[i] = 0; end
    adc_off = -1;
    checking = 1'b1;
    repeat (periods * (int'(period) / 8 + 1)) @(posedge clk);
    checking = 1'b0;
  endtask

  initial begin
    period = cmd_t'(2521);               // 315.125 cycles
    duty = {N{cmd_t'(1148)}};            // 143.5 cycles
    sync = '0;
    sync[1] = cmd_t'(12);                // 1.5 cycles: the opposite switch
    sync[2] = cmd_t'(2521 >> 1);         // in phase with the master
    sync[3] = cmd_t'(0);
    force_off = '0;
    adc_time = ADC_W'(100);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    settle_and_check(12);
    checks++;
    if (adc_rises < 10) begin failures++; $display("ADC flag rose only %0d times", adc_rises); end

    // 260.125 cycles: counter runs alternate in length, pulses stay exact
    period = cmd_t'(2081);
    duty = {cmd_t'(600), cmd_t'(1041), cmd_t'(801), cmd_t'(400)};
    sync[1] = cmd_t'(1000); sync[2] = cmd_t'(77); sync[3] = cmd_t'(2000);
    settle_and_check(16);

    // a sync command above the period is cut to the period
    sync[3] = cmd_t'(4000);
    settle_and_check(4);
    sync[3] = cmd_t'(2081);

    // duty 0, duty >= period and FORCE_OFF
    duty[0] = '0;
    duty[1] = cmd_t'(3000);
    force_off[2] = 1'b1;
    checking = 1'b0;
    repeat (3 * 261) @(posedge clk);
    for (int i = 0; i < N; i++) begin n_set[i] = 0; n_rst[i] = 0; end
    repeat (8 * 261) @(posedge clk);
    checks++; if (n_set[0] != 0) begin failures++; $display("zero duty still sets"); end
    checks++; if (n_rst[1] != 0) begin failures++; $display("full duty still resets"); end
    checks++; if (n_set[1] < 7) begin failures++; $display("full duty lost its sets"); end
    checks++; if (n_set[2] != 0) begin failures++; $display("FORCE_OFF did not stop the sets"); end
    checks++; if (n_rst[2] < 7) begin failures++; $display("FORCE_OFF stopped the resets"); end
    checks++; if (n_set[3] < 7 || n_rst[3] < 7) begin failures++; $display("channel 3 stopped"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
