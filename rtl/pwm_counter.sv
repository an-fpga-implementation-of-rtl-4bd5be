`timescale 1ns/1ps
// pwm_counter: the coarse counter of the DPWM, clocked by CLK_0.
//
// It registers and limits the commands, runs one pwm_carrier per channel
// and derives the ADC trigger. Channel 0 is the master: its middle points
// define the carrier, and every other channel is kept at the position given
// by its synchronization command when the master passes its middle point.
// All channels share the period command; each has its own duty, sync and
// FORCE_OFF.
//
// Command limiting (as in the document): a duty at or above the period
// gives a constantly high output, a zero duty a constantly low one, and a
// sync command above the period is cut to the period. This design adds two
// limits of its own: the period is at least MIN_PERIOD (4 cycles) and a
// duty below 100 % leaves at least MIN_OFF (3 cycles) of off time.
//
// ADC synchronization uses the coarse bits only, as in the document:
// `adc_flag` is high from the master count `adc_time` to the end of the
// counter run, so its rising edge marks the sampling point. The ADC point
// is taken over in the first cycle of each master run (this design's
// choice), so the flag rises exactly once per run even when a new command
// arrives between the sampling point and the end of the run.
//
// Timing: commands are registered once here; a period or duty change takes
// effect at the next middle point. SETD/CLRD and their selects leave on the
// CLK_0 edge after the coarse cycle of the instant.
module pwm_counter
  import dpwm_pkg::*;
#(
  parameter int unsigned N_CH = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  cmd_t                          period,
  input  cmd_t        [N_CH-1:0]        duty,
  input  cmd_t        [N_CH-1:0]        sync,      // entry 0 unused
  input  logic        [N_CH-1:0]        force_off,
  input  logic        [ADC_W-1:0]       adc_time,
  output logic        [N_CH-1:0]        setd,
  output logic        [N_CH-1:0]        clrd,
  output logic        [N_CH-1:0][FINE_W-1:0] sel_set,
  output logic        [N_CH-1:0][FINE_W-1:0] sel_rst,
  output logic                          adc_flag,
  output logic                          master_mid
);

  cmd_t              per_q;
  cmd_t [N_CH-1:0]   duty_q, sync_q;
  logic [N_CH-1:0]   full_q, zero_q, force_q;
  logic [ADC_W-1:0]  adc_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      per_q   <= RST_PERIOD;
      duty_q  <= {N_CH{RST_DUTY}};
      sync_q  <= {N_CH{RST_SYNC}};
      full_q  <= '0;
      zero_q  <= '0;
      force_q <= '0;
      adc_q   <= RST_ADC;
    end else begin
      per_q   <= (period < cmd_t'(MIN_PERIOD)) ? cmd_t'(MIN_PERIOD) : period;
      force_q <= force_off;
      adc_q   <= adc_time;
      for (int i = 0; i < N_CH; i++) begin
        full_q[i] <= (duty[i] >= period);
        zero_q[i] <= (duty[i] == '0);
        if (duty[i] + cmd_t'(MIN_OFF) > period || duty[i] >= period)
          duty_q[i] <= (period > cmd_t'(MIN_OFF)) ? period - cmd_t'(MIN_OFF) : '0;
        else
          duty_q[i] <= duty[i];
        sync_q[i] <= (sync[i] > period) ? period : sync[i];
      end
    end
  end

  logic [N_CH-1:0]              mid_evt;
  logic [N_CH-1:0][FINE_W-1:0]  mid_fine;
  logic [N_CH-1:0][CNT_W-1:0]   count;

  for (genvar i = 0; i < N_CH; i++) begin : g_ch
    pwm_carrier #(.SYNC_EN(i != 0)) u_carrier (
      .clk         (clk),
      .rst_n       (rst_n),
      .period      (per_q),
      .duty        (duty_q[i]),
      .duty_full   (full_q[i]),
      .duty_zero   (zero_q[i]),
      .force_off   (force_q[i]),
      .sync        (sync_q[i]),
      .master_mid  (mid_evt[0]),
      .master_fine (mid_fine[0]),
      .setd        (setd[i]),
      .clrd        (clrd[i]),
      .sel_set     (sel_set[i]),
      .sel_rst     (sel_rst[i]),
      .mid_evt     (mid_evt[i]),
      .mid_fine    (mid_fine[i]),
      .count       (count[i])
    );
  end

  // the ADC point is taken over at the start of each master run, so a
  // command load never makes the flag rise twice in one run
  logic [ADC_W-1:0] adc_run;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      adc_run  <= RST_ADC;
      adc_flag <= 1'b0;
    end else begin
      if (count[0] == '0) adc_run <= adc_q;
      adc_flag <= (count[0] >= CNT_W'(adc_run)) && (count[0] != '0);
    end
  end

  assign master_mid = mid_evt[0];

endmodule
