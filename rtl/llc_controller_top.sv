`timescale 1ns/1ps
// llc_controller_top: FPGA controller of a half-bridge LLC resonant
// converter with synchronous rectification.
//
// Structure. A PLL makes four 130 MHz clocks 45 degrees apart from the
// 100 MHz controller clock. The high-resolution DPWM (dpwm) drives four
// gates: channels 0/1 are the primary half bridge, 2/3 the synchronous
// rectifier. When the DPWM's master carrier passes the programmed sampling
// point, its ADC flag is synchronized into the controller clock and its
// rising edge becomes `adc_start`, a one-cycle request to the external
// converters. When they answer with `adc_ready` and the samples, the
// control-law state machine (llc_control_fsm) computes new commands and
// pulses `control_done`, which makes the DPWM load them all at once. This
// closes the loop once per switching period.
//
// Interface: `clk` is the 100 MHz controller clock, `rst_n` an asynchronous
// active-low reset. The DPWM leaves reset two CLK_0 cycles after PLL lock.
// ADC data and `adc_ready` are in the `clk` domain; `oc_in` is an
// over-current comparator level sampled with the data. `gate` are the four
// switch drive signals before the gate drivers; `guard_en` enables the
// shoot-through guard inside each half bridge. `state`, `overcurrent_evt`
// and `overfreq_evt` show the controller's progress and protections.
//
// From the document: the partitioning into PLL, DPWM and control state
// machine, the ADC synchronization from the PWM counter and the command
// loading on control_done. This design's choices: the two-flip-flop
// synchronizer and edge detector for the ADC flag, the reset synchronizer
// that holds the DPWM in reset until two CLK_0 edges after lock, and the
// plain-signal ADC interface.
// Lint note: `lock_sync` is a reset synchronizer, cleared asynchronously
// by rst_n and released synchronously by CLK_0; the lint remark that it is
// flopped both ways describes exactly that and is intended.
module llc_controller_top
  import dpwm_pkg::*;
#(
  parameter int unsigned ADC_BITS = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // external ADCs
  output logic                 adc_start,
  input  logic                 adc_ready,
  input  logic [ADC_BITS-1:0]  v_out,
  input  logic [ADC_BITS-1:0]  v_ref,
  input  logic [ADC_BITS-1:0]  i_pri,
  input  logic                 oc_in,
  // gate drive
  input  logic                 guard_en,
  output logic [3:0]           gate,
  // status
  output logic                 pll_lock,
  output logic [5:0]           state,
  output logic                 overcurrent_evt,
  output logic                 overfreq_evt
);

  logic clk_0, clk_45, clk_90, clk_135;

  pll_4phase_model u_pll (
    .CLKI(clk), .RST(!rst_n), .CLKOP(clk_0), .CLKOS(clk_45), .CLKOS2(clk_90),
    .CLKOS3(clk_135), .LOCK(pll_lock)
  );

  // DPWM reset: asserted with rst_n, released two CLK_0 edges after lock,
  // so the DPWM registers see clock edges while their reset is active
  logic [1:0] lock_sync;
  logic       dpwm_rst_n;
  always_ff @(posedge clk_0 or negedge rst_n) begin
    if (!rst_n) lock_sync <= '0;
    else        lock_sync <= {lock_sync[0], pll_lock};
  end
  assign dpwm_rst_n = lock_sync[1];

  cmd_t             period;
  cmd_t [3:0]       duty, sync;
  logic [3:0]       force_off;
  logic [ADC_W-1:0] adc_time;
  logic             control_done, adc_flag;

  llc_control_fsm #(.ADC_BITS(ADC_BITS)) u_ctrl (
    .clk            (clk),
    .rst_n          (rst_n),
    .adc_ready      (adc_ready),
    .v_out          (v_out),
    .v_ref          (v_ref),
    .i_pri          (i_pri),
    .oc_in          (oc_in),
    .period         (period),
    .duty           (duty),
    .sync           (sync),
    .force_off      (force_off),
    .adc_time       (adc_time),
    .control_done   (control_done),
    .overcurrent_evt(overcurrent_evt),
    .overfreq_evt   (overfreq_evt),
    .state          (state)
  );

  dpwm #(.N_CH(4)) u_dpwm (
    .rst_n        (dpwm_rst_n),
    .clk_ctrl     (clk),
    .clk_0        (clk_0),
    .clk_45       (clk_45),
    .clk_90       (clk_90),
    .clk_135      (clk_135),
    .control_done (control_done),
    .period_in    (period),
    .duty_in      (duty),
    .sync_in      (sync),
    .force_off_in (force_off),
    .adc_time_in  (adc_time),
    .guard_en     (guard_en),
    .gate         (gate),
    .adc_flag     (adc_flag)
  );

  // ---- ADC flag into the controller clock; its rising edge starts a conversion
  logic [2:0] flag_sync;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) flag_sync <= '0;
    else        flag_sync <= {flag_sync[1:0], adc_flag};
  end
  assign adc_start = flag_sync[1] && !flag_sync[2];

endmodule
