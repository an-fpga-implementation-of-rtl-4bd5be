`timescale 1ns/1ps
// dpwm: synchronous shifted-clock high-resolution PWM with N_CH channels.
//
// Main idea: a counter on CLK_0 (130 MHz) decides, in whole cycles, when
// each edge of each channel must occur, and a 3-bit select tells how many
// eighths of a cycle later. The eighths come from four copies of the clock
// shifted by 45 degrees: their rising and falling edges give eight evenly
// spaced instants per cycle (about 0.96 ns apart, an effective 1.04 GHz).
// Per channel there are two such paths, one for the set and one for the
// reset instant (pwm_phase_path), and an edge-triggered set-reset latch
// (pwm_sr_latch) forms the pulse. Period, duty and synchronization
// commands are 14-bit numbers of CLK_0 cycles with 3 fractional bits.
//
// Clock domains. Commands come from the controller's clock `clk_ctrl`. The
// controller holds them stable and pulses `control_done`; that pulse is
// brought into CLK_0 through two flip-flops and its rising edge loads all
// command registers at once, so a period, its duties and the phases always
// change together. The ADC trigger `adc_flag` is a CLK_0-domain level
// (high from the ADC point to the end of the carrier run); the receiver
// synchronizes it. `gate` are the latch outputs after the shoot-through
// guard, which (when `guard_en` is set) pairs channels 0/1, 2/3, ...
//
// The channel count default (4), the command widths, the command loading
// on control_done and the output structure follow the document; the
// two-flip-flop synchronizer on control_done, the edge detection and the
// channel pairing of the guard are this design's choices. The counter's
// master_mid output is left open on purpose: it serves only for
// observing the counter on its own.
module dpwm
  import dpwm_pkg::*;
#(
  parameter int unsigned N_CH = 4
) (
  input  logic                    rst_n,
  input  logic                    clk_ctrl,
  input  logic                    clk_0,
  input  logic                    clk_45,
  input  logic                    clk_90,
  input  logic                    clk_135,
  // commands (clk_ctrl domain, stable while control_done pulses)
  input  logic                    control_done,
  input  cmd_t                    period_in,
  input  cmd_t  [N_CH-1:0]        duty_in,
  input  cmd_t  [N_CH-1:0]        sync_in,     // entry 0 unused
  input  logic  [N_CH-1:0]        force_off_in,
  input  logic  [ADC_W-1:0]       adc_time_in,
  input  logic                    guard_en,
  // outputs
  output logic  [N_CH-1:0]        gate,
  output logic                    adc_flag
);

  // ---- control_done into CLK_0, rising edge loads the command registers
  logic done_ctrl;
  logic [2:0] done_sync;
  always_ff @(posedge clk_ctrl or negedge rst_n)
    if (!rst_n) done_ctrl <= 1'b0;
    else        done_ctrl <= control_done;

  always_ff @(posedge clk_0 or negedge rst_n)
    if (!rst_n) done_sync <= '0;
    else        done_sync <= {done_sync[1:0], done_ctrl};

  logic load;
  assign load = done_sync[1] && !done_sync[2];

  cmd_t              per_r;
  cmd_t [N_CH-1:0]   duty_r, sync_r;
  logic [N_CH-1:0]   force_r;
  logic [ADC_W-1:0]  adc_r;

  always_ff @(posedge clk_0 or negedge rst_n) begin
    if (!rst_n) begin
      per_r   <= RST_PERIOD;
      duty_r  <= {N_CH{RST_DUTY}};
      sync_r  <= {N_CH{RST_SYNC}};
      force_r <= '0;
      adc_r   <= RST_ADC;
    end else if (load) begin
      per_r   <= period_in;
      duty_r  <= duty_in;
      sync_r  <= sync_in;
      force_r <= force_off_in;
      adc_r   <= adc_time_in;
    end
  end

  // ---- coarse counter
  logic [N_CH-1:0]              setd, clrd;
  logic [N_CH-1:0][FINE_W-1:0]  sel_set, sel_rst;

  pwm_counter #(.N_CH(N_CH)) u_counter (
    .clk        (clk_0),
    .rst_n      (rst_n),
    .period     (per_r),
    .duty       (duty_r),
    .sync       (sync_r),
    .force_off  (force_r),
    .adc_time   (adc_r),
    .setd       (setd),
    .clrd       (clrd),
    .sel_set    (sel_set),
    .sel_rst    (sel_rst),
    .adc_flag   (adc_flag),
    .master_mid ()
  );

  // ---- fine paths and output latches
  logic [N_CH-1:0] s_edge, r_edge, q;

  for (genvar i = 0; i < N_CH; i++) begin : g_out
    pwm_phase_path u_set (
      .rst_n (rst_n), .clk_0(clk_0), .clk_45(clk_45), .clk_90(clk_90), .clk_135(clk_135),
      .pulse (setd[i]), .sel(sel_set[i]), .out(s_edge[i])
    );
    pwm_phase_path u_rst (
      .rst_n (rst_n), .clk_0(clk_0), .clk_45(clk_45), .clk_90(clk_90), .clk_135(clk_135),
      .pulse (clrd[i]), .sel(sel_rst[i]), .out(r_edge[i])
    );
    pwm_sr_latch u_latch (.rst_n(rst_n), .s(s_edge[i]), .r(r_edge[i]), .q(q[i]));
  end

  // ---- shoot-through guard on channel pairs
  for (genvar p = 0; p < N_CH / 2; p++) begin : g_guard
    shoot_through_guard u_guard (
      .en(guard_en), .a(q[2*p]), .b(q[2*p+1]), .a_out(gate[2*p]), .b_out(gate[2*p+1])
    );
  end
  if (N_CH % 2 == 1) begin : g_odd
    assign gate[N_CH-1] = q[N_CH-1];
  end

endmodule
