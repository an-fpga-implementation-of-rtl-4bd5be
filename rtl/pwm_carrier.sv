`timescale 1ns/1ps
// pwm_carrier: the coarse counter of one DPWM channel, with high-resolution
// middle-point tracking.
//
// How it works. The channel's carrier is an up-counter `cnt` on CLK_0 that
// restarts at the valley between two PWM pulses. Each counter run holds one
// pulse centred on a high-resolution middle point `m` (in eighths of a
// cycle, counted from the start of the run). When the counter reaches the
// coarse part of `m` the next middle point is computed: the period is
// added, the run length L is chosen as the CLK_0 edge at or before the
// half-way point between the two middle points, and 8*L is subtracted to
// express the next middle point in the next run's frame. A period that is
// not a whole number of cycles thus gives runs of alternating lengths,
// while the middle points stay exactly one period apart.
//   The set instant is m - duty/2 and the reset instant set + duty. Each
// instant p is issued as a one-cycle pulse (SETD or CLRD) in coarse cycle
// (p-1)/8, together with a 3-bit select for the output stage, which adds
// 8 - sel eighths of a cycle (sel = 0: a whole cycle).
//
// Synchronization (SYNC_EN = 1, every channel but the master). At each
// middle point of the master channel the channel measures its own position,
// defined as the time since its own middle point plus half a period, and
// compares it with the sync command S. The difference, wrapped into half a
// period either way, shortens (or lengthens) the channel's next period so
// that the channel is at position S when the master is at its middle point.
// A large step is spread over several periods so that every period keeps
// the duty plus a minimum off time.
//
// Interface. `period` must be at least MIN_PERIOD and `duty` at most
// period - MIN_OFF (pwm_counter clamps both). `duty_full` suppresses
// resets (100 %), `duty_zero` and `force_off` suppress sets. The duty is
// sampled at the middle point and used from the next run on; the period is
// sampled at the middle point as well. Outputs are registered.
//
// The middle-point arithmetic follows the document. The measurement-based
// synchronization, its wrapping and the spreading of large steps are this
// design's own way to give the document's synchronization command its
// meaning.
module pwm_carrier
  import dpwm_pkg::*;
#(
  parameter bit SYNC_EN = 1'b0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  cmd_t               period,
  input  cmd_t               duty,
  input  logic               duty_full,
  input  logic               duty_zero,
  input  logic               force_off,
  input  cmd_t               sync,
  input  logic               master_mid,   // master middle point reached this cycle
  input  logic [FINE_W-1:0]  master_fine,  // fine part of the master middle point
  output logic               setd,
  output logic               clrd,
  output logic [FINE_W-1:0]  sel_set,
  output logic [FINE_W-1:0]  sel_rst,
  output logic               mid_evt,      // this channel's middle point (combinational)
  output logic [FINE_W-1:0]  mid_fine,
  output logic [CNT_W-1:0]   count
);

  localparam int unsigned EW = POS_W + 2;  // signed width for phase errors

  logic [CNT_W-1:0] cnt, run_len;
  logic             mid_done;
  logic [POS_W-1:0] m, m_nxt_q;
  cmd_t             d_cur, d_nxt;
  logic             full_cur, full_nxt, zero_cur, zero_nxt;
  logic signed [EW-1:0] e_pend, e_applied;

  // ---- pulse instants of the current run
  logic [POS_W-1:0] set_p, rst_p;
  logic [CNT_W-1:0] c_set, c_rst;
  always_comb begin
    set_p = m - POS_W'(d_cur >> 1);
    rst_p = set_p + POS_W'(d_cur);
    c_set = edge_cycle(set_p);
    c_rst = edge_cycle(rst_p);
  end

  // ---- middle point: next middle point and run length
  logic                 wrap;
  logic signed [EW-1:0] e_use, fe_raw, fe_lo, fe;
  logic [POS_W-1:0]     half_sum, m_nxt;
  logic [CNT_W-1:0]     len_nxt;
  cmd_t                 d_max;

  always_comb begin
    mid_evt  = !mid_done && (cnt == m[POS_W-1:FINE_W]);
    mid_fine = m[FINE_W-1:0];
    wrap     = mid_done && (cnt == run_len - CNT_W'(1));

    e_use  = SYNC_EN ? e_pend : '0;
    fe_raw = $signed(EW'(period)) - e_use;
    d_max  = (d_cur > duty) ? d_cur : duty;
    fe_lo  = $signed(EW'(d_max) + EW'(MIN_OFF));
    if (fe_lo < $signed(EW'(MIN_PERIOD))) fe_lo = $signed(EW'(MIN_PERIOD));
    fe = (fe_raw < fe_lo) ? fe_lo : fe_raw;

    half_sum = m + POS_W'(fe >>> 1);
    len_nxt  = half_sum[POS_W-1:FINE_W];
    m_nxt    = m + POS_W'(fe) - {len_nxt, {FINE_W{1'b0}}};
  end

  // ---- phase measurement against the master middle point
  logic signed [EW-1:0] pos, e_meas, per_s, half_s;
  always_comb begin
    per_s  = $signed(EW'(period));
    half_s = $signed(EW'(period >> 1));
    pos    = $signed(EW'({cnt, master_fine})) - $signed(EW'(m)) + half_s;
    e_meas = $signed(EW'(sync)) - pos;
    // a correction already decided in this run shifts the channel later on
    if (mid_evt)       e_meas = e_meas - (per_s - fe);
    else if (mid_done) e_meas = e_meas - e_applied;
    for (int k = 0; k < 2; k++) begin
      if (e_meas >= half_s)       e_meas = e_meas - per_s;
      else if (e_meas < -half_s)  e_meas = e_meas + per_s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      run_len   <= '1;
      mid_done  <= 1'b0;
      m         <= POS_W'(RST_PERIOD >> 1);
      m_nxt_q   <= '0;
      d_cur     <= RST_DUTY;
      d_nxt     <= RST_DUTY;
      full_cur  <= 1'b0;
      full_nxt  <= 1'b0;
      zero_cur  <= 1'b0;
      zero_nxt  <= 1'b0;
      e_pend    <= '0;
      e_applied <= '0;
      setd      <= 1'b0;
      clrd      <= 1'b0;
      sel_set   <= '0;
      sel_rst   <= '0;
    end else begin
      // counter
      if (wrap) begin
        cnt       <= '0;
        mid_done  <= 1'b0;
        m         <= m_nxt_q;
        d_cur     <= d_nxt;
        full_cur  <= full_nxt;
        zero_cur  <= zero_nxt;
        e_applied <= '0;
      end else begin
        cnt <= cnt + CNT_W'(1);
      end

      if (mid_evt) begin
        mid_done  <= 1'b1;
        run_len   <= len_nxt;
        m_nxt_q   <= m_nxt;
        d_nxt     <= duty;
        full_nxt  <= duty_full;
        zero_nxt  <= duty_zero;
        e_applied <= $signed(EW'(period)) - fe;
      end

      if (SYNC_EN && master_mid) e_pend <= e_meas;
      else if (mid_evt)          e_pend <= '0;

      // set / reset pulses with their phase selects
      setd <= 1'b0;
      clrd <= 1'b0;
      if (cnt == c_set) begin
        setd    <= !zero_cur && !force_off;
        sel_set <= edge_sel(set_p);
      end
      if (cnt == c_rst) begin
        clrd    <= !full_cur;
        sel_rst <= edge_sel(rst_p);
      end
    end
  end

  assign count = cnt;

endmodule
