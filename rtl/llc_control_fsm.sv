`timescale 1ns/1ps
// llc_control_fsm: the LLC control law as a state machine on the 100 MHz
// controller clock, producing the DPWM command words once per conversion.
//
// Sequence (one pass per `adc_ready` pulse, idle in S_IDLE otherwise):
//   1. Output voltage, reference and current samples are low-pass filtered
//      (first order, y += (x - y) >> FILT_SHIFT).
//   2. Over-current (sample above I_LIMIT or the `oc_in` comparator): the
//      loops are bypassed and the switching frequency is set to the maximum.
//   3. Voltage error -> PI -> limit gives the current reference.
//   4. Current error -> PI -> limit gives the switching period.
//   5. Over-frequency (the period asks for less than P_MIN): the next pulses
//      are skipped (FORCE_OFF on every channel until the next pass) and the
//      period is set to P_MIN (maximum frequency).
//   6. The ADC sampling point, the primary duties (half a period less a dead
//      time) and the primary synchronization (exactly half a period) follow.
//   7. Secondary synchronization: the phase between the primary bridge
//      voltage and the rectifier current of the resonant tank,
//        phi = atan((K1 - K2*ts^2) / (K3*ts - K4*ts^3)),
//        K1 = 8 pi^3 Cr Lm Lr, K2 = 2 pi Lm, K3 = 4 pi^2 Cr Rac (Lm+Lr), K4 = Rac,
//      is evaluated in single-precision floating point with one shared
//      multiplier, subtracter, reciprocal estimator and converter, and the
//      arctangent by a 16-segment piecewise-linear table. The period enters
//      as the command p itself (ts = p*T): T and the Q12 scale of the
//      arctangent argument are folded into the constants KN0..KD3, p^2 is
//      formed exactly in integer, and the denominator is p*(KD1 - KD3*p^2),
//      so the chain is p, p^2 -> two products -> two differences -> one
//      product -> reciprocal -> quotient -> fixed point. The secondary
//      channels are centred phi/(2*pi) of a period after their primary
//      channel; their duty is limited to the resonant half period.
//   8. All commands are copied to the outputs together and `control_done`
//      pulses for one cycle.
// Timing: `control_done` rises 44 clock cycles (440 ns at 100 MHz) after the
// cycle in which `adc_ready` is seen: 15 steps for the filters, loops and
// primary commands, 28 for the secondary synchronization (most of them
// waits for the pipelined floating-point units, which are issued back to
// back where the data allow) and one to publish. The document's machine
// needs 47 steps (18 + 29); its state-by-state split is not given. With a
// 360 ns conversion the pass fits the 833 ns period at 1.2 MHz.
//
// Interface: ADC samples are unsigned ADC_BITS-bit numbers, valid while
// `adc_ready` pulses. Command outputs are dpwm_pkg fixed-point words (eighths
// of a 130 MHz cycle) and hold their value between passes; channels 0/1 are
// the primary half bridge, 2/3 the synchronous rectifier. `state` shows the
// current step.
//
// From the document: the order of the steps and the protections of its
// control flowchart, the 100 MHz step clock, Eq. (38) for the secondary
// phase with a piecewise-linear arctangent, the limits 375 kHz..1.2 MHz, the 750 kHz start and the use of the
// floating-point units. Not given by the document and chosen here: all
// gains, filter constants and widths, the dead time (14 cycles, read off
// the document's PWM example), the nominal-load AC resistance in K1..K4
// (17.1 ohm: 1.5 ohm through a 3.75:1 transformer), the over-current
// threshold and the ADC sampling lead.
module llc_control_fsm
  import dpwm_pkg::*;
  import fp_pkg::*;
#(
  parameter int unsigned ADC_BITS   = 12,
  parameter int unsigned FILT_SHIFT = 1,
  parameter int          KP_V       = 512,    // Q8 voltage-loop gains
  parameter int          KI_V       = 32,
  parameter int          KP_I       = 256,    // Q8 current-loop gains
  parameter int          KI_I       = 16,
  parameter int          IREF_MAX   = 4000,   // current-reference limit (ADC counts)
  parameter int          I_LIMIT    = 3900,   // over-current threshold (ADC counts)
  parameter int          P_MIN      = 867,    // 1.2 MHz: 108.33 cycles
  parameter int          P_MAX      = 2773,   // 375 kHz: 346.67 cycles
  parameter int          P_NOM      = 2080,   // 500 kHz: 260 cycles
  parameter int          P_START    = 1387,   // 750 kHz start
  parameter int          DEAD       = 112,    // dead time, 14 cycles
  parameter int          D_SEC_MAX  = 933,    // resonant half period less dead time
  parameter int          ADC_LEAD   = 40,     // sampling point, cycles before run end
  // Eq. (38) with ts = p*T (p: period command, T = 1/(8*130 MHz)):
  parameter logic [31:0] KN0        = 32'h2C08222D,  // 4096 * 8*pi^3*Cr*Lm*Lr
  parameter logic [31:0] KN2        = 32'h21029FF6,  // 4096 * 2*pi*Lm * T^2
  parameter logic [31:0] KD1        = 32'h211162E1,  // 4*pi^2*Cr*Rac*(Lm+Lr) * T
  parameter logic [31:0] KD3        = 32'h1496889E   // Rac * T^3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adc_ready,
  input  logic [ADC_BITS-1:0]      v_out,
  input  logic [ADC_BITS-1:0]      v_ref,
  input  logic [ADC_BITS-1:0]      i_pri,
  input  logic                     oc_in,
  output cmd_t                     period,
  output cmd_t       [3:0]         duty,
  output cmd_t       [3:0]         sync,
  output logic       [3:0]         force_off,
  output logic       [ADC_W-1:0]   adc_time,
  output logic                     control_done,
  output logic                     overcurrent_evt,
  output logic                     overfreq_evt,
  output logic       [5:0]         state
);

  typedef enum logic [5:0] {
    S_IDLE, S_FILT, S_OC, S_VERR, S_VPI, S_VOUT, S_VLIM,
    S_IERR, S_IPI, S_IOUT, S_ILIM, S_FREQ, S_ADC, S_DUTY, S_PSYNC,
    S_X_CONV, S_X_CONV2, S_X_P, S_X_KD, S_X_KN, S_X_DSUB, S_X_NSUB, S_X_DMUL,
    S_X_NUMR, S_X_RECIP, S_X_Q, S_X_QU, S_X_ATAN, S_X_OFF, S_X_SYNC,
    S_DONE
  } state_t;

  // arctan(x)/(2*pi) * 65536 at x = k/2, k = 0..16
  localparam int ATAN_T [17] = '{0, 4836, 8192, 10251, 11548, 12415, 13028, 13481,
                                 13829, 14103, 14325, 14508, 14661, 14792, 14904,
                                 15001, 15087};

  state_t st;
  logic [2:0] wait_n;

  // ---- shared floating-point units
  fp32_t mul_a, mul_b, mul_r, sub_a, sub_b, sub_r, rc_a, rc_r, cv_f, cv_fo;
  logic [31:0] cv_u, cv_uo;

  fp_mul     u_mul  (.clk(clk), .rst_n(rst_n), .op_a(mul_a), .op_b(mul_b), .result(mul_r));
  fp_sub     u_sub  (.clk(clk), .rst_n(rst_n), .op_a(sub_a), .op_b(sub_b), .result(sub_r));
  fp_recip   u_rcp  (.clk(clk), .rst_n(rst_n), .op_a(rc_a), .result(rc_r));
  fp_convert u_conv (.clk(clk), .rst_n(rst_n), .u_in(cv_u), .fp_in(cv_f),
                     .fp_out(cv_fo), .u_out(cv_uo));

  // ---- working registers
  logic [ADC_BITS-1:0] v_s, r_s, i_s;
  int   vf, rf, if_f, e, ef_v, ef_i, integ_v, integ_i, u, iref, per_w;
  logic oc, skip;
  fp32_t pf, p2f, num;
  logic  q_neg;
  int    turns, off;
  cmd_t  per_c, dprim_c, dsec_c, s2_c, s3_c;
  logic [ADC_W-1:0] adc_c;

  function automatic int sat(input int x, input int lo, input int hi);
    return (x < lo) ? lo : (x > hi) ? hi : x;
  endfunction

  // Q12 argument -> Q16 turns of arctan, piecewise linear
  function automatic int atan_turns(input logic [31:0] xq);
    int k, fr;
    if (xq >= 32'd32768) return ATAN_T[16];
    k  = int'(xq[14:11]);
    fr = int'(xq[10:0]);
    return ATAN_T[k] + (((ATAN_T[k+1] - ATAN_T[k]) * fr) >>> 11);
  endfunction

  function automatic cmd_t wrap_per(input int x, input int p);
    int y;
    y = x;
    if (y < 0)  y = y + p;
    if (y >= p) y = y - p;
    if (y < 0)  y = 0;
    return cmd_t'(y);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE;  wait_n <= '0;
      mul_a <= FP_ZERO; mul_b <= FP_ZERO; sub_a <= FP_ZERO; sub_b <= FP_ZERO;
      rc_a <= FP_ZERO; cv_f <= FP_ZERO; cv_u <= '0;
      v_s <= '0; r_s <= '0; i_s <= '0;
      vf <= 0; rf <= 0; if_f <= 0; e <= 0; ef_v <= 0; ef_i <= 0;
      integ_v <= 0; integ_i <= P_START - P_NOM; u <= 0; iref <= 0; per_w <= P_START;
      oc <= 1'b0; skip <= 1'b0;
      pf <= FP_ZERO; p2f <= FP_ZERO; num <= FP_ZERO; q_neg <= 1'b0;
      turns <= 0; off <= 0;
      per_c <= cmd_t'(P_START); dprim_c <= '0; dsec_c <= '0; s2_c <= '0; s3_c <= '0;
      adc_c <= '0;
      period <= cmd_t'(P_START);
      duty <= '0; sync <= '0; force_off <= '0;
      adc_time <= ADC_W'(P_START / 8 - ADC_LEAD);
      control_done <= 1'b0; overcurrent_evt <= 1'b0; overfreq_evt <= 1'b0;
    end else begin
      control_done    <= 1'b0;
      overcurrent_evt <= 1'b0;
      overfreq_evt    <= 1'b0;
      if (wait_n != '0) begin
        wait_n <= wait_n - 3'd1;
      end else begin
        unique case (st)
          // ---------------- loops and primary commands (18 steps)
          S_IDLE: if (adc_ready) begin
            v_s <= v_out; r_s <= v_ref; i_s <= i_pri; oc <= oc_in;
            st <= S_FILT;
          end
          S_FILT: begin
            vf   <= vf   + ((int'(v_s) - vf)   >>> FILT_SHIFT);
            rf   <= rf   + ((int'(r_s) - rf)   >>> FILT_SHIFT);
            if_f <= if_f + ((int'(i_s) - if_f) >>> FILT_SHIFT);
            oc   <= oc || (int'(i_s) > I_LIMIT);
            st   <= S_OC;
          end
          S_OC: begin
            skip <= 1'b0;
            if (oc) begin
              overcurrent_evt <= 1'b1;
              per_w <= P_MIN;
              st    <= S_FREQ;
            end else begin
              st <= S_VERR;
            end
          end
          S_VERR: begin
            e    <= rf - vf;
            st   <= S_VPI;
          end
          S_VPI: begin
            ef_v    <= ef_v + ((e - ef_v) >>> FILT_SHIFT);
            integ_v <= sat(integ_v + ((KI_V * e) >>> 8), 0, IREF_MAX);
            st      <= S_VOUT;
          end
          S_VOUT: begin
            u  <= integ_v + ((KP_V * ef_v) >>> 8);
            st <= S_VLIM;
          end
          S_VLIM: begin
            iref <= sat(u, 0, IREF_MAX);
            st   <= S_IERR;
          end
          S_IERR: begin
            e  <= iref - if_f;
            st <= S_IPI;
          end
          S_IPI: begin
            ef_i    <= ef_i + ((e - ef_i) >>> FILT_SHIFT);
            integ_i <= sat(integ_i + ((KI_I * e) >>> 8), P_MIN - P_NOM - 64, P_MAX - P_NOM);
            st      <= S_IOUT;
          end
          S_IOUT: begin
            u  <= P_NOM + integ_i + ((KP_I * ef_i) >>> 8);
            st <= S_ILIM;
          end
          S_ILIM: begin
            if (u < P_MIN) begin
              skip         <= 1'b1;
              overfreq_evt <= 1'b1;
              per_w        <= P_MIN;
            end else begin
              per_w <= sat(u, P_MIN, P_MAX);
            end
            st <= S_FREQ;
          end
          S_FREQ: begin
            per_c <= cmd_t'(per_w);
            st    <= S_ADC;
          end
          S_ADC: begin
            adc_c <= ADC_W'((int'(per_c) >>> FINE_W) - ADC_LEAD);
            st    <= S_DUTY;
          end
          S_DUTY: begin
            dprim_c <= cmd_t'((int'(per_c) >>> 1) - DEAD);
            st      <= S_PSYNC;
          end
          S_PSYNC: begin
            // the second primary channel runs half a period after the first
            dsec_c <= (dprim_c > cmd_t'(D_SEC_MAX)) ? cmd_t'(D_SEC_MAX) : dprim_c;
            st     <= S_X_CONV;
          end
          // ---------------- secondary synchronization (29 steps)
          S_X_CONV: begin                     // p to floating point
            cv_u <= 32'(per_c);
            st   <= S_X_CONV2;
          end
          S_X_CONV2: begin                    // p^2, exact in integer, to floating point
            cv_u <= 32'(per_c) * 32'(per_c);
            st   <= S_X_P;
          end
          S_X_P: begin
            pf <= cv_fo;
            st <= S_X_KD;
          end
          S_X_KD: begin                       // KD3*p^2
            p2f   <= cv_fo;
            mul_a <= fp32_t'(KD3);  mul_b <= cv_fo;
            st    <= S_X_KN;
          end
          S_X_KN: begin                       // KN2*p^2
            mul_a <= fp32_t'(KN2);  mul_b <= p2f;
            wait_n <= 3'd2;  st <= S_X_DSUB;
          end
          S_X_DSUB: begin                     // KD1 - KD3*p^2
            sub_a <= fp32_t'(KD1);  sub_b <= mul_r;
            st    <= S_X_NSUB;
          end
          S_X_NSUB: begin                     // numerator KN0 - KN2*p^2
            sub_a <= fp32_t'(KN0);  sub_b <= mul_r;
            wait_n <= 3'd4;  st <= S_X_DMUL;
          end
          S_X_DMUL: begin                     // denominator p*(KD1 - KD3*p^2)
            mul_a <= sub_r;  mul_b <= pf;
            st    <= S_X_NUMR;
          end
          S_X_NUMR: begin
            num <= sub_r;
            wait_n <= 3'd2;  st <= S_X_RECIP;
          end
          S_X_RECIP: begin                    // 1/den
            rc_a <= mul_r;
            wait_n <= 3'd1;  st <= S_X_Q;
          end
          S_X_Q: begin                        // 4096*num/den
            mul_a <= num;  mul_b <= rc_r;
            wait_n <= 3'd3;  st <= S_X_QU;
          end
          S_X_QU: begin                       // |q| to Q12 fixed point
            q_neg <= mul_r.sign;
            cv_f  <= mul_r;
            wait_n <= 3'd1;  st <= S_X_ATAN;
          end
          S_X_ATAN: begin
            turns <= atan_turns(cv_uo);
            st    <= S_X_OFF;
          end
          S_X_OFF: begin
            off <= (turns * int'(per_c)) >>> 16;
            st  <= S_X_SYNC;
          end
          S_X_SYNC: begin
            s2_c <= wrap_per((int'(per_c) >>> 1) - (q_neg ? -off : off), int'(per_c));
            s3_c <= wrap_per(-(q_neg ? -off : off), int'(per_c));
            st   <= S_DONE;
          end
          // ---------------- publish
          S_DONE: begin
            period    <= per_c;
            duty      <= {dsec_c, dsec_c, dprim_c, dprim_c};
            sync      <= {s3_c, s2_c, cmd_t'(0), cmd_t'(0)};
            force_off <= {4{skip}};
            adc_time  <= adc_c;
            control_done <= 1'b1;
            st <= S_IDLE;
          end
          default: st <= S_IDLE;
        endcase
      end
    end
  end

  assign state = 6'(st);

endmodule
