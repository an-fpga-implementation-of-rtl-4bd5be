`timescale 1ns/1ps
// dpwm_pkg: widths, reset values and helper functions shared by the
// high-resolution DPWM.
//
// All timing commands are 14-bit fixed-point numbers counted in periods of
// the 130 MHz PWM clock CLK_0: the upper 11 bits are whole (coarse) clock
// periods, the lower 3 bits are eighths of a period (one high-resolution
// step of about 0.96 ns, the spacing of the eight edges of four clocks that
// are 45 degrees apart). A period command of 315.125 cycles is thus
// 14'(315*8 + 1).
//
// The 14-bit command width, the 11 coarse / 3 fine split and the 11-bit
// coarse ADC timing word follow the document. The reset values (a period of
// 650 cycles, a duty of 291 cycles, a channel synchronization of 649 cycles
// and an ADC point at count 377) are those the document's controller loads
// at reset.
package dpwm_pkg;

  localparam int unsigned CMD_W    = 14;              // period / duty / sync command width
  localparam int unsigned FINE_W   = 3;               // high-resolution bits
  localparam int unsigned COARSE_W = CMD_W - FINE_W;  // 11 coarse bits
  localparam int unsigned ADC_W    = 11;              // ADC sync point, coarse only
  localparam int unsigned CNT_W    = 12;              // internal run counter (one spare bit)
  localparam int unsigned POS_W    = CNT_W + FINE_W;  // high-resolution position in a run

  typedef logic [CMD_W-1:0] cmd_t;

  localparam cmd_t                RST_PERIOD = cmd_t'(650 * 8);
  localparam cmd_t                RST_DUTY   = cmd_t'(291 * 8);
  localparam cmd_t                RST_SYNC   = cmd_t'(649 * 8);
  localparam logic [ADC_W-1:0]    RST_ADC    = ADC_W'(377);

  // Smallest period the counter accepts (4 CLK_0 cycles) and the least off
  // time it keeps inside a period when the duty is not 100 % (3 cycles).
  localparam int unsigned MIN_PERIOD = 32;
  localparam int unsigned MIN_OFF    = 24;

  // A high-resolution instant p >= 1 (in eighths of CLK_0, counted from the
  // start of a counter run) is issued as a pulse in coarse cycle (p-1)/8
  // together with a phase select; the output stage then delays the pulse by
  // 8 - sel steps (sel = 0 means a full 8 steps).
  function automatic logic [CNT_W-1:0] edge_cycle(input logic [POS_W-1:0] p);
    logic [POS_W-1:0] pm1;
    pm1 = p - POS_W'(1);
    return pm1[POS_W-1:FINE_W];
  endfunction

  function automatic logic [FINE_W-1:0] edge_sel(input logic [POS_W-1:0] p);
    logic [FINE_W-1:0] neg;
    neg = FINE_W'(~p[FINE_W-1:0]) + FINE_W'(1);
    return neg;
  endfunction

  // Delay in high-resolution steps that the output stage applies for a
  // given select value.
  function automatic int unsigned sel_delay(input logic [FINE_W-1:0] sel);
    return (sel == '0) ? 8 : 8 - int'(sel);
  endfunction

endpackage
