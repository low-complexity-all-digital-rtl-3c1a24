`timescale 1ns / 1ps
// adscd_pkg: constants and types shared by the all-digital sample clock dither
// (ADSCD). The defaults are the main configuration: a 32-phase clock (M = 32,
// n = 5 control bits), three coarse sections (L = 3, 120 degrees each), 8-bit
// I/Q samples. The short preamble length (16 samples) and the pilot count
// (4 pilots per OFDM symbol) are this design's choice, taken from common
// 20 MHz OFDM WLAN framing.
package adscd_pkg;

  localparam int unsigned M_PHASES   = 32;  // ADCM phases per sample period
  localparam int unsigned L_SECTIONS = 3;   // coarse sections (120 degrees each)
  localparam int unsigned N_PRE      = 16;  // short preamble length in samples
  localparam int unsigned ADC_W      = 8;   // A/D resolution per rail
  localparam int unsigned N_PILOTS   = 4;   // pilots averaged per OFDM symbol
  localparam int unsigned FRAC_W     = 8;   // fraction bits of the distance ratio

  // Width of a signed correlation R(k): N_PRE products of an ADC_W-bit sample
  // with a +/-1 coefficient.
  function automatic int unsigned corr_width(int unsigned n, int unsigned w);
    return w + $clog2(n) + 1;
  endfunction

  // Width of TD = sum over win lags of |R|^2 = Re^2 + Im^2.
  function automatic int unsigned td_width(int unsigned n, int unsigned w, int unsigned win);
    return 2 * corr_width(n, w) + 1 + $clog2(win);
  endfunction

  // Number of lags in the TD window k = -N/3 .. 4N/3.
  function automatic int unsigned td_window(int unsigned n);
    return (n / 3) + (4 * n / 3) + 1;
  endfunction

  localparam int unsigned TD_WIN = td_window(N_PRE);
  localparam int unsigned TD_W   = td_width(N_PRE, ADC_W, TD_WIN);

  // Address decision states.
  typedef enum logic [2:0] {
    ST_IDLE,    // waiting for a detected packet
    ST_COARSE,  // sampling preambles at 0, M/L, 2M/L ... phases
    ST_SORT,    // loading i_max / i_second from the sorter
    ST_FINE,    // sampling one preamble at i_c
    ST_INTERP,  // triangulation running
    ST_TRACK    // data symbols: pilot-based tracking
  } ctrl_state_e;

endpackage
