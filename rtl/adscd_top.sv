`timescale 1ns / 1ps
// adscd_top: all-digital sample clock dither for OFDM timing recovery.
//
// Instead of interpolating samples taken with a free-running clock, the
// receiver moves the A/D sampling instant itself: a multiphase clock
// generator (ADCM, 32 phases of the sample clock made from a 2x clock with
// a four-phase divider and two interpolating tri-state banks, no PLL/DLL)
// clocks the A/D converters, and a phase-adjustment mechanism chooses the
// phase:
//   timing_detector  TD = windowed energy of the cross-correlation with the
//                    known short preamble; largest near coherent sampling.
//   acquisition      TD registers, Max/Second sorter and the triangulating
//                    address interpolator.
//   phase_ctrl       address decision: coarse search at 0/120/240 degrees,
//                    fine search at the midpoint i_c, final address
//                    i_c +/- offset, then pilot-driven one-phase steps.
//   pilot_tracking   per-symbol pilot TD against the first symbol's value.
//
// Interface: the baseband logic runs on clk_1x, the 0-degree output of the
// clock generator (the 2x clock divided by two). The A/D converters are
// outside; they sample on adc_clk and deliver I/Q in the clk_1x domain
// (adc_valid/adc_i/adc_q). pkt_det (from a packet detector, also outside)
// starts the acquisition and clears the tracking reference. The OFDM
// receiver (S/P, FFT, pilot extractor, cross correlator) is outside as well;
// it supplies one pilot TD value per pilot (pilot_valid/pilot_td).
// All ports other than clk2x and adc_clk are synchronous to clk_1x.
//
// Timing: acquisition ends SETTLE + 1 + L*SLOT + (window, result and
// decision cycles) + the interpolator's FRAC+3 cycles after pkt_det, 208
// cycles at the defaults; tracking can move the phase once per OFDM symbol.
//
// The four modules, the coarse phases 0/120/240 degrees, the midpoint fine
// search, the triangulation rule and the reference-based tracking follow the
// published scheme. The preamble length and chips, the slot spacing of the
// detections, the circular midpoint, the ratio clamp and the 32-bit TD width
// are this design's choices. The busy flags of the detector and the
// interpolator and the tracking reference/difference outputs are left
// unconnected here on purpose: the controller sequences both units by their
// valid/done pulses.
module adscd_top
  import adscd_pkg::*;
#(
  parameter int unsigned M      = M_PHASES,
  parameter int unsigned L      = L_SECTIONS,
  parameter int unsigned N      = N_PRE,
  parameter int unsigned W      = ADC_W,
  parameter int unsigned NP     = N_PILOTS,
  parameter int unsigned FRAC   = FRAC_W,
  parameter int unsigned SETTLE = N_PRE + 4,
  parameter int unsigned SLOT   = 3 * N_PRE,
  parameter logic [N-1:0] COEF  = 16'h1D2B
) (
  input  logic                  clk2x,
  input  logic                  rst_n,
  output logic                  clk_1x,
  output logic                  adc_clk,
  // A/D samples (clk_1x domain)
  input  logic                  adc_valid,
  input  logic signed [W-1:0]   adc_i,
  input  logic signed [W-1:0]   adc_q,
  // packet detector
  input  logic                  pkt_det,
  // pilot TD values from the cross correlator
  input  logic                  pilot_valid,
  input  logic [td_width(N, W, td_window(N))-1:0] pilot_td,
  // status
  output logic [$clog2(M)-1:0]  phase_addr,
  output logic                  offset_dir,
  output logic [$clog2(M)-1:0]  i_max,
  output logic [$clog2(M)-1:0]  i_second,
  output logic [$clog2(M)-1:0]  i_c,
  output ctrl_state_e           state,
  output logic                  acq_done,
  output logic                  td_valid,
  output logic [td_width(N, W, td_window(N))-1:0] td,
  output logic [FRAC+1:0]       interp_ratio,
  output logic [$clog2(M)-1:0]  interp_offset,
  output logic                  trk_valid,
  output logic                  trk_adjust,
  output logic                  trk_step
);

  localparam int unsigned WIN = td_window(N);
  localparam int unsigned TDW = td_width(N, W, WIN);

  logic                   clk;
  logic                   td_start, td_busy;
  logic                   td_we;
  logic [$clog2(L+1)-1:0] td_sel;
  logic [$clog2(L)-1:0]   max_idx, sec_idx;
  logic                   interp_start, interp_busy, interp_done;
  logic                   ref_valid;
  logic [TDW-1:0]         ref_td;
  logic signed [TDW:0]    trk_diff;

  assign clk_1x = clk;

  adcm #(.M(M)) u_adcm (
    .clk2x      (clk2x),
    .rst_n      (rst_n),
    .phase_addr (phase_addr),
    .clk_1x     (clk),
    .adc_clk    (adc_clk)
  );

  timing_detector #(.N(N), .W(W), .WIN(WIN), .TDW(TDW), .COEF(COEF)) u_td (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (adc_valid),
    .in_i     (adc_i),
    .in_q     (adc_q),
    .start    (td_start),
    .busy     (td_busy),
    .td_valid (td_valid),
    .td       (td)
  );

  acquisition #(.M(M), .L(L), .TDW(TDW), .FRAC(FRAC)) u_acq (
    .clk           (clk),
    .rst_n         (rst_n),
    .td_we         (td_we),
    .td_sel        (td_sel),
    .td_in         (td),
    .max_idx       (max_idx),
    .sec_idx       (sec_idx),
    .interp_start  (interp_start),
    .interp_busy   (interp_busy),
    .interp_done   (interp_done),
    .interp_offset (interp_offset),
    .interp_ratio  (interp_ratio)
  );

  phase_ctrl #(.M(M), .L(L), .N(N), .WIN(WIN), .SETTLE(SETTLE), .SLOT(SLOT)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .pkt_det       (pkt_det),
    .td_start      (td_start),
    .td_valid      (td_valid),
    .td_we         (td_we),
    .td_sel        (td_sel),
    .max_idx       (max_idx),
    .sec_idx       (sec_idx),
    .interp_start  (interp_start),
    .interp_done   (interp_done),
    .interp_offset (interp_offset),
    .trk_valid     (trk_valid),
    .trk_adjust    (trk_adjust),
    .phase_addr    (phase_addr),
    .offset_dir    (offset_dir),
    .i_max         (i_max),
    .i_second      (i_second),
    .i_c           (i_c),
    .state         (state),
    .acq_done      (acq_done),
    .trk_step      (trk_step)
  );

  pilot_tracking #(.NP(NP), .PW(TDW)) u_trk (
    .clk         (clk),
    .rst_n       (rst_n),
    .ref_clear   (pkt_det),
    .pilot_valid (pilot_valid),
    .pilot_td    (pilot_td),
    .ref_valid   (ref_valid),
    .ref_td      (ref_td),
    .trk_valid   (trk_valid),
    .trk_adjust  (trk_adjust),
    .trk_diff    (trk_diff)
  );

endmodule
