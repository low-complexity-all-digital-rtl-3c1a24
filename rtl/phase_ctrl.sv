`timescale 1ns / 1ps
// phase_ctrl: phase controller (address decision, i_max / i_second registers,
// average, offset-direction sign and output multiplexer) of the sample clock
// dither. It produces the phase address of the multiphase A/D clock.
//
// Operation after a packet is detected (pkt_det):
//   coarse search  The A/D clock is set in turn to the section phases
//                  floor(s*M/L), s = 0..L-1 (0, 120, 240 degrees for L = 3).
//                  For each it starts one timing detection and writes the
//                  result into TD register s. The first detection starts
//                  SETTLE+1 cycles after pkt_det, the following ones exactly
//                  SLOT cycles apart (one slot per detection, aligned to the
//                  preamble period when SLOT is a multiple of it); the phase
//                  for the next detection is applied as soon as a result
//                  arrives, so the correlator refills at the new phase.
//   sort           The sorter's Max / Second sections load the i_max and
//                  i_second address registers. The average block gives the
//                  central phase i_c half way between them and the sign of
//                  (i_max - i_second) gives the offset direction.
//   fine search    The output multiplexer selects i_c; one more timing
//                  detection is taken and written into the i_c TD register.
//   interpolation  The address interpolator returns `offset`; the final
//                  address is i_c + sign(i_max - i_second) * offset.
//   tracking       For every pilot-tracking decision that reports a TD below
//                  the reference (trk_adjust) the address is moved one phase
//                  in the offset direction (address feedback + 1 step).
// So the acquisition uses L + 1 timing detections: four for L = 3.
//
// Phase addresses are circular modulo M (M a power of two): i_c and the sign
// use the shorter way round the circle, so i_max = 0 and i_second = 2M/3 give
// i_c = 5M/6. The settle time, the one-phase tracking step and the circular
// treatment are this implementation's choices. With the default SLOT = 3N
// (48 samples) the four detections take 4 slots after the settle time.
//
// Timing: td_start pulses SETTLE+1 cycles after pkt_det and then every SLOT
// cycles until the fine detection is done; acq_done
// pulses when the final address is applied. pkt_det restarts from any state.
module phase_ctrl
  import adscd_pkg::*;
#(
  parameter int unsigned M      = M_PHASES,
  parameter int unsigned L      = L_SECTIONS,
  parameter int unsigned N      = N_PRE,        // correlator length
  parameter int unsigned WIN    = TD_WIN,       // timing-detection window
  parameter int unsigned SETTLE = N_PRE + 4,    // cycles before the first detection
  parameter int unsigned SLOT   = 3 * N_PRE     // cycles between detection starts
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   pkt_det,
  // timing detector
  output logic                   td_start,
  input  logic                   td_valid,
  // acquisition registers, sorter and interpolator
  output logic                   td_we,
  output logic [$clog2(L+1)-1:0] td_sel,
  input  logic [$clog2(L)-1:0]   max_idx,
  input  logic [$clog2(L)-1:0]   sec_idx,
  output logic                   interp_start,
  input  logic                   interp_done,
  input  logic [$clog2(M)-1:0]   interp_offset,
  // pilot-based tracking
  input  logic                   trk_valid,
  input  logic                   trk_adjust,
  // to the ADCM and status
  output logic [$clog2(M)-1:0]   phase_addr,
  output logic                   offset_dir,   // 1: towards higher phases
  output logic [$clog2(M)-1:0]   i_max,
  output logic [$clog2(M)-1:0]   i_second,
  output logic [$clog2(M)-1:0]   i_c,
  output ctrl_state_e            state,
  output logic                   acq_done,
  output logic                   trk_step
);

  localparam int unsigned PAW = $clog2(M);
  localparam int unsigned SW  = $clog2(L + 1);
  localparam int unsigned CW  = $clog2(((SETTLE > SLOT) ? SETTLE : SLOT) + 1);

  // A phase change happens two cycles after a window ends, and its first
  // sample reaches the correlator about two cycles later; the correlator
  // must then refill with N-1 samples of the new phase before the next
  // window starts.
  if (SLOT < WIN + N + 2) begin : g_slot_check
    $error("phase_ctrl: SLOT must be at least WIN + N + 2");
  end

  function automatic logic [PAW-1:0] sect_addr(int unsigned s);
    return PAW'((s * M) / L);
  endfunction

  logic [PAW-1:0]  new_addr;   // "new phase addressing"
  logic            sel_ic;     // output MUX: 1 selects the average i_c
  logic [SW-1:0]   sect;
  logic [CW-1:0]   settle;
  logic            meas;
  logic [PAW-1:0]  lut_max, lut_sec;

  // Average and subtract-with-sign on the i_max / i_second registers.
  logic signed [PAW-1:0] cdiff;
  always_comb begin
    cdiff      = $signed(i_max - i_second);
    i_c        = i_second + PAW'(cdiff >>> 1);
    offset_dir = ~cdiff[PAW-1];
  end

  // Section index to phase address for the sorter pointers.
  always_comb begin
    lut_max = '0;
    lut_sec = '0;
    for (int s = 0; s < L; s++) begin
      if (max_idx == ($bits(max_idx))'(s)) lut_max = sect_addr(s);
      if (sec_idx == ($bits(sec_idx))'(s)) lut_sec = sect_addr(s);
    end
  end

  assign phase_addr = sel_ic ? i_c : new_addr;

  // Pointer that stores a finished timing detection into its TD register in
  // the same cycle the result is presented.
  always_comb begin
    td_we  = meas && td_valid && !pkt_det && (state == ST_COARSE || state == ST_FINE);
    td_sel = (state == ST_FINE) ? SW'(L) : sect;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= ST_IDLE;
      new_addr     <= '0;
      sel_ic       <= 1'b0;
      sect         <= '0;
      settle       <= '0;
      meas         <= 1'b0;
      i_max        <= '0;
      i_second     <= '0;
      td_start     <= 1'b0;
      interp_start <= 1'b0;
      acq_done     <= 1'b0;
      trk_step     <= 1'b0;
    end else begin
      td_start     <= 1'b0;
      interp_start <= 1'b0;
      acq_done     <= 1'b0;
      trk_step     <= 1'b0;
      if (pkt_det) begin
        state    <= ST_COARSE;
        sect     <= '0;
        new_addr <= sect_addr(0);
        sel_ic   <= 1'b0;
        settle   <= CW'(SETTLE);
        meas     <= 1'b0;
      end else begin
        case (state)
          ST_COARSE, ST_FINE: begin
            // slot timer: detections start exactly SLOT cycles apart
            if (settle == 0) begin
              settle <= CW'(SLOT - 1);
              if (!meas) begin
                td_start <= 1'b1;
                meas     <= 1'b1;
              end
            end else begin
              settle <= settle - 1'b1;
            end
            if (meas && td_valid) begin
              meas   <= 1'b0;
              if (state == ST_FINE) begin
                state        <= ST_INTERP;
                interp_start <= 1'b1;
              end else if (sect == SW'(L - 1)) begin
                state <= ST_SORT;
              end else begin
                sect     <= sect + 1'b1;
                new_addr <= sect_addr(int'(sect) + 1);
              end
            end
          end
          ST_SORT: begin
            i_max    <= lut_max;
            i_second <= lut_sec;
            sel_ic   <= 1'b1;
            settle   <= settle - 1'b1;   // the slot timer keeps running
            state    <= ST_FINE;
          end
          ST_INTERP: begin
            if (interp_done) begin
              new_addr <= offset_dir ? (i_c + interp_offset) : (i_c - interp_offset);
              sel_ic   <= 1'b0;
              acq_done <= 1'b1;
              state    <= ST_TRACK;
            end
          end
          ST_TRACK: begin
            if (trk_valid && trk_adjust) begin
              new_addr <= offset_dir ? (phase_addr + 1'b1) : (phase_addr - 1'b1);
              trk_step <= 1'b1;
            end
          end
          default: state <= ST_IDLE;
        endcase
      end
    end
  end

endmodule
