`timescale 1ns / 1ps
// addr_interp: triangulation-based address interpolator of the distance-based
// acquisition.
//
// From the timing detections at the Max, Second and Central (i_c) phases it
// forms the two distances
//     d(i_max; i_second) = TD_max - TD_second       (numerator)
//     d(i_c;   i_second) = TD_c   - TD_second       (denominator)
// divides them, subtracts the ratio from 2, multiplies by M/(4L) and keeps
// the integer part:
//     offset = floor( (2 - d(i_max;i_second)/d(i_c;i_second)) * M/(4L) )
// The phase controller then moves from i_c by `offset` phases towards i_max.
// A ratio of 2 (Central half way in TD) gives offset 0, a ratio of 1
// (Central as good as Max) gives floor(M/4L) = floor(Delta/4).
//
// The divider is a restoring divider that produces the ratio with FRAC
// fraction bits, one quotient bit per cycle. This implementation saturates
// the ratio to the range [0, 2] (so offset stays within 0 .. M/(2L)) and
// treats a denominator <= 0 (Central no better than Second) as ratio 2.
// M/(4L) is a fixed-point constant with FRAC fraction bits.
// `offset` is as wide as a phase address so it adds directly to i_c; with
// the clamp it never exceeds M/(2L), so its top bit stays 0.
//
// Timing: the clock edge that samples `start` loads the operands; `done`
// pulses with `offset` from the edge FRAC+3 cycles later (one setup cycle,
// FRAC+1 quotient bits, one output cycle). `busy` is high in between and
// further starts are ignored until it falls.
module addr_interp
  import adscd_pkg::*;
#(
  parameter int unsigned M    = M_PHASES,
  parameter int unsigned L    = L_SECTIONS,
  parameter int unsigned TDW  = TD_W,
  parameter int unsigned FRAC = FRAC_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [TDW-1:0]         td_max,
  input  logic [TDW-1:0]         td_sec,
  input  logic [TDW-1:0]         td_c,
  output logic                   busy,
  output logic                   done,
  output logic [$clog2(M)-1:0]   offset,
  output logic [FRAC+1:0]        ratio      // d(imax;isec)/d(ic;isec), FRAC fraction bits
);

  localparam int unsigned PAW = $clog2(M);
  localparam int unsigned DW  = TDW + 2;
  // M/(4L) with FRAC fraction bits
  localparam int unsigned KFX = (M * (1 << FRAC)) / (4 * L);
  localparam int unsigned KW  = $clog2(KFX + 1);

  typedef enum logic [1:0] {S_IDLE, S_SETUP, S_DIV, S_OUT} st_e;
  st_e st;

  logic signed [DW-1:0] num, den, rem;
  logic [FRAC:0]        q;          // quotient, FRAC fraction bits, < 2
  logic [$clog2(FRAC+2)-1:0] bitn;
  logic                 sat;

  // Output stage: t = 2 - ratio, offset = floor(t * M/(4L)).
  logic [FRAC+1:0]      ratio_c, t;
  logic [FRAC+2+KW-1:0] prod;
  always_comb begin
    ratio_c = sat ? (FRAC+2)'(2 << FRAC) : {1'b0, q};
    t       = (FRAC+2)'(2 << FRAC) - ratio_c;
    prod    = ($bits(prod))'(t) * ($bits(prod))'(KFX);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st     <= S_IDLE;
      num    <= '0;
      den    <= '0;
      rem    <= '0;
      q      <= '0;
      bitn   <= '0;
      sat    <= 1'b0;
      done   <= 1'b0;
      offset <= '0;
      ratio  <= '0;
    end else begin
      done <= 1'b0;
      case (st)
        S_IDLE: if (start) begin
          num <= DW'(td_max) - DW'(td_sec);
          den <= DW'(td_c) - DW'(td_sec);
          st  <= S_SETUP;
        end
        S_SETUP: begin
          q    <= '0;
          rem  <= num;
          bitn <= '0;
          // ratio >= 2, or no usable denominator: saturate
          sat  <= (den <= 0) || (num >= (den <<< 1));
          st   <= S_DIV;
        end
        S_DIV: begin
          // quotient bit of weight 2^-bitn
          if (rem >= den) begin
            q   <= q | ((FRAC+1)'(1) << (($bits(bitn))'(FRAC) - bitn));
            rem <= (rem - den) <<< 1;
          end else begin
            rem <= rem <<< 1;
          end
          if (bitn == ($bits(bitn))'(FRAC)) st <= S_OUT;
          else bitn <= bitn + 1'b1;
        end
        S_OUT: begin
          offset <= PAW'(prod >> (2 * FRAC));
          ratio  <= ratio_c;
          done   <= 1'b1;
          st     <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  assign busy = (st != S_IDLE);

endmodule
