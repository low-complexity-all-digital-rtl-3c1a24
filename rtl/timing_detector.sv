`timescale 1ns / 1ps
// timing_detector: window-based timing detection TD(eps) on a short preamble.
//
// The received I/Q samples are cross-correlated with the known BPSK short
// preamble c[0..N-1] (a +/-1 sequence, so the correlation needs only adds and
// subtracts). For every new sample the correlator output R = sum_m x[t-N+1+m]*c[m]
// is formed, its power |R|^2 = Re^2 + Im^2 is registered, and after a `start`
// strobe WIN consecutive powers are summed:
//     TD = sum_{k=-N/3}^{4N/3} |R(k)|^2         (WIN = N/3 + 4N/3 + 1 lags)
// A larger TD means the A/D samples closer to the ideal sampling instant, so
// the phase controller compares TD values taken at different clock phases.
// The correlation/energy-window definition follows the timing detection
// metric of the design; the BPSK +/-1 coefficients, the full-rate streaming
// structure and the register pipeline are this implementation's choices.
//
// Interface: one sample per cycle when in_valid is high. `start` marks the
// sample that closes the first lag of the window (the correlation of the N
// samples ending with it). td_valid pulses for one cycle with the result; it
// is set by the clock edge right after the edge that accepts the WIN-th
// sample of the window (latency 1 cycle, window WIN cycles). busy is
// high while a window is being summed; a new start restarts the window.
module timing_detector
  import adscd_pkg::*;
#(
  parameter int unsigned N      = N_PRE,
  parameter int unsigned W      = ADC_W,
  parameter int unsigned WIN    = td_window(N),
  parameter int unsigned TDW    = td_width(N, W, WIN),
  // bit m set means c[m] = -1, clear means c[m] = +1
  parameter logic [N-1:0] COEF  = 16'h1D2B
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [W-1:0]   in_i,
  input  logic signed [W-1:0]   in_q,
  input  logic                  start,
  output logic                  busy,
  output logic                  td_valid,
  output logic [TDW-1:0]        td
);

  localparam int unsigned CW = corr_width(N, W);
  localparam int unsigned PW = 2 * CW + 1;

  logic signed [W-1:0] sh_i [N-1];   // the N-1 previous samples, [0] newest
  logic signed [W-1:0] sh_q [N-1];
  logic signed [CW-1:0] r_i, r_q;
  logic [PW-1:0]        pwr;
  logic                 pwr_tag;     // registered power belongs to the window
  logic [$clog2(WIN+1)-1:0] remain;  // samples of the window still to accept
  logic [$clog2(WIN+1)-1:0] acc_cnt; // powers still to add
  logic [TDW-1:0]       acc;

  // Correlation of the current sample and the N-1 before it with c[0..N-1];
  // c[N-1] aligns with the newest sample.
  always_comb begin
    logic signed [CW-1:0] si, sq;
    si = (COEF[N-1]) ? -CW'(in_i) : CW'(in_i);
    sq = (COEF[N-1]) ? -CW'(in_q) : CW'(in_q);
    for (int m = 0; m < N - 1; m++) begin
      if (COEF[N-2-m]) begin
        si = si - CW'(sh_i[m]);
        sq = sq - CW'(sh_q[m]);
      end else begin
        si = si + CW'(sh_i[m]);
        sq = sq + CW'(sh_q[m]);
      end
    end
    r_i = si;
    r_q = sq;
  end

  logic accept;
  assign accept = in_valid && (start || remain != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < N - 1; m++) begin
        sh_i[m] <= '0;
        sh_q[m] <= '0;
      end
      pwr     <= '0;
      pwr_tag <= 1'b0;
      remain  <= '0;
    end else begin
      if (in_valid) begin
        sh_i[0] <= in_i;
        sh_q[0] <= in_q;
        for (int m = 1; m < N - 1; m++) begin
          sh_i[m] <= sh_i[m-1];
          sh_q[m] <= sh_q[m-1];
        end
        pwr <= PW'(r_i * r_i) + PW'(r_q * r_q);
      end
      pwr_tag <= accept;
      if (start)
        remain <= (in_valid) ? ($bits(remain))'(WIN - 1) : ($bits(remain))'(WIN);
      else if (accept)
        remain <= remain - 1'b1;
    end
  end

  // Window accumulator.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc      <= '0;
      acc_cnt  <= '0;
      td       <= '0;
      td_valid <= 1'b0;
    end else begin
      td_valid <= 1'b0;
      if (start) begin
        acc     <= '0;
        acc_cnt <= ($bits(acc_cnt))'(WIN);
      end else if (pwr_tag && acc_cnt != 0) begin
        if (acc_cnt == 1) begin
          td       <= acc + TDW'(pwr);
          td_valid <= 1'b1;
          acc      <= '0;
        end else begin
          acc <= acc + TDW'(pwr);
        end
        acc_cnt <= acc_cnt - 1'b1;
      end
    end
  end

  assign busy = (acc_cnt != 0);

endmodule
