`timescale 1ns / 1ps
// pilot_tracking: pilot-based tracking of the coherent sampling phase during
// the data (datum) symbols of a packet.
//
// The cross correlator of the OFDM receiver delivers one timing-detection
// value per pilot. The NP values of an OFDM symbol are held in pilot
// registers and averaged. A demultiplexer sends the average of the first
// symbol after `ref_clear` into the reference register; for every later
// symbol the reference is subtracted from the new average and the sign is
// reported: trk_adjust = 1 when the new TD is below the reference, which tells
// the phase controller to move the A/D clock phase. Only adds, one subtract
// and a shift are needed.
//
// NP must be a power of two (the average is a right shift); the reference is
// kept for the whole packet. Both are this implementation's choices.
//
// Timing: pilots are accepted when pilot_valid is high. The edge that accepts
// the NP-th pilot of a symbol registers the average; the next edge either
// loads the reference or pulses trk_valid with trk_adjust and trk_diff.
module pilot_tracking
  import adscd_pkg::*;
#(
  parameter int unsigned NP  = N_PILOTS,
  parameter int unsigned PW  = TD_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ref_clear,     // new packet: next symbol is the reference
  input  logic                 pilot_valid,
  input  logic [PW-1:0]        pilot_td,
  output logic                 ref_valid,
  output logic [PW-1:0]        ref_td,
  output logic                 trk_valid,
  output logic                 trk_adjust,    // new average < reference
  output logic signed [PW:0]   trk_diff       // new average - reference
);

  localparam int unsigned CNT_W = (NP > 1) ? $clog2(NP) : 1;

  logic [PW-1:0]        pilots [NP];   // pilot registers
  logic [CNT_W-1:0]     cnt;
  logic                 avg_valid;
  logic [PW-1:0]        avg;
  logic [PW+CNT_W-1:0]  sum;

  // Average of the NP-1 stored pilots and the one arriving now.
  always_comb begin
    sum = ($bits(sum))'(pilot_td);
    for (int k = 0; k < NP - 1; k++) sum = sum + ($bits(sum))'(pilots[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NP; k++) pilots[k] <= '0;
      cnt       <= '0;
      avg_valid <= 1'b0;
      avg       <= '0;
    end else begin
      avg_valid <= 1'b0;
      if (ref_clear) begin
        cnt <= '0;
      end else if (pilot_valid) begin
        pilots[0] <= pilot_td;
        for (int k = 1; k < NP; k++) pilots[k] <= pilots[k-1];
        if (cnt == CNT_W'(NP - 1)) begin
          cnt       <= '0;
          avg       <= PW'(sum >> $clog2(NP));
          avg_valid <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  // Demultiplexer, reference register, subtract and sign.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_valid  <= 1'b0;
      ref_td     <= '0;
      trk_valid  <= 1'b0;
      trk_adjust <= 1'b0;
      trk_diff   <= '0;
    end else begin
      trk_valid <= 1'b0;
      if (ref_clear) begin
        ref_valid <= 1'b0;
      end else if (avg_valid) begin
        if (!ref_valid) begin
          ref_td    <= avg;
          ref_valid <= 1'b1;
        end else begin
          trk_valid  <= 1'b1;
          trk_diff   <= $signed({1'b0, avg}) - $signed({1'b0, ref_td});
          trk_adjust <= (avg < ref_td);
        end
      end
    end
  end

endmodule
