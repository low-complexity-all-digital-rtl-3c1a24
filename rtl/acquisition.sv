`timescale 1ns / 1ps
// acquisition: distance-based acquisition of the coherent clock phase.
//
// Holds L+1 timing-detection registers: one per coarse section
// (TD(0), TD(360/L), ... sampled at phases 0, M/L, 2M/L, ...) and one for the
// Central phase i_c of the fine search (register index L). The address
// decision of the phase controller writes them through a pointer
// (td_we/td_sel). A sorter reports the Max and Second sections; the address
// interpolator then triangulates the offset from i_c towards i_max.
//
// Interface: td_we/td_sel/td_in write one register per cycle. max_idx and
// sec_idx are combinational from the registers (valid the cycle after the
// last coarse write). interp_start starts the interpolator; interp_done
// pulses with interp_offset FRAC+3 cycles later (see addr_interp; the
// offset never exceeds M/(2L), so its top bit is constant 0).
module acquisition
  import adscd_pkg::*;
#(
  parameter int unsigned M    = M_PHASES,
  parameter int unsigned L    = L_SECTIONS,
  parameter int unsigned TDW  = TD_W,
  parameter int unsigned FRAC = FRAC_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   td_we,
  input  logic [$clog2(L+1)-1:0] td_sel,
  input  logic [TDW-1:0]         td_in,
  output logic [$clog2(L)-1:0]   max_idx,
  output logic [$clog2(L)-1:0]   sec_idx,
  input  logic                   interp_start,
  output logic                   interp_busy,
  output logic                   interp_done,
  output logic [$clog2(M)-1:0]   interp_offset,
  output logic [FRAC+1:0]        interp_ratio
);

  logic [TDW-1:0] td_coarse [L];
  logic [TDW-1:0] td_central;
  logic [TDW-1:0] max_val, sec_val;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < L; k++) td_coarse[k] <= '0;
      td_central <= '0;
    end else if (td_we) begin
      if (td_sel == ($bits(td_sel))'(L)) td_central <= td_in;
      else begin
        for (int k = 0; k < L; k++)
          if (td_sel == ($bits(td_sel))'(k)) td_coarse[k] <= td_in;
      end
    end
  end

  td_sorter #(.L(L), .TDW(TDW)) u_sorter (
    .td      (td_coarse),
    .max_idx (max_idx),
    .sec_idx (sec_idx),
    .max_val (max_val),
    .sec_val (sec_val)
  );

  addr_interp #(.M(M), .L(L), .TDW(TDW), .FRAC(FRAC)) u_interp (
    .clk    (clk),
    .rst_n  (rst_n),
    .start  (interp_start),
    .td_max (max_val),
    .td_sec (sec_val),
    .td_c   (td_central),
    .busy   (interp_busy),
    .done   (interp_done),
    .offset (interp_offset),
    .ratio  (interp_ratio)
  );

endmodule
