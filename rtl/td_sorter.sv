`timescale 1ns / 1ps
// td_sorter: finds the largest ("Max") and second largest ("Second") of the
// L coarse timing detections TD(0), TD(360/L), ... and their section indices.
// The indices act as the pointer that loads the i_max / i_second address
// registers of the phase controller.
//
// Purely combinational: a single pass keeps the best and runner-up values.
// On equal values the lower section index ranks first (a choice of this
// implementation). L must be at least 2.
module td_sorter
  import adscd_pkg::*;
#(
  parameter int unsigned L   = L_SECTIONS,
  parameter int unsigned TDW = TD_W
) (
  input  logic [TDW-1:0]         td       [L],
  output logic [$clog2(L)-1:0]   max_idx,
  output logic [$clog2(L)-1:0]   sec_idx,
  output logic [TDW-1:0]         max_val,
  output logic [TDW-1:0]         sec_val
);

  localparam int unsigned IW = $clog2(L);

  always_comb begin
    logic [TDW-1:0] bv, sv;
    logic [IW-1:0]  bi, si;
    if (td[1] > td[0]) begin
      bv = td[1]; bi = IW'(1); sv = td[0]; si = IW'(0);
    end else begin
      bv = td[0]; bi = IW'(0); sv = td[1]; si = IW'(1);
    end
    for (int k = 2; k < L; k++) begin
      if (td[k] > bv) begin
        sv = bv; si = bi;
        bv = td[k]; bi = IW'(k);
      end else if (td[k] > sv) begin
        sv = td[k]; si = IW'(k);
      end
    end
    max_idx = bi;
    sec_idx = si;
    max_val = bv;
    sec_val = sv;
  end

endmodule
