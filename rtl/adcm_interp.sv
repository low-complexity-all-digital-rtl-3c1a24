`timescale 1ns / 1ps
// adcm_interp: BEHAVIOURAL MODEL (not synthesizable) of the delay
// interpolator of the multiphase clock: the two banks of binary-weighted
// tri-state buffers (Bank_E, Bank_L, weights x1, x2, ... x2^(NB-1)) whose
// outputs are wired together, followed by the Schmitt-trigger driver
// (stages of 1x, 5x and 16x drive).
//
// Bank_E is driven by clock clk_e and Bank_L by clk_l, which runs a quarter
// period later. The output edge falls between the two input edges, at a
// fraction of the quarter period set by the current balance of the banks:
// all of Bank_E on gives no skew, all of Bank_L on gives 90 degrees, half
// and half gives 45 degrees. The model places each output edge
//     w_L / 2^NB  of a quarter period after the clk_e edge,
// w_L being the enabled weight of Bank_L, so with complementary enables the
// 2^NB settings give equally spaced phases. The silicon's spacing is not
// uniform (rise and fall times differ); that is not modelled. The quarter
// period is measured from the clk_e to clk_l edge distance, so no clock
// frequency has to be given. T_DRV is a fixed driver delay.
//
// The enables are sampled at each clk_e edge. With no buffer enabled the
// output keeps its level.
// The edge delay is computed at run time and is zero when no Bank_L buffer
// is on, so a zero-delay warning from the simulator is expected here.
module adcm_interp #(
  parameter int unsigned NB    = 3,     // buffers per bank
  parameter real         T_DRV = 0.0    // driver delay, ns
) (
  input  logic          clk_e,
  input  logic          clk_l,
  input  logic [NB-1:0] en_e,    // Bank_E buffer enables
  input  logic [NB-1:0] en_l,    // Bank_L buffer enables
  output logic          clk_out
);

  realtime t_e;
  realtime quarter;

  initial begin
    t_e     = 0.0;
    quarter = 0.0;
    clk_out = 1'b0;
  end

  always @(clk_l) begin
    if ($realtime > t_e) quarter = $realtime - t_e;
  end

  always @(clk_e) begin
    logic    lvl;
    realtime dly;
    lvl = clk_e;
    t_e = $realtime;
    dly = (real'(en_l) / real'(2 ** NB)) * quarter + T_DRV;
    if (en_e != '0 || en_l != '0) begin
      #(dly) clk_out = lvl;
    end
  end

endmodule
