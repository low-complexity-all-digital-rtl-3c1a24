`timescale 1ns / 1ps
// adcm: BEHAVIOURAL MODEL of the 2^n-multiphase all-digital clock management
// (ADCM) that clocks the A/D converters, built without PLL or DLL.
//
// A phase address of n bits selects one of M = 2^n phases of the 1x clock.
// The two MSBs choose the quadrant: the four-phase generator (synthesizable,
// adcm_four_phase) divides the 2x system clock into 0/90/180/270 degree
// clocks and its multiplexers feed the quadrant clock to Bank_E and the next
// one to Bank_L. The n-2 LSBs drive the enables of Bank_L, and their
// complement those of Bank_E, in the delay interpolator (adcm_interp, a
// behavioural model of the tri-state banks and the Schmitt-trigger driver).
// Phase p is therefore delayed by p/M of a 1x period against ph[0].
//
// clk_1x (the 0-degree clock) is also brought out as the baseband clock.
// The other three generator phases reach the banks only through the
// multiplexers, so ph[3:1] has no direct reader here.
// The phase address is taken by the interpolator at each Bank_E clock edge.
module adcm #(
  parameter int unsigned M     = 32,
  parameter real         T_DRV = 0.0
) (
  input  logic                  clk2x,
  input  logic                  rst_n,
  input  logic [$clog2(M)-1:0]  phase_addr,
  output logic                  clk_1x,
  output logic                  adc_clk
);

  localparam int unsigned NB = $clog2(M) - 2;

  logic [3:0]    ph;
  logic          clk_e, clk_l;
  logic [NB-1:0] lsb;

  assign lsb    = phase_addr[NB-1:0];
  assign clk_1x = ph[0];

  adcm_four_phase u_four_phase (
    .clk2x (clk2x),
    .rst_n (rst_n),
    .quad  (phase_addr[NB+1:NB]),
    .ph    (ph),
    .clk_e (clk_e),
    .clk_l (clk_l)
  );

  adcm_interp #(.NB(NB), .T_DRV(T_DRV)) u_interp (
    .clk_e   (clk_e),
    .clk_l   (clk_l),
    .en_e    (~lsb),
    .en_l    (lsb),
    .clk_out (adc_clk)
  );

endmodule
