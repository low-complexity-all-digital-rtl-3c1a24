`timescale 1ns / 1ps
// adcm_four_phase: four-phase generator of the multiphase clock (ADCM).
//
// Two D flip-flops divide the 2x system clock into 1x clocks 90 degrees
// apart: q0 toggles on every rising 2x edge (0 degrees) and q1 copies q0 on
// every falling 2x edge, a quarter of a 1x period later (90 degrees). Their
// complements give 180 and 270 degrees. Two 4-to-1 multiplexers, steered by
// the two most significant phase-address bits (the quadrant), select the
// input of Bank_E (quadrant * 90 degrees) and of Bank_L (90 degrees later),
// so the interpolating banks only ever have to span a quarter period.
//
// The divider uses the two flip-flops and the two multiplexers of the
// design; the exact flip-flop wiring (toggle on the rising edge, copy on the
// falling edge) is this implementation's choice. After reset q0 = q1 = 0;
// the first rising 2x edge raises ph[0].
module adcm_four_phase (
  input  logic       clk2x,
  input  logic       rst_n,
  input  logic [1:0] quad,     // phase-address MSBs: quadrant of Bank_E
  output logic [3:0] ph,       // 0, 90, 180, 270 degree 1x clocks
  output logic       clk_e,    // Bank_E input
  output logic       clk_l     // Bank_L input, +90 degrees
);

  logic q0, q1;

  always_ff @(posedge clk2x or negedge rst_n) begin
    if (!rst_n) q0 <= 1'b0;
    else        q0 <= ~q0;
  end

  always_ff @(negedge clk2x or negedge rst_n) begin
    if (!rst_n) q1 <= 1'b0;
    else        q1 <= q0;
  end

  assign ph = {~q1, ~q0, q1, q0};

  always_comb begin
    clk_e = ph[quad];
    clk_l = ph[quad + 2'd1];
  end

endmodule
