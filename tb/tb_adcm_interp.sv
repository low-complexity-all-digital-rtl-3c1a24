`timescale 1ns / 1ps
// tb_adcm_interp: feeds the delay-interpolator model two 40 MHz clocks a
// quarter period (6.25 ns) apart and, for every complementary bank setting
// (Bank_L code k, Bank_E ~k), checks that the output rises and falls
// k/8 of a quarter period after clk_e, i.e. k * 0.78125 ns.
module tb_adcm_interp;
  localparam int unsigned NB = 3;
  localparam real T = 25.0;
  logic clk_e = 1'b0, clk_l = 1'b0;
  logic [NB-1:0] en_e, en_l;
  logic clk_out;
  int checks = 0, failures = 0;
  realtime te_r, te_f, to_r, to_f;

  adcm_interp #(.NB(NB)) dut (.clk_e, .clk_l, .en_e, .en_l, .clk_out);

  initial forever begin #(T / 2) clk_e = ~clk_e; end
  initial begin #(T / 4); forever begin #(T / 2) clk_l = ~clk_l; end end

  always @(posedge clk_e) te_r = $realtime;
  always @(negedge clk_e) te_f = $realtime;
  always @(posedge clk_out) to_r = $realtime;
  always @(negedge clk_out) to_f = $realtime;

  initial begin
    en_e = '1; en_l = '0;
    for (int k = 0; k < (1 << NB); k++) begin
      real d;
      en_l = NB'(k);
      en_e = ~NB'(k);
      repeat (3) @(posedge clk_e);
      #(T * 0.9);
      d = real'(k) / real'(1 << NB) * (T / 4);
      checks += 2;
      if (to_r - te_r < d - 0.001 || to_r - te_r > d + 0.001) begin
        failures++; $display("FAIL: code %0d rising delay %0t expected %0f", k, to_r - te_r, d);
      end
      if (to_f - te_f < d - 0.001 || to_f - te_f > d + 0.001) begin
        failures++; $display("FAIL: code %0d falling delay %0t expected %0f", k, to_f - te_f, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
