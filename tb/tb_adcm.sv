`timescale 1ns / 1ps
// tb_adcm: drives the 32-phase clock generator from an 80 MHz 2x clock
// (40 MHz sample clock, 25 ns) and checks for all 32 phase addresses that the
// A/D clock rises p/32 of a period (p * 0.78125 ns) after the 0-degree
// baseband clock.
module tb_adcm;
  localparam int unsigned M = 32;
  localparam real T = 25.0;
  logic clk2x = 1'b0, rst_n = 1'b0;
  logic [$clog2(M)-1:0] phase_addr;
  logic clk_1x, adc_clk;
  int checks = 0, failures = 0;
  realtime t1x, tadc;

  adcm #(.M(M)) dut (.clk2x, .rst_n, .phase_addr, .clk_1x, .adc_clk);

  always #(T / 4) clk2x = ~clk2x;
  always @(posedge clk_1x) t1x = $realtime;
  always @(posedge adc_clk) tadc = $realtime;

  initial begin
    phase_addr = '0;
    #20 rst_n = 1'b1;
    for (int p = 0; p < int'(M); p++) begin
      real d, got;
      phase_addr = ($bits(phase_addr))'(p);
      repeat (3) @(posedge clk_1x);
      #(T * 0.99);
      d = real'(p) * T / real'(M);
      got = tadc - t1x;
      if (got < 0.0) got = got + T;
      checks++;
      if (got < d - 0.001 || got > d + 0.001) begin
        failures++; $display("FAIL: phase %0d delay %0f expected %0f", p, got, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
