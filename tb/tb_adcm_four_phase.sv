`timescale 1ns / 1ps
// tb_adcm_four_phase: runs the four-phase generator from a 2x clock of 5 ns
// period and checks that ph[0] has the 1x period (10 ns) and a 50% duty
// cycle, that ph[1], ph[2], ph[3] are ph[0] delayed by a quarter, half and
// three quarters of the 1x period, and that the multiplexers give
// clk_e = ph[quad] and clk_l = ph[quad+1] for every quadrant.
module tb_adcm_four_phase;
  logic clk2x = 1'b0, rst_n = 1'b0;
  logic [1:0] quad;
  logic [3:0] ph;
  logic clk_e, clk_l;
  int checks = 0, failures = 0;
  realtime rise [4];
  realtime fall0;
  int nrise [4] = '{0, 0, 0, 0};

  adcm_four_phase dut (.clk2x, .rst_n, .quad, .ph, .clk_e, .clk_l);

  always #2.5 clk2x = ~clk2x;

  for (genvar g = 0; g < 4; g++) begin : g_mon
    always @(posedge ph[g]) if (rst_n) begin rise[g] = $realtime; nrise[g]++; end
  end
  always @(negedge ph[0]) if (rst_n) fall0 = $realtime;

  initial begin
    realtime r0;
    quad = 2'd0;
    #12 rst_n = 1'b1;
    // run a few periods, then measure one period of ph[0]
    repeat (4) @(posedge ph[0]);
    r0 = $realtime;
    @(negedge ph[0]);
    checks++;
    if ($realtime - r0 < 4.99 || $realtime - r0 > 5.01) begin
      failures++; $display("FAIL: ph[0] high for %0t", $realtime - r0);
    end
    @(posedge ph[0]);
    checks++;
    if ($realtime - r0 < 9.99 || $realtime - r0 > 10.01) begin
      failures++; $display("FAIL: ph[0] period %0t", $realtime - r0);
    end
    r0 = $realtime;
    // wait for the other three rising edges after this ph[0] edge
    #9.9;
    for (int g = 1; g < 4; g++) begin
      checks++;
      if (rise[g] - r0 < 2.5 * g - 0.01 || rise[g] - r0 > 2.5 * g + 0.01) begin
        failures++; $display("FAIL: ph[%0d] rises %0t after ph[0]", g, rise[g] - r0);
      end
    end
    // multiplexers, sampled in the middle of each 2x half period
    for (int q = 0; q < 4; q++) begin
      quad = 2'(q);
      for (int k = 0; k < 8; k++) begin
        #1.25;
        checks++;
        if (clk_e != ph[q] || clk_l != ph[(q + 1) % 4]) begin
          failures++; $display("FAIL: quad %0d clk_e %0b clk_l %0b ph %b", q, clk_e, clk_l, ph);
        end
        #1.25;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
