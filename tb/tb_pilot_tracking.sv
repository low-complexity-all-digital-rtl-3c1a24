`timescale 1ns / 1ps
// tb_pilot_tracking: streams OFDM symbols of NP pilot TD values. The first
// symbol after ref_clear must become the reference (average of its pilots);
// every later symbol must give trk_valid one cycle after its average, with
// trk_adjust = (average < reference) and the difference. A second packet
// (ref_clear) must take a new reference.
module tb_pilot_tracking;
  import adscd_pkg::*;
  localparam int unsigned NP = N_PILOTS, PW = TD_W;

  logic clk = 1'b0, rst_n = 1'b0;
  logic ref_clear, pilot_valid, ref_valid, trk_valid, trk_adjust;
  logic [PW-1:0] pilot_td, ref_td;
  logic signed [PW:0] trk_diff;
  int checks = 0, failures = 0, n_trk = 0, n_adj = 0;
  longint exp_ref, exp_avg;
  bit expect_trk = 0;

  pilot_tracking dut (.clk, .rst_n, .ref_clear, .pilot_valid, .pilot_td,
                      .ref_valid, .ref_td, .trk_valid, .trk_adjust, .trk_diff);

  always #5 clk = ~clk;

  task automatic symbol(bit is_ref);
    longint s = 0;
    for (int k = 0; k < int'(NP); k++) begin
      longint v = longint'($urandom_range(1 << 24));
      s += v;
      if (k == 2) begin @(negedge clk); pilot_valid = 1'b0; end  // one idle cycle
      @(negedge clk);
      pilot_valid = 1'b1; pilot_td = PW'(v);
    end
    @(negedge clk);
    pilot_valid = 1'b0;
    exp_avg = s / longint'(NP);
    if (is_ref) exp_ref = exp_avg;
    // average registered at the last pilot edge, result one edge later
    @(negedge clk);
    checks++;
    if (is_ref) begin
      if (!ref_valid || longint'(ref_td) != exp_ref || trk_valid) begin
        failures++;
        $display("FAIL: reference %0d (valid %0d) expected %0d", ref_td, ref_valid, exp_ref);
      end
    end else begin
      if (!trk_valid || trk_adjust != (exp_avg < exp_ref) || longint'(trk_diff) != exp_avg - exp_ref) begin
        failures++;
        $display("FAIL: trk valid %0d adjust %0d diff %0d expected adjust %0d diff %0d",
                 trk_valid, trk_adjust, trk_diff, exp_avg < exp_ref, exp_avg - exp_ref);
      end
      n_trk++;
      if (trk_adjust) n_adj++;
    end
  endtask

  initial begin
    ref_clear = 1'b0; pilot_valid = 1'b0; pilot_td = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int p = 0; p < 3; p++) begin
      @(negedge clk); ref_clear = 1'b1;
      @(negedge clk); ref_clear = 1'b0;
      checks++;
      if (ref_valid) begin failures++; $display("FAIL: reference not cleared"); end
      symbol(1);
      for (int s = 0; s < 20; s++) symbol(0);
    end
    checks++;
    if (n_adj == 0 || n_adj == n_trk) begin
      failures++;
      $display("FAIL: adjust decisions %0d of %0d, both outcomes expected", n_adj, n_trk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
