`timescale 1ns / 1ps
// tb_timing_detector: self-checking test of the short-preamble timing
// detector. 8-bit I/Q samples stream in at one per cycle, with an idle cycle
// every 37 samples. The stream has three kinds of segment: random samples
// over the full range, the preamble itself repeated at full scale (the
// largest correlations, to check that no width overflows), and constant
// extreme values. Windows are started every 45 samples, and once a second
// start arrives before a window is complete (the window must restart). A
// reference model in the testbench recomputes every correlation from the
// sample history and sums |R|^2 over the window. The test checks each TD
// value, the latency (result one cycle after the last sample of the
// window) and the number of results.
module tb_timing_detector;
  import adscd_pkg::*;

  localparam int unsigned N   = N_PRE;
  localparam int unsigned W   = ADC_W;
  localparam int unsigned WIN = td_window(N);
  localparam int unsigned TDW = td_width(N, W, WIN);
  localparam logic [N-1:0] COEF = 16'h1D2B;
  localparam int unsigned NS  = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, start, busy, td_valid;
  logic signed [W-1:0] in_i, in_q;
  logic [TDW-1:0] td;

  int checks = 0, failures = 0;
  int cyc = 0;

  int xi [NS];
  int xq [NS];
  int nacc = 0;                 // samples accepted so far
  int start_at [$];
  int n_exp = 0;                // windows expected to complete
  int last_idx;                 // sample index closing the current window
  longint exp_td;
  int exp_cycle;
  int got = 0;

  timing_detector dut (.clk, .rst_n, .in_valid, .in_i, .in_q, .start, .busy, .td_valid, .td);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic longint ref_td(int last);
    longint acc = 0;
    for (int j = last - int'(WIN) + 1; j <= last; j++) begin
      longint ri = 0, rq = 0;
      for (int m = 0; m < int'(N); m++) begin
        int idx = j - int'(N) + 1 + m;
        int s = COEF[m] ? -1 : 1;
        if (idx >= 0) begin
          ri += s * xi[idx];
          rq += s * xq[idx];
        end
      end
      acc += ri * ri + rq * rq;
    end
    return acc;
  endfunction

  // drive
  initial begin
    in_valid = 1'b0; start = 1'b0; in_i = '0; in_q = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NS; k++) begin
      case ((k / 300) % 3)
        0: begin                                   // random, full range
          xi[k] = int'($urandom_range(255)) - 128;
          xq[k] = int'($urandom_range(255)) - 128;
        end
        1: begin                                   // full-scale preamble
          xi[k] = COEF[k % N] ? -128 : 127;
          xq[k] = COEF[k % N] ? 127 : -128;
        end
        default: begin                             // constant extremes
          xi[k] = ((k / 50) % 2 == 0) ? -128 : 127;
          xq[k] = -128;
        end
      endcase
    end
    for (int k = 20; k + int'(WIN) + 2 < int'(NS); k += 45) start_at.push_back(k);
    start_at.push_back(start_at[5] + 10);          // restart inside a window
    start_at.sort();
    while (nacc < NS - 1) begin
      @(negedge clk);
      start = 1'b0;
      // one idle cycle every 37 samples, never on a start sample
      if ((nacc % 37) == 36 && in_valid) begin
        in_valid = 1'b0;
      end else begin
        in_valid = 1'b1;
        in_i = W'(xi[nacc]);
        in_q = W'(xq[nacc]);
        foreach (start_at[w]) if (nacc == start_at[w]) start = 1'b1;
        nacc++;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    start = 1'b0;
    repeat (5) @(negedge clk);
    checks++;
    if (got != n_exp || n_exp != start_at.size() - 1) begin
      failures++;
      $display("FAIL: %0d results, expected %0d", got, start_at.size() - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected result bookkeeping on the accepting edge
  int accepted = 0;
  int win_left = 0;
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      if (start) win_left = int'(WIN);
      if (win_left > 0) begin
        win_left--;
        if (win_left == 0) begin
          exp_td    = ref_td(accepted);
          exp_cycle = cyc + 1;
          n_exp++;
        end
      end
      accepted++;
    end
  end

  always @(posedge clk) begin
    if (rst_n && td_valid) begin
      got++;
      checks += 2;
      if (longint'(td) != exp_td) begin
        failures++;
        $display("FAIL: td=%0d expected %0d", td, exp_td);
      end
      if (cyc != exp_cycle + 1) begin
        failures++;
        $display("FAIL: td_valid seen at cycle %0d, expected %0d", cyc, exp_cycle + 1);
      end
    end
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
