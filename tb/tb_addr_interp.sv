`timescale 1ns / 1ps
// tb_addr_interp: checks the triangulation offset
//   offset = floor((2 - d(imax;isec)/d(ic;isec)) * M/(4L))
// against a model in the testbench, on hand-picked cases (Central half way:
// offset 0; Central equal to Max: floor(M/(4L))) and random TD triples, and
// checks that done rises at the (FRAC+3)th clock edge after the edge that
// samples start.
module tb_addr_interp;
  import adscd_pkg::*;
  localparam int unsigned M = M_PHASES, L = L_SECTIONS, TDW = TD_W, FRAC = FRAC_W;
  localparam longint KFX = (longint'(M) << FRAC) / (4 * L);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic [TDW-1:0] td_max, td_sec, td_c;
  logic [$clog2(M)-1:0] offset;
  logic [FRAC+1:0] ratio;
  int checks = 0, failures = 0;

  addr_interp dut (.clk, .rst_n, .start, .td_max, .td_sec, .td_c, .busy, .done, .offset, .ratio);

  always #5 clk = ~clk;

  function automatic int model(longint mx, longint sc, longint c);
    longint num = mx - sc, den = c - sc, q, t;
    if (den <= 0 || num >= 2 * den) q = 2 << FRAC;
    else q = (num << FRAC) / den;
    t = (2 << FRAC) - q;
    return int'((t * KFX) >> (2 * FRAC));
  endfunction

  task automatic run(longint mx, longint sc, longint c, int expect_val);
    int lat = 0, e;
    @(negedge clk);
    td_max = TDW'(mx); td_sec = TDW'(sc); td_c = TDW'(c);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    e = (expect_val >= 0) ? expect_val : model(mx, sc, c);
    checks += 2;
    if (int'(offset) != e) begin
      failures++;
      $display("FAIL: max=%0d sec=%0d c=%0d offset=%0d expected %0d", mx, sc, c, offset, e);
    end
    if (lat != int'(FRAC) + 4) begin
      failures++;
      $display("FAIL: latency %0d, expected %0d", lat, FRAC + 4);
    end
  endtask

  initial begin
    start = 1'b0; td_max = '0; td_sec = '0; td_c = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(1000, 200, 600, 0);                 // Central half way: stay at i_c
    run(1000, 200, 1000, (M / L) / 4);      // Central as good as Max: Delta/4
    run(1000, 200, 1200, 3);                // ratio 0.8: floor(1.2 * 32/12)
    run(1000, 1000, 1200, (M / L) / 2);     // Max equal to Second: ratio 0 -> Delta/2
    run(1000, 200, 100, 0);                 // Central worse than Second
    run(1000, 200, 800, int'($floor((2.0 - 800.0/600.0) * real'(M) / real'(4 * L))));
    for (int n = 0; n < 300; n++) begin
      longint sc = longint'($urandom_range(1 << 20));
      longint mx = sc + longint'($urandom_range(1 << 20));
      longint c  = sc + longint'($urandom_range(1 << 21)) - (1 << 18);
      if (c < 0) c = 0;
      run(mx, sc, c, -1);
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
