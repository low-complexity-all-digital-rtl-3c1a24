`timescale 1ns / 1ps
// tb_acquisition: writes coarse and Central TD values through the register
// pointer, checks the sorter's Max / Second sections and the interpolated
// offset against a model computed in the testbench, for random triples.
module tb_acquisition;
  import adscd_pkg::*;
  localparam int unsigned M = M_PHASES, L = L_SECTIONS, TDW = TD_W, FRAC = FRAC_W;
  localparam longint KFX = (longint'(M) << FRAC) / (4 * L);

  logic clk = 1'b0, rst_n = 1'b0;
  logic td_we, interp_start, interp_busy, interp_done;
  logic [$clog2(L+1)-1:0] td_sel;
  logic [TDW-1:0] td_in;
  logic [$clog2(L)-1:0] max_idx, sec_idx;
  logic [$clog2(M)-1:0] interp_offset;
  logic [FRAC+1:0] interp_ratio;
  int checks = 0, failures = 0;

  acquisition dut (.clk, .rst_n, .td_we, .td_sel, .td_in, .max_idx, .sec_idx,
                   .interp_start, .interp_busy, .interp_done, .interp_offset, .interp_ratio);

  always #5 clk = ~clk;

  task automatic wr(int sel, longint v);
    @(negedge clk);
    td_we = 1'b1; td_sel = ($bits(td_sel))'(sel); td_in = TDW'(v);
    @(negedge clk);
    td_we = 1'b0;
  endtask

  initial begin
    longint v [L];
    longint c, num, den, q, t;
    int bi, si, e, n_lat;
    td_we = 1'b0; td_sel = '0; td_in = '0; interp_start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < int'(L); k++) begin
        v[k] = longint'($urandom_range(1 << 22));
        wr(k, v[k]);
      end
      bi = 0;
      for (int k = 1; k < int'(L); k++) if (v[k] > v[bi]) bi = k;
      si = (bi == 0) ? 1 : 0;
      for (int k = 0; k < int'(L); k++) if (k != bi && v[k] > v[si]) si = k;
      c = v[si] + longint'($urandom_range(1 << 23)) - (1 << 20);
      if (c < 0) c = 0;
      wr(int'(L), c);
      checks++;
      if (int'(max_idx) != bi || int'(sec_idx) != si) begin
        failures++;
        $display("FAIL: sorter max %0d sec %0d expected %0d %0d", max_idx, sec_idx, bi, si);
      end
      num = v[bi] - v[si]; den = c - v[si];
      if (den <= 0 || num >= 2 * den) q = 2 << FRAC; else q = (num << FRAC) / den;
      t = (2 << FRAC) - q;
      e = int'((t * KFX) >> (2 * FRAC));
      @(negedge clk); interp_start = 1'b1;
      @(negedge clk); interp_start = 1'b0;
      n_lat = 0;
      while (!interp_done && n_lat < 50) begin @(negedge clk); n_lat++; end
      checks++;
      if (int'(interp_offset) != e) begin
        failures++;
        $display("FAIL: offset %0d expected %0d", interp_offset, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
