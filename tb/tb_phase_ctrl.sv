`timescale 1ns / 1ps
// tb_phase_ctrl: drives the phase controller with a testbench model of the
// timing detector (TD falls with the circular distance between the applied
// phase and a hidden coherent phase), of the sorter and of the interpolator
// (fixed offset answer). For several coherent phases it checks:
//   - the coarse phases 0, M/L, 2M/L ... are applied in turn,
//   - the fine phase is the circular midpoint i_c of i_max and i_second,
//   - the final phase is i_c + sign(i_max - i_second) * offset,
//   - td_start comes SETTLE+1 cycles after pkt_det, then every SLOT cycles,
//   - a tracking decision with trk_adjust moves the phase one step in the
//     offset direction and one without it leaves the phase unchanged.
module tb_phase_ctrl;
  import adscd_pkg::*;
  localparam int unsigned M = M_PHASES, L = L_SECTIONS, SETTLE = 6, SLOT = 20, WIN = 12, NC = 4;
  localparam int unsigned PAW = $clog2(M);

  logic clk = 1'b0, rst_n = 1'b0;
  logic pkt_det, td_start, td_valid, td_we, interp_start, interp_done;
  logic [$clog2(L+1)-1:0] td_sel;
  logic [$clog2(L)-1:0] max_idx, sec_idx;
  logic [PAW-1:0] interp_offset, phase_addr, i_max, i_second, i_c;
  logic trk_valid, trk_adjust, offset_dir, acq_done, trk_step;
  ctrl_state_e state;
  int checks = 0, failures = 0, cyc = 0;

  phase_ctrl #(.M(M), .L(L), .N(NC), .WIN(WIN), .SETTLE(SETTLE), .SLOT(SLOT)) dut (
    .clk, .rst_n, .pkt_det, .td_start, .td_valid, .td_we, .td_sel, .max_idx, .sec_idx,
    .interp_start, .interp_done, .interp_offset, .trk_valid, .trk_adjust,
    .phase_addr, .offset_dir, .i_max, .i_second, .i_c, .state, .acq_done, .trk_step);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  int coh;                       // hidden coherent phase
  int applied [$];               // phases at each td_start
  int start_cyc [$];             // cycle of each td_start
  longint tdv [L+1];
  int det_cyc, first_start;

  function automatic int cdist(int a, int b);
    int d = (a - b + int'(M)) % int'(M);
    return (d > int'(M) / 2) ? int'(M) - d : d;
  endfunction

  // timing detector model: answer 5 cycles after td_start
  initial begin
    td_valid = 1'b0;
    forever begin
      @(posedge clk);
      if (rst_n && td_start) begin
        automatic int p = int'(phase_addr);
        applied.push_back(p);
        start_cyc.push_back(cyc);
        if (applied.size() == 1) first_start = cyc;
        repeat (4) @(posedge clk);
        @(negedge clk);
        td_valid = 1'b1;
        tdv[td_sel_model()] = 1000000 - 900 * cdist(p, coh) * cdist(p, coh);
        @(negedge clk);
        td_valid = 1'b0;
      end
    end
  end

  function automatic int td_sel_model();
    return (applied.size() <= int'(L)) ? applied.size() - 1 : int'(L);
  endfunction

  // sorter model on the values seen so far
  always_comb begin
    int bi, si;
    bi = 0;
    for (int k = 1; k < int'(L); k++) if (tdv[k] > tdv[bi]) bi = k;
    si = (bi == 0) ? 1 : 0;
    for (int k = 0; k < int'(L); k++) if (k != bi && tdv[k] > tdv[si]) si = k;
    max_idx = ($bits(max_idx))'(bi);
    sec_idx = ($bits(sec_idx))'(si);
  end

  // interpolator model: offset 2, three cycles after start
  initial begin
    interp_done = 1'b0; interp_offset = PAW'(2);
    forever begin
      @(posedge clk);
      if (rst_n && interp_start) begin
        repeat (2) @(posedge clk);
        @(negedge clk); interp_done = 1'b1;
        @(negedge clk); interp_done = 1'b0;
      end
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (coh %0d)", what, coh); end
  endtask

  initial begin
    pkt_det = 1'b0; trk_valid = 1'b0; trk_adjust = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (tdv[k]) tdv[k] = 0;
    for (int n = 0; n < 12; n++) begin
      int bi, si, imx, isc, cd, icx, dir, fin, p0;
      coh = (n * 7 + 3) % int'(M);
      applied.delete();
      start_cyc.delete();
      @(negedge clk); pkt_det = 1'b1; det_cyc = cyc;
      @(negedge clk); pkt_det = 1'b0;
      wait (acq_done);
      @(negedge clk);
      chk(applied.size() == int'(L) + 1, "number of timing detections");
      chk(first_start == det_cyc + int'(SETTLE) + 2, "settle time before first detection");
      for (int s = 0; s < int'(L); s++)
        chk(applied[s] == (s * int'(M)) / int'(L), "coarse phase");
      for (int s = 1; s <= int'(L); s++)
        chk(start_cyc[s] - start_cyc[s-1] == int'(SLOT), "detections one slot apart");
      // expected from the testbench's own sort of the coarse values
      bi = 0;
      for (int k = 1; k < int'(L); k++) if (tdv[k] > tdv[bi]) bi = k;
      si = (bi == 0) ? 1 : 0;
      for (int k = 0; k < int'(L); k++) if (k != bi && tdv[k] > tdv[si]) si = k;
      imx = (bi * int'(M)) / int'(L);
      isc = (si * int'(M)) / int'(L);
      cd = (imx - isc + int'(M)) % int'(M);
      if (cd >= int'(M) / 2) cd = cd - int'(M);
      icx = (isc + int'($floor(real'(cd) / 2.0)) + int'(M)) % int'(M);
      dir = (cd > 0) ? 1 : -1;
      fin = (icx + dir * 2 + int'(M)) % int'(M);
      chk(applied[L] == icx, "fine phase is the midpoint i_c");
      chk(int'(phase_addr) == fin, "final phase i_c +/- offset");
      chk(offset_dir == (dir > 0), "offset direction");
      // tracking
      p0 = int'(phase_addr);
      @(negedge clk); trk_valid = 1'b1; trk_adjust = 1'b0;
      @(negedge clk); trk_valid = 1'b0;
      @(negedge clk);
      chk(int'(phase_addr) == p0, "no step without adjust");
      @(negedge clk); trk_valid = 1'b1; trk_adjust = 1'b1;
      @(negedge clk); trk_valid = 1'b0; trk_adjust = 1'b0;
      @(negedge clk);
      chk(int'(phase_addr) == (p0 + dir + int'(M)) % int'(M), "one step in offset direction");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
