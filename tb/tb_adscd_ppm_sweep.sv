`timescale 1ns / 1ps
// tb_adscd_ppm_sweep: runs the whole design at its default sizes over the
// range of sample clock offsets it is meant to tolerate: -400, -200, -50,
// +50, +200 and +400 ppm, two packets each with different timing offsets.
//
// The channel and A/D model is the one of the end-to-end test: a repeating
// 16-sample BPSK preamble on a transmitter clock that differs from the
// receiver's by PPM, linear between symbol points, sampled at the real time
// stamps of the design's adc_clk edges, so both the sign and the size of the
// offset act on the acquisition. During the data symbols the test supplies
// 4 pilot TD values per 80-sample symbol that fall with the distance between
// the applied phase and the coherent phase; the coherent phase drifts by
// |PPM| * 80 * 32 phases per symbol in the direction acquisition reported,
// which is the direction the tracking steps in.
//
// Checks per packet: four detections, the acquisition cycle count, the final
// phase against a floating-point evaluation of the acquisition rule on the
// TD values seen (within one phase), the distance to the coherent phase,
// and during 40 symbols that tracking keeps the error within 3 phases of
// where acquisition left it. At 400 ppm the drift (1.02 phases per symbol)
// is slightly more than the one step per symbol the tracking can make, so
// this also shows the margin at the edge of the range.
module tb_adscd_ppm_sweep;
  import adscd_pkg::*;

  localparam real T       = 25.0;          // sample period, ns (40 MHz)
  localparam int  M       = int'(M_PHASES);
  localparam int  N       = int'(N_PRE);
  localparam logic [N_PRE-1:0] COEF = 16'h1D2B;
  localparam int  TDW     = int'(TD_W);
  // allowed distance from the coherent phase: the triangulation is exact only
  // when the coherent phase lies a quarter section from Max and is off by up
  // to half a section (M/2L phases) otherwise; plus the 400 ppm drift
  // during the acquisition (about 3 phases)
  localparam int  MAX_ERR = int'(M_PHASES) / (2 * int'(L_SECTIONS)) + 3;
  localparam int  SYM     = 80;            // OFDM symbol, samples
  localparam int  NSYM    = 40;            // data symbols per packet

  logic clk2x = 1'b0, rst_n = 1'b1;
  logic clk_1x, adc_clk;
  logic adc_valid = 1'b0;
  logic signed [ADC_W-1:0] adc_i = '0, adc_q = '0;
  logic pkt_det = 1'b0;
  logic pilot_valid = 1'b0;
  logic [TDW-1:0] pilot_td = '0;
  logic [$clog2(M_PHASES)-1:0] phase_addr, i_max, i_second, i_c, interp_offset;
  logic offset_dir, acq_done, td_valid, trk_valid, trk_adjust, trk_step;
  logic [TDW-1:0] td;
  logic [FRAC_W+1:0] interp_ratio;
  ctrl_state_e state;

  adscd_top dut (
    .clk2x, .rst_n, .clk_1x, .adc_clk, .adc_valid, .adc_i, .adc_q, .pkt_det,
    .pilot_valid, .pilot_td, .phase_addr, .offset_dir, .i_max, .i_second, .i_c,
    .state, .acq_done, .td_valid, .td, .interp_ratio, .interp_offset,
    .trk_valid, .trk_adjust, .trk_step);

  always #(T / 4) clk2x = ~clk2x;

  int checks = 0, failures = 0;
  real ppm = 0.0;
  real tau = 0.0;

  // ---------------------------------------------------------------- A/D
  function automatic real chip(int m);
    int k = ((m % N) + N) % N;
    return COEF[k] ? -1.0 : 1.0;
  endfunction

  // position of time t on the transmitter's symbol grid, in symbols
  function automatic real tx_pos(realtime t);
    return t / (T * (1.0 + ppm * 1.0e-6)) - tau;
  endfunction

  // coherent phase at time t: the phase whose sampling instant lands on a
  // symbol point, as a real number in [0, M)
  function automatic real coherent_phase(realtime t);
    real u = tx_pos(t);
    real fr = u - $floor(u);
    real p = (1.0 - fr) * real'(M);
    if (p >= real'(M)) p = p - real'(M);
    return p;
  endfunction

  always @(posedge adc_clk) begin
    real u, fr, v;
    int m, vi, vq;
    u  = tx_pos($realtime);
    m  = int'($floor(u));
    fr = u - $floor(u);
    v  = 90.0 * ((1.0 - fr) * chip(m) + fr * chip(m + 1));
    vi = int'(v * 0.8) + int'($urandom_range(4)) - 2;
    vq = int'(v * 0.6) + int'($urandom_range(4)) - 2;
    #1.25;
    adc_i <= ADC_W'(vi);
    adc_q <= ADC_W'(vq);
    adc_valid <= rst_n;
  end

  // ---------------------------------------------------------- counters
  int cyc = 0;
  int n_td = 0, n_steps = 0, n_pkts = 0;
  realtime t_rise = 0.0;         // last rising edge of the baseband clock
  always @(posedge clk_1x) begin cyc <= cyc + 1; t_rise = $realtime; end
  longint td_seen [$];           // TD values of the current acquisition
  int     ph_seen [$];           // and the phases they were taken at
  always @(posedge clk_1x) if (rst_n && td_valid) begin
    td_seen.push_back(longint'(td));
    ph_seen.push_back(int'(phase_addr));
  end

  // Independent evaluation of the acquisition rule on the observed TDs, in
  // floating point: Max/Second of the coarse values, circular midpoint i_c,
  // offset = floor(clamp(2 - d(max;sec)/d(c;sec), 0, 2) * M/(4L)) towards Max.
  function automatic int expected_final();
    int bi, si, imx, isc, cd, icx, off;
    real r, den;
    bi = 0;
    for (int k = 1; k < int'(L_SECTIONS); k++) if (td_seen[k] > td_seen[bi]) bi = k;
    si = (bi == 0) ? 1 : 0;
    for (int k = 0; k < int'(L_SECTIONS); k++) if (k != bi && td_seen[k] > td_seen[si]) si = k;
    imx = ph_seen[bi];
    isc = ph_seen[si];
    cd = (imx - isc + M) % M;
    if (cd >= M / 2) cd = cd - M;
    icx = (isc + int'($floor(real'(cd) / 2.0)) + M) % M;
    den = real'(td_seen[L_SECTIONS] - td_seen[si]);
    r = (den <= 0.0) ? 2.0 : real'(td_seen[bi] - td_seen[si]) / den;
    if (r > 2.0) r = 2.0;
    off = int'($floor((2.0 - r) * real'(M) / real'(4 * L_SECTIONS)));
    return (icx + ((cd > 0) ? off : -off) + M) % M;
  endfunction
  always @(posedge clk_1x) if (rst_n) begin
    if (td_valid) n_td++;
    if (trk_step) n_steps++;
  end

  function automatic real cerr(real a, real b);
    real d = a - b;
    while (d > real'(M) / 2.0) d = d - real'(M);
    while (d < -real'(M) / 2.0) d = d + real'(M);
    return d;
  endfunction

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ------------------------------------------------------------ packets
  int max_trk [6];
  int steps_pp [6];
  initial begin
    automatic real ppms [6] = '{-400.0, -200.0, -50.0, 50.0, 200.0, 400.0};
    automatic real taus [2] = '{0.18, 0.66};
    // the baseband clock is generated from clk2x and stops during reset, so
    // the asynchronous reset needs a falling edge of its own
    #1  rst_n = 1'b0;
    #40 rst_n = 1'b1;
    repeat (20) @(posedge clk_1x);
    foreach (ppms[pi]) begin
      max_trk[pi] = 0;
      steps_pp[pi] = 0;
      foreach (taus[ti]) begin
        int td0, det_cyc, max_err_trk, st0;
        real pc, e, drift, ptrack, e0;
        ppm = ppms[pi];
        tau = taus[ti];
        td0 = n_td;
        st0 = n_steps;
        td_seen.delete();
        ph_seen.delete();
        @(negedge clk_1x); pkt_det = 1'b1; det_cyc = cyc;
        @(negedge clk_1x); pkt_det = 1'b0;
        n_pkts++;
        fork
          begin wait (acq_done); end
          begin repeat (2000) @(posedge clk_1x); end
        join_any
        disable fork;
        @(negedge clk_1x);
        pc = coherent_phase(t_rise);
        e  = cerr(real'(phase_addr), pc);
        $display("%0.0f ppm, tau %0.2f: i_max %0d i_second %0d i_c %0d offset %0d dir %0d -> phase %0d, coherent %0.1f (error %0.1f)",
                 ppm, tau, i_max, i_second, i_c, interp_offset, offset_dir, phase_addr, pc, e);
        chk(state == ST_TRACK, "acquisition finished");
        chk(n_td - td0 == int'(L_SECTIONS) + 1, "four timing detections per acquisition");
        chk(cyc - det_cyc == (N + 4) + 1 + int'(L_SECTIONS) * 3 * N + int'(td_window(N_PRE))
                             + 3 + (FRAC_W + 3) + 2,
            "acquisition cycle count");
        begin
          int ef, dd;
          ef = expected_final();
          dd = (int'(phase_addr) - ef + M) % M;
          chk(dd <= 1 || dd >= M - 1, $sformatf("final phase %0d, rule gives %0d", phase_addr, ef));
        end
        chk(e <= real'(MAX_ERR) && e >= -real'(MAX_ERR), "acquired phase near the coherent phase");
        // ---- data symbols with pilots
        drift  = (offset_dir ? 1.0 : -1.0) * ((ppm < 0.0) ? -ppm : ppm) * 1.0e-6
                 * real'(SYM) * real'(M);
        ptrack = real'(phase_addr) - e;
        e0 = (e < 0.0) ? -e : e;
        max_err_trk = 0;
        for (int s = 0; s < NSYM; s++) begin
          real pe, ff;
          repeat (SYM - int'(N_PILOTS)) @(negedge clk_1x);
          ptrack = ptrack + drift;
          pe = cerr(real'(phase_addr), ptrack);
          if ($rtoi((pe < 0.0) ? -pe : pe) > max_err_trk) max_err_trk = $rtoi((pe < 0.0) ? -pe : pe);
          ff = ((pe < 0.0) ? -pe : pe) / real'(M);
          for (int k = 0; k < int'(N_PILOTS); k++) begin
            pilot_valid = 1'b1;
            pilot_td = TDW'(longint'(1.0e6 * ((1.0 - ff) * (1.0 - ff) + ff * ff)) + longint'($urandom_range(200)));
            @(negedge clk_1x);
          end
          pilot_valid = 1'b0;
        end
        chk(real'(max_err_trk) <= e0 + 3.0, "tracking keeps the phase error bounded");
        if (max_err_trk > max_trk[pi]) max_trk[pi] = max_err_trk;
        steps_pp[pi] += n_steps - st0;
      end
      $display("  %0.0f ppm: drift %0.2f phases per symbol, %0d tracking steps in %0d symbols, largest tracking error %0d",
               ppms[pi], ((ppms[pi] < 0.0) ? -ppms[pi] : ppms[pi]) * 1.0e-6 * real'(SYM) * real'(M),
               steps_pp[pi], 2 * NSYM, max_trk[pi]);
    end
    // a larger offset needs more tracking steps
    chk(steps_pp[5] > steps_pp[4] && steps_pp[4] > steps_pp[3], "steps grow with the offset");
    chk(steps_pp[0] > steps_pp[1] && steps_pp[1] > steps_pp[2], "steps grow with the offset (negative)");
    chk(n_pkts == 12, "packets");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #4000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
