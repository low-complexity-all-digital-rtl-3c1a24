`timescale 1ns / 1ps
// tb_adscd_top: end-to-end test of the sample clock dither at its default
// sizes (32 phases, 3 sections, 16-sample preamble, 8-bit A/D).
//
// Channel and A/D model: the transmitter repeats the 16-sample BPSK short
// preamble with a symbol period that differs from the receiver's by PPM,
// with a hidden timing offset TAU (in samples) that changes per packet. The
// waveform between symbol points is linear, so a sample taken a fraction f
// of a symbol off the symbol points mixes neighbours by (1-f, f). The A/D
// model samples this waveform at each rising edge of the design's adc_clk
// (its real time stamp is used, so the phase chosen by the clock generator
// really moves the sampling instant), adds a little noise, and hands the
// 8-bit I/Q result to the baseband 1.25 ns later.
//
// For each packet the test checks that acquisition ends after exactly four
// timing detections and the expected number of cycles, at the phase that an
// independent floating-point evaluation of the acquisition rule gives for
// the TD values seen (within one phase, for rounding), and within MAX_ERR
// phases of the coherent one (the phase whose sampling instant falls on the
// symbol points at that time). It then plays OFDM data symbols of 80 samples, each carrying 4
// pilot TD values that fall with the distance between the applied phase and
// the drifting coherent phase (drift direction taken equal to the acquired
// offset direction), and checks that tracking steps keep the phase error
// bounded. It counts each mechanism: coarse and fine detections, the
// interpolated offset being zero and non-zero, both offset directions, the
// wrap-around case of the circular average, tracking steps and tracking
// decisions without a step; a mechanism that never happened is a failure.
module tb_adscd_top;
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
  real ppm = 400.0;
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
  int n_td = 0, n_interp_zero = 0, n_interp_nonzero = 0, n_dir_pos = 0, n_dir_neg = 0;
  int n_wrap = 0, n_steps = 0, n_nosteps = 0, n_pkts = 0;
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
    if (trk_valid && !trk_adjust && state == ST_TRACK) n_nosteps++;
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
  initial begin
    automatic real taus [6] = '{0.07, 0.23, 0.41, 0.58, 0.76, 0.93};
    // the baseband clock is generated from clk2x and stops during reset, so
    // the asynchronous reset needs a falling edge of its own
    #1  rst_n = 1'b0;
    #40 rst_n = 1'b1;
    repeat (20) @(posedge clk_1x);
    foreach (taus[pk]) begin
      int td0, det_cyc, max_err_trk;
      real pc, e, drift, ptrack, e0;
      tau = taus[pk];
      td0 = n_td;
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
      $display("packet %0d: tau %0.2f i_max %0d i_second %0d i_c %0d offset %0d dir %0d -> phase %0d, coherent %0.1f (error %0.1f), %0d cycles",
               pk, tau, i_max, i_second, i_c, interp_offset, offset_dir, phase_addr, pc, e, cyc - det_cyc);
      chk(state == ST_TRACK, "acquisition finished");
      chk(n_td - td0 == int'(L_SECTIONS) + 1, "four timing detections per acquisition");
      // settle (N+4) and the first start, three slots of 3N samples, the last
      // window, result and decision cycles, interpolator (FRAC+3), acq_done
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
      if (interp_offset == 0) n_interp_zero++; else n_interp_nonzero++;
      if (offset_dir) n_dir_pos++; else n_dir_neg++;
      if (int'(i_max) - int'(i_second) > M / 2 || int'(i_second) - int'(i_max) > M / 2) n_wrap++;
      // ---- data symbols with pilots; drift of 400 ppm in the offset direction
      drift  = (offset_dir ? 1.0 : -1.0) * ppm * 1.0e-6 * real'(SYM) * real'(M);
      ptrack = real'(phase_addr) - e;    // coherent phase now
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
      $display("  tracking: largest phase error %0d, steps so far %0d", max_err_trk, n_steps);
    end
    // mechanisms
    chk(n_pkts == 6, "packets");
    chk(n_interp_zero > 0, "interpolated offset zero at least once");
    chk(n_interp_nonzero > 0, "interpolated offset non-zero at least once");
    chk(n_dir_pos > 0 && n_dir_neg > 0, "both offset directions");
    chk(n_wrap > 0, "circular average across phase 0");
    chk(n_steps > 0, "tracking steps");
    chk(n_nosteps > 0, "tracking decisions without a step");
    $display("mechanisms: detections %0d, offset zero %0d non-zero %0d, dir +%0d -%0d, wrap %0d, steps %0d, no-steps %0d",
             n_td, n_interp_zero, n_interp_nonzero, n_dir_pos, n_dir_neg, n_wrap, n_steps, n_nosteps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
