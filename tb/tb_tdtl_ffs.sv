// End-to-end testbench of the TDTL fractional-N synthesizer at its default
// parameters (T0 = 256 clocks, TAU = 64 clocks).
//
// A sine of programmable period T_in (clocks) drives the loop. Each case
// resets the loop at W = 1 (T_in = T0), lets it settle, applies an input
// frequency step and checks, over a window of samples at the end:
//   * lock: the mean sampling period equals T_in and e(k) stays steady;
//   * the steady-state error: a first-order loop settles where its period
//     correction c = T0 - T_in, i.e. e = (T0 - T_in) / (K1 * T0) turns;
//   * the division: DCO pulses per window = window * N + window * fnum/fden;
//   * relock speed: e(k) settles within a few samples of the step.
// The case with adaptation switched off must lose lock. A final case changes
// the division ratio while running. Mechanism counters (N+1 cycles, register
// loads, phase wrap, relock, lost lock, ratio change) must all be non-zero.
module tb_tdtl_ffs;
  import tdtl_pkg::*;

  localparam int    T0   = 256;
  localparam real   AMP  = 1800.0;
  localparam real   PI   = 3.14159265358979;
  localparam int    MAXS = 512;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  sample_t  y_in;
  divf_t    n_in;
  frac_t    fnum_in, fden_in;
  gain_t    k1_in;
  logic     adapt_en;
  logic     f_out, f_s, e_valid, c_valid;
  phase_t   e;
  tick_t    c, c_full;
  sample_t  xk, yk;
  divf_t    adapt;
  div_sel_e sel;

  tdtl_ffs dut (
    .clk, .rst_n, .y_i(y_in), .n_i(n_in), .fnum_i(fnum_in), .fden_i(fden_in),
    .k1_i(k1_in), .adapt_en_i(adapt_en), .f_out_o(f_out), .f_s_o(f_s),
    .e_o(e), .e_valid_o(e_valid), .c_o(c), .c_full_o(c_full), .c_valid_o(c_valid),
    .x_k_o(xk), .y_k_o(yk), .adapt_o(adapt), .sel_o(sel)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // ---------------- input signal ----------------
  real t_in = 256.0;  // input period in clocks
  real ph   = 0.0;    // input phase in cycles
  real noise_amp = 0.0;
  always @(posedge clk) begin
    ph <= ph + 1.0 / t_in;
    y_in <= sample_t'($rtoi(AMP * $sin(2.0 * PI * ph) + noise_amp * ($itor($urandom_range(2000)) / 1000.0 - 1.0)));
  end

  // ---------------- monitors ----------------
  longint tick = 0;
  longint ts [MAXS];       // clock count at each sampling pulse
  longint nout [MAXS];     // DCO pulses counted up to each sampling pulse
  int     ev [MAXS];       // e(k) values
  int     ns = 0, ne = 0;
  longint nout_cnt = 0;
  int     cnt_sel_n1 = 0, cnt_r1 = 0, cnt_r2 = 0, cnt_wrap = 0;
  int     cnt_relock = 0, cnt_lost = 0, cnt_ratio_change = 0, cnt_noadapt = 0;
  int     prev_e = 0;

  always @(posedge clk) begin
    tick <= tick + 1;
    if (rst_n) begin
      if (f_out) nout_cnt = nout_cnt + 1;
      if (f_s) begin
        if (ns < MAXS) begin
          ts[ns] = tick;
          nout[ns] = nout_cnt;
        end
        ns = ns + 1;
        if (sel == SEL_N1) cnt_sel_n1++;
      end
      if (dut.u_pfd.r1_o) cnt_r1++;
      if (dut.u_pfd.r2_o) cnt_r2++;
      if (e_valid) begin
        if (ne < MAXS) ev[ne] = int'(e);
        if (ne > 0 && ((int'(e) - prev_e) > 32768 || (prev_e - int'(e)) > 32768)) cnt_wrap++;
        prev_e = int'(e);
        ne = ne + 1;
      end
    end
  end

  task automatic wait_samples(input int k);
    int target;
    target = ns + k;
    while (ns < target) @(posedge clk);
  endtask

  // Measures the last L samples. Returns lock status.
  function automatic bit measure(input int L, input real tin, input int n, input int fnum, input int fden,
                                 input bit expect_lock, input string name);
    real    per, emean, e_exp, ratio_exp;
    int     emin, emax, a, b;
    longint dco_pulses;
    bit     locked;
    b = ns - 1; a = b - L;
    per = $itor(ts[b] - ts[a]) / L;
    emin = 1 << 30; emax = -(1 << 30); emean = 0.0;
    for (int i = ne - L; i < ne; i++) begin
      emean += ev[i];
      if (ev[i] < emin) emin = ev[i];
      if (ev[i] > emax) emax = ev[i];
    end
    emean = emean / L;
    locked = (per > tin - 0.25) && (per < tin + 0.25) && (emax - emin < 1024);
    $display("%s: period %f (input %f) e mean %f spread %0d locked %0d", name, per, tin, emean, emax - emin, locked);
    if (expect_lock) begin
      check(locked, {name, ": lock"});
      e_exp = (T0 - tin) / T0 * 65536.0 * 4096.0 / $itor(k1_in);
      check(emean > e_exp - 400.0 && emean < e_exp + 400.0, $sformatf("%s: steady-state e %f expected %f", name, emean, e_exp));
      dco_pulses = nout[b] - nout[a];
      ratio_exp = (fden == 0) ? $itor(n * L) : $itor(n * L + fnum * L / fden);
      check(dco_pulses == longint'(ratio_exp), $sformatf("%s: DCO pulses %0d expected %f", name, dco_pulses, ratio_exp));
      // output frequency relative to the input: (N.f) f_ref
      check(fabs($itor(dco_pulses) / $itor(ts[b] - ts[a]) * tin - ratio_exp / L) < 0.01,
            {name, ": f_out / f_ref"});
    end else begin
      check(!locked, {name, ": expected loss of lock"});
      if (!locked) cnt_lost++;
    end
    return locked;
  endfunction

  // Samples after sample index k0 until e stays within 512 (two clock ticks of phase) of its final mean.
  function automatic int settle_samples(input int k0);
    real fin;
    int  last_bad;
    fin = 0.0;
    for (int i = ne - 10; i < ne; i++) fin += ev[i];
    fin = fin / 10.0;
    last_bad = k0;
    for (int i = k0; i < ne; i++)
      if (fabs(ev[i] - fin) > 512.0) last_bad = i + 1;
    return last_bad - k0;
  endfunction

  task automatic start_case(input int n, input int fnum, input int fden, input bit adapt_on, input real tin0);
    rst_n = 1'b0;
    n_in = divf_t'(n); fnum_in = frac_t'(fnum); fden_in = frac_t'(fden);
    adapt_en = adapt_on; k1_in = K1_ONE; t_in = tin0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    ns = 0; ne = 0; nout_cnt = 0;
  endtask

  task automatic step_case(input string name, input int n, input int fnum, input int fden,
                           input bit adapt_on, input real tin1, input bit expect_lock);
    int k0, s;
    int L;
    bit lk;
    L = (fden > 1) ? fden * ((20 + fden - 1) / fden) : 20;
    start_case(n, fnum, fden, adapt_on, real'(T0));
    wait_samples(40);
    if (expect_lock) lk = measure(L, real'(T0), n, fnum, fden, 1'b1, {name, " before step"});
    k0 = ne;
    t_in = tin1;
    wait_samples(80);
    lk = measure(L, tin1, n, fnum, fden, expect_lock, {name, " after step"});
    if (expect_lock) begin
      s = settle_samples(k0);
      $display("%s: settled %0d samples after the step", name, s);
      check(s <= 12, $sformatf("%s: relock within 12 samples (took %0d)", name, s));
      if (s <= 12) cnt_relock++;
    end else cnt_noadapt++;
  endtask

  initial begin
    real t_pos, t_neg;
    int  k0, s;
    bit  lk;
    t_pos = T0 / 1.4;    // positive frequency step of 0.4, W = 0.71
    t_neg = T0 * 1.42;   // negative frequency step, W = 1.42
    n_in = 1; fnum_in = 0; fden_in = 0; k1_in = K1_ONE; adapt_en = 1'b1;

    step_case("TDTL +0.4",            1, 0, 0,  1'b1, t_pos, 1'b1);
    step_case("TDTL W=1.42",          1, 0, 0,  1'b1, t_neg, 1'b1);
    step_case("div 4 RBA +0.4",       4, 0, 0,  1'b1, t_pos, 1'b1);
    step_case("div 4 no adaptation",  4, 0, 0,  1'b0, t_pos, 1'b0);
    step_case("div 3.5 +0.4",         3, 1, 2,  1'b1, t_pos, 1'b1);
    step_case("div 3.8 W=1.42",       3, 4, 5,  1'b1, t_neg, 1'b1);
    step_case("div 2.0714285 +0.4",   2, 1, 14, 1'b1, t_pos, 1'b1);

    // Change of division ratio while running: 4 -> 3.8.
    start_case(4, 0, 0, 1'b1, real'(T0));
    wait_samples(40);
    k0 = ne;
    n_in = 3; fnum_in = 4; fden_in = 5;
    cnt_ratio_change++;
    wait_samples(60);
    lk = measure(20, real'(T0), 3, 4, 5, 1'b1, "ratio 4 -> 3.8");
    s = settle_samples(k0);
    $display("ratio change: settled %0d samples", s);
    check(s <= 12, "ratio change: relock within 12 samples");

    // Every mechanism must have happened.
    $display("mechanisms: N+1 cycles %0d, R1 %0d, R2 %0d, phase wraps %0d, relocks %0d, lost lock %0d, no-adaptation runs %0d, ratio changes %0d",
             cnt_sel_n1, cnt_r1, cnt_r2, cnt_wrap, cnt_relock, cnt_lost, cnt_noadapt, cnt_ratio_change);
    check(cnt_sel_n1 > 0, "N+1 division used");
    check(cnt_r1 > 0, "register 1 loaded");
    check(cnt_r2 > 0, "register 2 loaded");
    check(cnt_wrap > 0, "phase detector wrap");
    check(cnt_relock > 0, "relock after step");
    check(cnt_lost > 0, "loss of lock without adaptation");
    check(cnt_noadapt > 0, "no-adaptation run");
    check(cnt_ratio_change > 0, "ratio change");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
