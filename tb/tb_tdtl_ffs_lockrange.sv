// Lock-range workload of the TDTL fractional-N synthesizer at ratio 3.8 with
// register-based adaptation and default parameters.
//
// The first-order TDTL with a pi/2 delay holds lock only where its loop gain
// K1 and frequency ratio W = omega_o/omega satisfy, on the lower side,
// 2|1 - W| < K1 (the upper side bends with the delay's phase shift). For a
// set of (W, K1) points well inside and well outside that region, the loop is
// reset at W = 1, the input is stepped to W, and lock is judged from the
// mean sampling period (within 0.5 clock of the input period) and a steady
// phase error over the last 20 samples. Because the adaptation keeps the
// sampling loop identical to the undivided TDTL, the synthesizer must show
// the TDTL's own lock region.
module tb_tdtl_ffs_lockrange;
  import tdtl_pkg::*;

  localparam int  T0    = 256;
  localparam real AMP   = 1800.0;
  localparam real PI    = 3.14159265358979;

  logic     clk = 1'b0;
  logic     rst_n = 1'b0;
  sample_t  y_in;
  divf_t    n_in = 3;
  frac_t    fnum_in = 4, fden_in = 5;
  gain_t    k1_in = K1_ONE;
  logic     adapt_en = 1'b1;
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
  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  real t_in = 256.0, ph = 0.0, noise_amp = 0.0;  // noise-free
  always @(posedge clk) begin
    ph <= ph + 1.0 / t_in;
    y_in <= sample_t'($rtoi(AMP * $sin(2.0 * PI * ph)
                            + noise_amp * ($itor($urandom_range(2000)) / 1000.0 - 1.0)));
  end

  longint tick = 0;
  longint ts [512];
  int     ev [512];
  int     ns = 0, ne = 0;
  always @(posedge clk) begin
    tick <= tick + 1;
    if (rst_n) begin
      if (f_s) begin
        if (ns < 512) ts[ns] = tick;
        ns = ns + 1;
      end
      if (e_valid) begin
        if (ne < 512) ev[ne] = int'(e);
        ne = ne + 1;
      end
    end
  end

  task automatic wait_samples(input int k);
    int target;
    target = ns + k;
    while (ns < target) @(posedge clk);
  endtask

  int n_locked = 0, n_unlocked = 0;

  task automatic point(input real w, input real k1, input bit expect_lock);
    real tin, per;
    int  emin, emax;
    bit  locked;
    rst_n = 1'b0;
    k1_in = gain_t'($rtoi(k1 * 4096.0));
    t_in = T0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    ns = 0; ne = 0;
    wait_samples(40);
    tin = T0 * w;
    t_in = tin;
    wait_samples(150);
    per = $itor(ts[ns - 1] - ts[ns - 21]) / 20.0;
    emin = 1 << 30; emax = -(1 << 30);
    for (int i = ne - 20; i < ne; i++) begin
      if (ev[i] < emin) emin = ev[i];
      if (ev[i] > emax) emax = ev[i];
    end
    locked = per > tin - 0.5 && per < tin + 0.5 && (emax - emin) < 2048;
    $display("W=%0.2f K1=%0.2f: period %0.2f (input %0.2f), e spread %0d, locked %0d (expected %0d)",
             w, k1, per, tin, emax - emin, locked, expect_lock);
    check(locked == expect_lock, $sformatf("W=%0.2f K1=%0.2f lock %0d expected %0d", w, k1, locked, expect_lock));
    if (locked) n_locked++; else n_unlocked++;
  endtask

  initial begin
    point(1.00, 1.0, 1'b1);   // optimum point
    point(0.71, 1.0, 1'b1);   // step +0.4
    point(1.42, 1.0, 1'b1);   // W = 1.42
    point(0.60, 1.0, 1'b1);
    point(1.20, 0.6, 1'b1);   // 2|1-W| = 0.4 < 0.6
    point(1.40, 0.6, 1'b0);   // 2|1-W| = 0.8 > 0.6
    point(1.60, 1.0, 1'b0);   // 2|1-W| = 1.2 > 1
    point(1.60, 1.5, 1'b1);   // 2|1-W| = 1.2 < 1.5
    point(1.00, 2.5, 1'b0);   // above the upper bound (gain too high)
    check(n_locked > 0 && n_unlocked > 0, "both lock and loss of lock seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
