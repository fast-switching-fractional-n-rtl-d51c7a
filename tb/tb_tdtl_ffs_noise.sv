// Noise workload of the TDTL fractional-N synthesizer: mean square phase
// error against the size of the input frequency step (steps 0.1 to 0.5),
// with and without additive noise on the input, at division ratio 3.8 with
// register-based adaptation and default parameters.
//
// For every step the loop is reset at W = 1, settles, gets the step, and the
// MSE of e(k) about its theoretical steady-state value (T0 - T_in)/(K1*T0)
// turns is taken over the 40 samples that follow (in rad^2). The noise is
// white Gaussian (Box-Muller from $urandom) with standard deviation NOISE,
// about 23 dB SNR for the sine amplitude used; its level is this
// testbench's choice. Checks: the loop is locked at the end of
// every run, the noise-free MSE grows with the step, and the noise adds to
// the MSE summed over all steps without making it explode.
module tb_tdtl_ffs_noise;
  import tdtl_pkg::*;

  localparam int  T0    = 256;
  localparam real AMP   = 1800.0;
  localparam real NOISE = 87.0;   // noise standard deviation
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

  real t_in = 256.0, ph = 0.0, noise_amp = 0.0;
  function automatic real gauss();
    real u1, u2;
    u1 = ($itor($urandom_range(999999)) + 1.0) / 1000001.0;
    u2 = $itor($urandom_range(999999)) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  always @(posedge clk) begin
    ph <= rst_n ? ph + 1.0 / t_in : 0.0;  // same input phase in every run
    y_in <= sample_t'($rtoi(AMP * $sin(2.0 * PI * ph) + noise_amp * gauss()));
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

  task automatic run(input real step, input real noise, output real mse);
    int  k0;
    real tin, ess, d, per;
    rst_n = 1'b0;
    noise_amp = noise; t_in = T0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    ns = 0; ne = 0;
    wait_samples(40);
    tin = T0 / (1.0 + step);
    t_in = tin;
    k0 = ne;
    wait_samples(60);
    ess = (T0 - tin) / T0 * 2.0 * PI;
    mse = 0.0;
    for (int i = k0; i < k0 + 40; i++) begin
      d = $itor(ev[i]) / 65536.0 * 2.0 * PI - ess;
      mse += d * d;
    end
    mse = mse / 40.0;
    per = $itor(ts[ns - 1] - ts[ns - 21]) / 20.0;
    check(per > tin - 0.5 && per < tin + 0.5, $sformatf("step %f noise %f: locked (period %f, input %f)", step, noise, per, tin));
  endtask

  initial begin
    real clean [5];
    real noisy [5];
    real sc, sn;
    for (int i = 0; i < 5; i++) begin
      run(0.1 * (i + 1), 0.0, clean[i]);
      run(0.1 * (i + 1), NOISE, noisy[i]);
      $display("step %0.1f: MSE without noise %e, with noise %e (rad^2)", 0.1 * (i + 1), clean[i], noisy[i]);
    end
    sc = 0.0; sn = 0.0;
    for (int i = 0; i < 5; i++) begin
      sc += clean[i]; sn += noisy[i];
      if (i > 0) check(clean[i] > clean[i - 1], $sformatf("noise-free MSE grows from step %0d to %0d", i, i + 1));
    end
    check(sn > sc, "noise raises the total MSE");
    check(sn < 2.0 * sc + 0.1, "noise MSE stays bounded");
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
