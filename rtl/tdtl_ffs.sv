// TDTL fractional-N frequency synthesizer (top level).
//
// A time-delay digital tanlock loop (TDTL) locks the sampling instants to
// the input y: the input and a copy delayed by TAU are sampled at each
// sampling pulse f_s, the phase error detector turns the pair into the
// phase error e(k) = atan2(x(k), y(k)), the first-order filter scales it to a
// period correction c(k), and the DCO shortens or lengthens its period by it.
// For synthesis the sampling pulse is not the DCO output itself: the DCO
// output f_out goes through a prescaler fractional divider (÷N / ÷N+1,
// average N.f), and a register-based adaptation feeds the division factor D
// in use back to the DCO (free-running period T0/D) and to the filter (gain
// divided by D). The loop therefore keeps its pre-division lock point while
// f_out runs at (N.f) times the input frequency.
//
// Clocking: one master clock; one input sample per clock. At the defaults
// the free-running sampling period is T0 = 256 clocks and the delay is
// TAU = 64 clocks (pi/2). Latency from a sampling pulse to the new DCO
// correction: 3 clocks (sampler, phase detector, filter register).
// The loop structure follows the published TDTL-FFS architecture; widths, the clock-tick time base
// and the exact form of the adaptation are this design's choices.
// Synchronous active-low reset.
module tdtl_ffs
  import tdtl_pkg::*;
#(
  parameter int unsigned T0          = 256,
  parameter int unsigned TAU         = T0 / 4,
  parameter int unsigned CORDIC_ITER = 14
) (
  input  logic     clk,
  input  logic     rst_n,
  input  sample_t  y_i,
  input  divf_t    n_i,
  input  frac_t    fnum_i,
  input  frac_t    fden_i,
  input  gain_t    k1_i,
  input  logic     adapt_en_i,
  output logic     f_out_o,
  output logic     f_s_o,
  output phase_t   e_o,
  output logic     e_valid_o,
  output tick_t    c_o,
  output tick_t    c_full_o,
  output logic     c_valid_o,
  output sample_t  x_k_o,
  output sample_t  y_k_o,
  output divf_t    adapt_o,
  output div_sel_e sel_o
);

  sample_t x_t;
  logic    x_valid, y_valid;
  logic    r1, r2;
  divf_t   cnt1, cnt2;

  time_delay #(.DELAY(TAU)) u_delay (
    .clk, .rst_n, .din(y_i), .dout(x_t)
  );

  sample_hold u_sampler1 (
    .clk, .rst_n, .sample_i(f_s_o), .d_i(x_t), .q_o(x_k_o), .valid_o(x_valid)
  );

  sample_hold u_sampler2 (
    .clk, .rst_n, .sample_i(f_s_o), .d_i(y_i), .q_o(y_k_o), .valid_o(y_valid)
  );

  phase_error_detector #(.ITER(CORDIC_ITER)) u_ped (
    .clk, .rst_n, .valid_i(x_valid && y_valid), .x_i(x_k_o), .y_i(y_k_o),
    .valid_o(e_valid_o), .e_o
  );

  digital_filter #(.T0(T0)) u_filter (
    .clk, .rst_n, .valid_i(e_valid_o), .e_i(e_o), .k1_i, .adapt_i(adapt_o),
    .valid_o(c_valid_o), .c_full_o, .c_o
  );

  dco #(.T0(T0)) u_dco (
    .clk, .rst_n, .c_i(c_o), .adapt_i(adapt_o), .pulse_o(f_out_o)
  );

  prescaler_frac_divider u_pfd (
    .clk, .rst_n, .f_out_i(f_out_o), .n_i, .fnum_i, .fden_i,
    .f_s_o, .r1_o(r1), .r2_o(r2), .cnt1_o(cnt1), .cnt2_o(cnt2), .sel_o
  );

  rba u_rba (
    .clk, .rst_n, .r1_i(r1), .r2_i(r2), .cnt1_i(cnt1), .cnt2_i(cnt2),
    .sel_i(sel_o), .n_i, .adapt_en_i, .adapt_o
  );

endmodule
