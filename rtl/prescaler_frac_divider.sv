// Prescaler fractional divider (PFD): divides the DCO pulse train by N.f.
//
// A DeMUX routes each DCO pulse (f_out_i) to the ÷N or the ÷N+1 divider as
// chosen by the control unit. Both divider outputs go to the control unit
// (In1, In2) and to a MUX, whose output is the sampling pulse f_s_o. The
// divider outputs are also the register load pulses R1 and R2 of the
// adaptation, and the divider counts (cnt1_o, cnt2_o) are the values those
// registers store. With fnum/fden from the control unit the average ratio is
// N + fnum/fden. f_s_o fires in the same clock as the DCO pulse that ends a
// cycle; the selection for the next cycle follows one clock later.
// The block structure follows the published block diagram; the counting details are
// this design's choices. Assertions check that only one divider fires at a
// time and that the settings are legal (N >= 1, fnum < fden unless fden = 0).
// Synchronous active-low reset.
module prescaler_frac_divider
  import tdtl_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     f_out_i,
  input  divf_t    n_i,
  input  frac_t    fnum_i,
  input  frac_t    fden_i,
  output logic     f_s_o,
  output logic     r1_o,
  output logic     r2_o,
  output divf_t    cnt1_o,
  output divf_t    cnt2_o,
  output div_sel_e sel_o
);

  logic en1, en2;

  // DeMUX
  assign en1 = f_out_i && (sel_o == SEL_N);
  assign en2 = f_out_i && (sel_o == SEL_N1);

  mod_divider u_div_n (
    .clk, .rst_n, .en_i(en1), .mod_i(n_i), .pulse_o(r1_o), .count_o(cnt1_o)
  );

  mod_divider u_div_n1 (
    .clk, .rst_n, .en_i(en2), .mod_i(n_i + 1'b1), .pulse_o(r2_o), .count_o(cnt2_o)
  );

  pfd_control_unit u_ctrl (
    .clk, .rst_n, .in1_i(r1_o), .in2_i(r2_o), .fnum_i, .fden_i, .sel_o
  );

  // MUX
  assign f_s_o = (sel_o == SEL_N) ? r1_o : r2_o;

  // Only the selected divider receives pulses, so at most one fires.
  a_one_divider: assert property (@(posedge clk) disable iff (!rst_n) !(r1_o && r2_o));
  // Settings: N >= 1 and a proper fraction.
  a_settings: assert property (@(posedge clk) disable iff (!rst_n)
                               n_i != '0 && (fden_i == '0 || fnum_i < fden_i));

endmodule
