// Control unit of the prescaler fractional divider.
//
// For every output cycle of the prescaler it decides whether the next cycle
// divides by N (sel_o = SEL_N) or by N+1 (sel_o = SEL_N1). It is a first-order
// fraction accumulator: on each divider output pulse (in1_i from ÷N, in2_i
// from ÷N+1) fnum_i is added to the accumulator; when the sum reaches fden_i,
// fden_i is subtracted and the next cycle uses N+1. Out of every fden_i
// cycles fnum_i use N+1, so the DCO-to-output ratio averages N + fnum/fden.
// fden_i = 0 means integer division. sel_o is registered and changes in the
// clock after the output pulse. The accumulator is this design's choice of
// how to pick N or N+1. Synchronous active-low reset.
module pfd_control_unit
  import tdtl_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     in1_i,
  input  logic     in2_i,
  input  frac_t    fnum_i,
  input  frac_t    fden_i,
  output div_sel_e sel_o
);

  frac_t          acc_q;
  logic [FW:0]    sum;

  assign sum = {1'b0, acc_q} + {1'b0, fnum_i};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q <= '0;
      sel_o <= SEL_N;
    end else if (in1_i || in2_i) begin
      if (fden_i == '0) begin
        acc_q <= '0;
        sel_o <= SEL_N;
      end else if (sum >= {1'b0, fden_i}) begin
        acc_q <= FW'(sum - {1'b0, fden_i});
        sel_o <= SEL_N1;
      end else begin
        acc_q <= FW'(sum);
        sel_o <= SEL_N;
      end
    end
  end

endmodule
