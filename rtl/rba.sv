// Register-based adaptation (RBA) of the TDTL fractional-N synthesizer.
//
// Register 1 stores the division made by the ÷N divider, loaded by its
// output pulse R1; Register 2 stores that of the ÷N+1 divider, loaded by R2.
// A MUX, steered by the control unit's selection, puts the value of the
// divider in use on adapt_o. This adapting signal D goes to the DCO (free
// running period T0/D) and to the digital filter (gain divided by D), which
// keeps the sampling loop at its pre-division operating point.
// At reset the registers are loaded with N and N+1. When adapt_en_i is 0
// the adapting signal is 1, i.e. the divider works without adaptation.
// What the registers hold and the reset load are this design's reading of
// "the division outputs of dividers N and N+1". Synchronous active-low reset.
module rba
  import tdtl_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     r1_i,
  input  logic     r2_i,
  input  divf_t    cnt1_i,
  input  divf_t    cnt2_i,
  input  div_sel_e sel_i,
  input  divf_t    n_i,
  input  logic     adapt_en_i,
  output divf_t    adapt_o
);

  divf_t reg1_q, reg2_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      reg1_q <= n_i;
      reg2_q <= n_i + 1'b1;
    end else begin
      if (r1_i) reg1_q <= cnt1_i;
      if (r2_i) reg2_q <= cnt2_i;
    end
  end

  always_comb begin
    if (!adapt_en_i)          adapt_o = divf_t'(1);
    else if (sel_i == SEL_N)  adapt_o = reg1_q;
    else                      adapt_o = reg2_q;
  end

endmodule
