// Digital filter of the first-order TDTL with gain adaptation.
//
// The first-order loop filter is a gain: c(k) = G * e(k). The gain is set
// through the normalised loop gain K1 = G * omega_o (k1_i, Q4.12), so with
// the phase error in binary angle units (2^PW = 2*pi) the correction in
// clock ticks is c = K1 * T0 * e / 2^PW. c_full_o holds that value.
//
// The register-based adaptation divides the gain by the division factor D
// currently used by the prescaler (adapt_i): c_o = c_full_o / D, so that the
// D DCO periods between two samples together move by c(k). The division is
// a multiplication by a rounded reciprocal 2^RF / D and is combinational on
// the registered c_full_o, so a new D takes effect at once.
// Timing: c_full_o and valid_o are registered one clock after valid_i.
// The fixed-point formats and the reciprocal are this design's choices.
// Synchronous active-low reset.
module digital_filter
  import tdtl_pkg::*;
#(
  parameter int unsigned T0 = 256
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid_i,
  input  phase_t e_i,
  input  gain_t  k1_i,
  input  divf_t  adapt_i,
  output logic   valid_o,
  output tick_t  c_full_o,
  output tick_t  c_o
);

  localparam int SH = KF + PW - CF;

  logic signed [63:0] prod;
  tick_t              scaled;

  always_comb begin
    prod   = 64'(e_i) * $signed({1'b0, k1_i}) * $signed(64'(T0));
    scaled = tick_t'(prod >>> SH);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o  <= 1'b0;
      c_full_o <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) c_full_o <= scaled;
    end
  end

  logic signed [63:0] adapted;
  always_comb begin
    adapted = 64'(c_full_o) * $signed({1'b0, recip(adapt_i)});
    c_o     = tick_t'(adapted >>> RF);
  end

endmodule
