// Digitally controlled oscillator of the TDTL with period adaptation.
//
// Each DCO period lasts (T0 - c) / D clock ticks, where c (c_i) is the
// filter output already divided by D and D (adapt_i) is the adapting signal
// of the register-based adaptation: the free-running period is T0 / D, so D
// DCO periods make up one nominal sampling period T0. With D = 1 this is
// T(k) = T0 - c(k-1) of the plain TDTL.
//
// The period is a fixed-point tick count (CF fraction bits). An accumulator
// gains one tick per clock; when it reaches the period the DCO fires and the
// accumulator keeps the remainder, so fractional periods are exact on
// average. The period is read at every comparison, so a new c or D applies
// to the period in progress. pulse_o is a registered one-clock pulse.
// The period is clamped to MIN_PERIOD ticks. Realising the DCO as a tick
// accumulator, the clamp and the reset are this design's choices.
module dco
  import tdtl_pkg::*;
#(
  parameter int unsigned T0         = 256,
  parameter int unsigned MIN_PERIOD = 2
) (
  input  logic  clk,
  input  logic  rst_n,
  input  tick_t c_i,
  input  divf_t adapt_i,
  output logic  pulse_o
);

  localparam tick_t MIN_P = tick_t'(MIN_PERIOD) <<< CF;

  tick_t              nominal;
  tick_t              period;
  tick_t              acc_q;
  tick_t              acc_inc;
  logic signed [63:0] nom_w;

  always_comb begin
    nom_w   = (64'(T0) * 64'(recip(adapt_i))) <<< CF;
    nominal = tick_t'(nom_w >>> RF);
    period  = nominal - c_i;
    if (period < MIN_P) period = MIN_P;
    acc_inc = acc_q + TICK_ONE;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc_q   <= '0;
      pulse_o <= 1'b0;
    end else if (acc_inc >= period) begin
      acc_q   <= acc_inc - period;
      pulse_o <= 1'b1;
    end else begin
      acc_q   <= acc_inc;
      pulse_o <= 1'b0;
    end
  end

endmodule
