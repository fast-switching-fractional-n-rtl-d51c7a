// Sample and hold (Sampler 1 / Sampler 2 of the TDTL).
//
// On the clock edge where the sampling pulse sample_i is high, d_i is
// captured; q_o holds it until the next pulse. valid_o is a one-clock pulse
// in the cycle after the capture, when q_o carries the new sample, and is
// used to start the phase detector. Sampling at a clock edge is this
// design's reading of a sampler on a clocked sample stream.
// Synchronous active-low reset clears the held value.
module sample_hold
  import tdtl_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    sample_i,
  input  sample_t d_i,
  output sample_t q_o,
  output logic    valid_o
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_o     <= '0;
      valid_o <= 1'b0;
    end else begin
      valid_o <= sample_i;
      if (sample_i) q_o <= d_i;
    end
  end

endmodule
