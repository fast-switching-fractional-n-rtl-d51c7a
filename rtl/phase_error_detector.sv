// Phase error detector of the TDTL: e(k) = f[atan(x(k) / y(k))].
//
// The detector takes the four-quadrant arctangent of the sample pair, with
// the delayed-path sample x(k) as the numerator and the direct-path sample
// y(k) as the denominator, and wraps the result into [-pi, pi). With a
// lag of pi/2 between the two paths this equals the phase error phi(k).
//
// Implementation (this design's choice): a fully unrolled vectoring CORDIC.
// The vector (y, x) is first turned by pi into the right half plane when
// y < 0, then ITER micro-rotations drive its imaginary part to zero while
// the elementary angles atan(2^-i) are summed. The phase is a PW-bit binary
// angle, so the wrap is ordinary two's-complement overflow. The CORDIC is
// combinational; e_o and valid_o are registered, one clock after valid_i.
// Synchronous active-low reset.
module phase_error_detector
  import tdtl_pkg::*;
#(
  parameter int unsigned ITER = 14
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    valid_i,
  input  sample_t x_i,
  input  sample_t y_i,
  output logic    valid_o,
  output phase_t  e_o
);

  // GB guard bits below the input LSB keep the micro-rotation truncation
  // small; 2 bits above give room for the CORDIC gain (about 1.65) on a
  // vector of length sqrt(2).
  localparam int GB = 6;
  localparam int VW = DW + 2 + GB;
  typedef logic signed [VW-1:0] vec_t;

  vec_t   re [ITER+1];
  vec_t   im [ITER+1];
  phase_t ang [ITER+1];

  always_comb begin
    // Left half plane: rotate by pi.
    if (y_i < 0) begin
      re[0]  = -(vec_t'(y_i) <<< GB);
      im[0]  = -(vec_t'(x_i) <<< GB);
      ang[0] = phase_t'(1) <<< (PW - 1);
    end else begin
      re[0]  = vec_t'(y_i) <<< GB;
      im[0]  = vec_t'(x_i) <<< GB;
      ang[0] = '0;
    end
    for (int i = 0; i < int'(ITER); i++) begin
      if (im[i] >= 0) begin
        re[i+1]  = re[i] + (im[i] >>> i);
        im[i+1]  = im[i] - (re[i] >>> i);
        ang[i+1] = ang[i] + atan_bam(i);
      end else begin
        re[i+1]  = re[i] - (im[i] >>> i);
        im[i+1]  = im[i] + (re[i] >>> i);
        ang[i+1] = ang[i] - atan_bam(i);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid_o <= 1'b0;
      e_o     <= '0;
    end else begin
      valid_o <= valid_i;
      if (valid_i) e_o <= ang[ITER];
    end
  end

endmodule
