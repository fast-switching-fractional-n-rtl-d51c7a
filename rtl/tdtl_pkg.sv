// Shared types, widths and constant functions of the TDTL fractional-N
// frequency synthesizer.
//
// Number formats used throughout the loop:
//   * samples   : signed DW-bit two's complement, one input sample per clock.
//   * phase     : signed PW-bit binary angle, 2^PW corresponds to 2*pi, so
//                 the mod-2*pi wrap of the phase detector is plain overflow.
//   * ticks     : signed TW-bit fixed point with CF fraction bits, a time in
//                 master-clock periods (used for the DCO period and the
//                 filter output c(k)).
//   * loop gain : unsigned KW-bit, KF fraction bits (K1 = 1.0 is 1 << KF).
// All widths are this design's choices; the loop itself is defined in
// continuous terms only.
package tdtl_pkg;

  localparam int DW = 12;  // input sample width
  localparam int PW = 16;  // phase width, binary angle
  localparam int KW = 16;  // loop gain width
  localparam int KF = 12;  // loop gain fraction bits
  localparam int TW = 32;  // tick quantity width
  localparam int CF = 16;  // tick quantity fraction bits
  localparam int NW = 5;   // division factor width (N and N+1 up to 31)
  localparam int FW = 8;   // fraction numerator / denominator width
  localparam int RF = 20;  // fraction bits of the reciprocal 1/D

  typedef logic signed [DW-1:0] sample_t;
  typedef logic signed [PW-1:0] phase_t;
  typedef logic signed [TW-1:0] tick_t;
  typedef logic        [KW-1:0] gain_t;
  typedef logic        [NW-1:0] divf_t;
  typedef logic        [FW-1:0] frac_t;
  typedef logic        [RF+1:0] recip_t;

  // Which divider of the prescaler is active for the current output cycle.
  typedef enum logic {SEL_N = 1'b0, SEL_N1 = 1'b1} div_sel_e;

  localparam tick_t TICK_ONE = tick_t'(1) <<< CF;
  localparam gain_t K1_ONE   = gain_t'(1) << KF;

  // Reciprocal table: entry d holds round(2^RF / d), entry 0 holds 2^RF
  // (d = 0 is treated as d = 1). It is filled at elaboration, so in hardware
  // recip() is a 2^NW-entry constant lookup, not a divider.
  typedef recip_t recip_lut_t [2**NW];

  function automatic recip_lut_t make_recip_lut();
    recip_lut_t t;
    for (int d = 0; d < 2**NW; d++)
      t[d] = recip_t'(((2 ** (RF + 1)) / ((d == 0) ? 1 : d) + 1) / 2);
    return t;
  endfunction

  localparam recip_lut_t RECIP_LUT = make_recip_lut();

  function automatic recip_t recip(input divf_t d);
    return RECIP_LUT[d];
  endfunction

  // CORDIC elementary angles atan(2^-i) as 32-bit binary angles,
  // round(atan(2^-i) / (2*pi) * 2^32).
  function automatic logic [31:0] atan_bam32(input int i);
    case (i)
      0:  return 32'd536870912;
      1:  return 32'd316933406;
      2:  return 32'd167458907;
      3:  return 32'd85004756;
      4:  return 32'd42667331;
      5:  return 32'd21354465;
      6:  return 32'd10679838;
      7:  return 32'd5340245;
      8:  return 32'd2670163;
      9:  return 32'd1335087;
      10: return 32'd667544;
      11: return 32'd333772;
      12: return 32'd166886;
      13: return 32'd83443;
      14: return 32'd41722;
      15: return 32'd20861;
      16: return 32'd10430;
      17: return 32'd5215;
      18: return 32'd2608;
      19: return 32'd1304;
      default: return 32'd0;
    endcase
  endfunction

  // Elementary angle i rounded to PW bits.
  function automatic phase_t atan_bam(input int i);
    logic [32:0] r;
    r = {1'b0, atan_bam32(i)} + (33'd1 << (32 - PW - 1));
    return phase_t'(r >> (32 - PW));
  endfunction

endpackage
