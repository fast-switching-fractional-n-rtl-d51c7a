// Pulse divider used as the ÷N and ÷N+1 stages of the prescaler.
//
// Counts the pulses routed to it (en_i) and fires pulse_o on the mod_i-th
// one, in the same clock as that input pulse, then starts again. count_o is
// the number of pulses of the running cycle including the present one, so
// in the clock where pulse_o is high it equals the division actually made;
// the adaptation registers capture it there. The two dividers and their use
// as load pulses follow the published design; the counter itself, and firing
// in the same clock as the last input pulse, are this design's choices. A new modulus applies to the
// cycle in progress; a modulus of 0 acts as 1. Synchronous active-low reset.
module mod_divider
  import tdtl_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en_i,
  input  divf_t mod_i,
  output logic  pulse_o,
  output divf_t count_o
);

  divf_t cnt_q;

  assign count_o = cnt_q + 1'b1;
  assign pulse_o = en_i && (count_o >= mod_i);

  always_ff @(posedge clk) begin
    if (!rst_n)       cnt_q <= '0;
    else if (pulse_o) cnt_q <= '0;
    else if (en_i)    cnt_q <= count_o;
  end

endmodule
