// Time delay of the TDTL: dout is din from DELAY clock cycles earlier.
//
// The loop needs a copy of the input that lags it by tau, so that the two
// samplers see y(t) and x(t) = y(t - tau); the nominal lag psi_o = omega_o*tau
// is pi/2. Here the input is a clocked sample stream and the delay is a
// circular buffer of DELAY words: each clock the oldest word is presented
// on dout (asynchronous read) and overwritten by din. With the default
// DELAY = 64 and a nominal sampling period of 256 clocks the lag is pi/2.
// Building the delay from a buffer, and clearing it at reset, is this
// design's choice. Synchronous active-low reset.
module time_delay
  import tdtl_pkg::*;
#(
  parameter int unsigned DELAY = 64
) (
  input  logic    clk,
  input  logic    rst_n,
  input  sample_t din,
  output sample_t dout
);

  localparam int unsigned AW = (DELAY > 1) ? $clog2(DELAY) : 1;

  sample_t         buf_q [DELAY];
  logic [AW-1:0]   ptr_q;

  assign dout = buf_q[ptr_q];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr_q <= '0;
      for (int i = 0; i < int'(DELAY); i++) buf_q[i] <= '0;
    end else begin
      buf_q[ptr_q] <= din;
      ptr_q        <= (ptr_q == AW'(DELAY - 1)) ? '0 : ptr_q + 1'b1;
    end
  end

endmodule
