// Testbench of dco: for several corrections c and adapting signals D the
// DCO runs for many periods; every pulse interval must be the floor or
// ceiling of (T0/D - c) clocks and the mean interval must match it within
// 0.01 clock. The clamp at MIN_PERIOD is also checked.
module tb_dco;
  import tdtl_pkg::*;
  localparam int T0 = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  tick_t c_i = '0;
  divf_t adapt_i = 1;
  logic pulse_o;
  int checks = 0, failures = 0;

  dco dut (.clk, .rst_n, .c_i, .adapt_i, .pulse_o);
  always #5 clk = ~clk;

  task automatic run(input real c, input int d);
    real    p;
    longint t = 0, first = -1, last = -1, prev = -1;
    int     np = 0;
    bit     bad = 0;
    c_i = tick_t'($rtoi(c * 65536.0));
    adapt_i = divf_t'(d);
    p = real'(T0) / d - c;
    if (p < 2.0) p = 2.0;
    // let the new setting take over
    repeat (2 * T0) @(posedge clk);
    while (np < 200) begin
      @(posedge clk); #1;
      t++;
      if (pulse_o) begin
        if (prev >= 0 && (real'(t - prev) < p - 1.0001 || real'(t - prev) > p + 1.0001)) bad = 1;
        if (first < 0) first = t;
        last = t; prev = t; np++;
      end
    end
    checks++;
    if (bad) begin failures++; $display("FAIL interval outside floor/ceil of %f", p); end
    checks++;
    if (real'(last - first) / (np - 1) - p > 0.01 || p - real'(last - first) / (np - 1) > 0.01) begin
      failures++; $display("FAIL mean period %f expected %f (c=%f D=%0d)", real'(last - first) / (np - 1), p, c, d);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    run(0.0, 1);
    run(10.5, 1);
    run(-73.25, 1);
    run(0.0, 4);
    run(3.1, 4);
    run(-5.0, 3);
    run(1.0, 7);
    run(20.0, 2);
    run(200.0, 1);   // clamped to MIN_PERIOD
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
