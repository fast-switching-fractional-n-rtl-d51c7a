// Testbench of pfd_control_unit: output pulses are fed in, alternating
// between In1 and In2 as the unit selects. For each fraction fnum/fden, over
// a whole number of fden-cycle periods (after the first cycle after reset) exactly fnum of every fden cycles
// must use N+1, and the N+1 cycles must be spread as evenly as possible
// (at most one more N+1 in any window of fden cycles than fnum).
module tb_pfd_control_unit;
  import tdtl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic in1_i = 1'b0, in2_i = 1'b0;
  frac_t fnum_i = '0, fden_i = '0;
  div_sel_e sel_o;
  int checks = 0, failures = 0;
  int hist [4096];

  pfd_control_unit dut (.clk, .rst_n, .in1_i, .in2_i, .fnum_i, .fden_i, .sel_o);
  always #5 clk = ~clk;

  task automatic run(input int fnum, input int fden);
    int n1, w;
    rst_n = 1'b0;
    fnum_i = frac_t'(fnum); fden_i = frac_t'(fden);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k <= 10 * ((fden == 0) ? 1 : fden); k++) begin
      hist[k] = (sel_o == SEL_N1);
      in1_i = (sel_o == SEL_N); in2_i = (sel_o == SEL_N1);
      @(posedge clk); #1;
      in1_i = 1'b0; in2_i = 1'b0;
      repeat ($urandom_range(3)) @(posedge clk);
      #1;
    end
    n1 = 0;
    for (int k = 1; k <= 10 * ((fden == 0) ? 1 : fden); k++) n1 += hist[k];
    checks++;
    if (n1 != 10 * fnum) begin failures++; $display("FAIL %0d/%0d: %0d N+1 cycles, expected %0d", fnum, fden, n1, 10 * fnum); end
    if (fden > 0) begin
      for (int s = 0; s + fden <= 10 * fden; s++) begin
        w = 0;
        for (int k = s; k < s + fden; k++) w += hist[k];
        checks++;
        if (w < fnum - 1 || w > fnum + 1) begin failures++; $display("FAIL %0d/%0d window %0d has %0d", fnum, fden, s, w); end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(0, 0);
    run(0, 1);
    run(1, 2);
    run(4, 5);
    run(1, 14);
    run(13, 14);
    run(100, 255);
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
