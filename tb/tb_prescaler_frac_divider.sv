// Testbench of prescaler_frac_divider: a regular DCO pulse train drives the
// divider for several N.f settings. Every output cycle must last N or N+1
// input pulses, as shown by sel_o, R1 or R2 must mark it, and over 10 * fden
// output cycles (after the first one after reset) the input pulses must total 10 * (N * fden + fnum), giving
// the ratio of equation (16).
module tb_prescaler_frac_divider;
  import tdtl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic f_out_i = 1'b0, f_s_o, r1_o, r2_o;
  divf_t n_i = 4, cnt1_o, cnt2_o;
  frac_t fnum_i = '0, fden_i = '0;
  div_sel_e sel_o;
  int checks = 0, failures = 0;

  prescaler_frac_divider dut (.clk, .rst_n, .f_out_i, .n_i, .fnum_i, .fden_i,
                              .f_s_o, .r1_o, .r2_o, .cnt1_o, .cnt2_o, .sel_o);
  always #5 clk = ~clk;

  task automatic run(input int n, input int fnum, input int fden);
    int pulses, cyc, total, cycles;
    div_sel_e s;
    rst_n = 1'b0;
    n_i = divf_t'(n); fnum_i = frac_t'(fnum); fden_i = frac_t'(fden);
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    cycles = 10 * ((fden == 0) ? 1 : fden);
    total = 0;
    for (int k = 0; k <= cycles; k++) begin
      s = sel_o;
      cyc = 0;
      do begin
        f_out_i = 1'b1;
        #1;
        cyc++;
        pulses = f_s_o;
        if (f_s_o) begin
          checks++;
          if ((s == SEL_N && !(r1_o && !r2_o)) || (s == SEL_N1 && !(r2_o && !r1_o))) begin
            failures++; $display("FAIL R1/R2 do not match selection");
          end
        end
        @(posedge clk); #1;
        f_out_i = 1'b0;
        repeat ($urandom_range(4, 1)) @(posedge clk);
        #1;
      end while (!pulses && cyc < 100);
      checks++;
      if (cyc != ((s == SEL_N) ? n : n + 1)) begin
        failures++; $display("FAIL N=%0d cycle of %0d pulses with sel=%0d", n, cyc, s);
      end
      if (k > 0) total += cyc;
    end
    checks++;
    if (total != 10 * (n * ((fden == 0) ? 1 : fden) + fnum)) begin
      failures++; $display("FAIL N=%0d f=%0d/%0d total %0d", n, fnum, fden, total);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(4, 0, 0);
    run(3, 1, 2);
    run(3, 4, 5);
    run(2, 1, 14);
    run(1, 0, 0);
    run(17, 5, 9);
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
