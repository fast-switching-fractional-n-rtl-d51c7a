// Testbench of rba: checks the reset load (N, N+1), that Register 1 and 2
// load the counts on R1 and R2 only, that the MUX follows the selection,
// and that disabling adaptation gives an adapting signal of 1.
module tb_rba;
  import tdtl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic r1_i = 1'b0, r2_i = 1'b0, adapt_en_i = 1'b1;
  divf_t cnt1_i = '0, cnt2_i = '0, n_i = 4, adapt_o;
  div_sel_e sel_i = SEL_N;
  int checks = 0, failures = 0;
  int m1, m2;

  rba dut (.clk, .rst_n, .r1_i, .r2_i, .cnt1_i, .cnt2_i, .sel_i, .n_i, .adapt_en_i, .adapt_o);
  always #5 clk = ~clk;

  task automatic expect_out(input int v, input string what);
    checks++;
    if (int'(adapt_o) != v) begin failures++; $display("FAIL %s: adapt=%0d expected %0d", what, adapt_o, v); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    sel_i = SEL_N;  #1 expect_out(4, "reset reg1");
    sel_i = SEL_N1; #1 expect_out(5, "reset reg2");
    m1 = 4; m2 = 5;
    for (int t = 0; t < 2000; t++) begin
      cnt1_i = divf_t'($urandom); cnt2_i = divf_t'($urandom);
      r1_i = ($urandom_range(3) == 0); r2_i = ($urandom_range(3) == 0);
      sel_i = div_sel_e'($urandom_range(1));
      adapt_en_i = ($urandom_range(7) != 0);
      @(posedge clk);
      if (r1_i) m1 = int'(cnt1_i);
      if (r2_i) m2 = int'(cnt2_i);
      #1;
      r1_i = 1'b0; r2_i = 1'b0;
      #1;
      expect_out(!adapt_en_i ? 1 : (sel_i == SEL_N) ? m1 : m2, "after load");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
