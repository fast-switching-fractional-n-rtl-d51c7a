// Testbench of mod_divider: random input pulses with several moduli; an
// independent counter predicts when pulse_o fires (on every mod-th input
// pulse, in the same clock) and what count_o shows.
module tb_mod_divider;
  import tdtl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic en_i = 1'b0, pulse_o;
  divf_t mod_i = 4, count_o;
  int checks = 0, failures = 0;
  int seen = 0;

  mod_divider dut (.clk, .rst_n, .en_i, .mod_i, .pulse_o, .count_o);
  always #5 clk = ~clk;

  initial begin
    int m;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int blk = 0; blk < 12; blk++) begin
      m = (blk == 0) ? 1 : $urandom_range(31, 2);
      mod_i = divf_t'(m);
      seen = 0;
      for (int t = 0; t < 400; t++) begin
        en_i = ($urandom_range(2) == 0);
        #1;
        checks++;
        if (pulse_o !== (en_i && (seen + 1 == m)) || (en_i && count_o !== divf_t'(seen + 1))) begin
          failures++; $display("FAIL m=%0d seen=%0d en=%0d pulse=%0d count=%0d", m, seen, en_i, pulse_o, count_o);
        end
        @(posedge clk);
        if (en_i) seen = (seen + 1 == m) ? 0 : seen + 1;
        #1;
      end
      // finish the running cycle before the modulus changes
      en_i = 1'b1;
      while (seen != 0) begin @(posedge clk); seen = (seen + 1 == m) ? 0 : seen + 1; #1; end
      en_i = 1'b0;
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
