// Testbench of digital_filter: random phase errors, loop gains and division
// factors. c_full_o must equal K1 * T0 * e / 2pi ticks (e in radians) and
// c_o must equal that divided by D, both compared in real arithmetic, with
// c_full_o registered one clock after valid_i.
module tb_digital_filter;
  import tdtl_pkg::*;
  localparam int T0 = 256;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_i = 1'b0, valid_o;
  phase_t e_i = '0;
  gain_t k1_i = '0;
  divf_t adapt_i = 1;
  tick_t c_full_o, c_o;
  int checks = 0, failures = 0;

  digital_filter dut (.clk, .rst_n, .valid_i, .e_i, .k1_i, .adapt_i, .valid_o, .c_full_o, .c_o);
  always #5 clk = ~clk;

  initial begin
    real k1, erad, cref, cfull, cadapt;
    int  d;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      e_i = phase_t'($urandom);
      k1_i = gain_t'($urandom_range(16000));
      d = $urandom_range(31, 1);
      adapt_i = divf_t'(d);
      valid_i = 1'b1;
      @(posedge clk); #1;
      valid_i = 1'b0;
      k1 = real'(k1_i) / 4096.0;
      erad = real'(int'(e_i)) / 65536.0 * 2.0 * 3.14159265358979;
      cref = k1 / (2.0 * 3.14159265358979 / T0) * erad;   // G * e with G = K1 / omega_o
      cfull = real'(c_full_o) / 65536.0;
      cadapt = real'(c_o) / 65536.0;
      checks++;
      if (!valid_o || cfull - cref > 1.0e-4 || cref - cfull > 1.0e-4) begin
        failures++; $display("FAIL c_full %f ref %f", cfull, cref);
      end
      checks++;
      if (cadapt - cref / d > 2.0e-3 || cref / d - cadapt > 2.0e-3) begin
        failures++; $display("FAIL c %f ref %f D=%0d", cadapt, cref / d, d);
      end
      @(posedge clk); #1;
      checks++;
      if (valid_o) begin failures++; $display("FAIL valid held"); end
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
