// Testbench of sample_hold: random data and random sampling pulses; q_o must
// show the value present at the last pulse, and valid_o must follow each
// pulse by one clock.
module tb_sample_hold;
  import tdtl_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic sample_i = 1'b0, valid_o;
  sample_t d_i = '0, q_o;
  sample_t model = '0;
  logic    vmodel = 1'b0;
  int checks = 0, failures = 0;

  sample_hold dut (.clk, .rst_n, .sample_i, .d_i, .q_o, .valid_o);
  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (q_o !== '0 || valid_o !== 1'b0) begin failures++; $display("FAIL after reset"); end
    for (int t = 0; t < 3000; t++) begin
      d_i = sample_t'($urandom);
      sample_i = ($urandom_range(9) == 0);
      @(posedge clk);
      vmodel = sample_i;
      if (sample_i) model = d_i;
      #1;
      checks++;
      if (q_o !== model || valid_o !== vmodel) begin
        failures++; $display("FAIL t=%0d q=%0d/%0d v=%0d/%0d", t, q_o, model, valid_o, vmodel);
      end
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
