// Testbench of time_delay: random samples go in; dout must equal the sample
// from exactly DELAY clocks earlier, and 0 for the first DELAY clocks after
// reset.
module tb_time_delay;
  import tdtl_pkg::*;
  localparam int DELAY = 64;  // the default of time_delay
  logic clk = 1'b0, rst_n = 1'b0;
  sample_t din, dout;
  sample_t hist [4096];
  int checks = 0, failures = 0;

  time_delay dut (.clk, .rst_n, .din, .dout);
  always #5 clk = ~clk;

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      din = sample_t'($urandom);
      hist[t] = din;
      #1;
      checks++;
      if (t < DELAY) begin
        if (dout !== '0) begin failures++; $display("FAIL t=%0d dout=%0d expected 0", t, dout); end
      end else if (dout !== hist[t - DELAY]) begin
        failures++; $display("FAIL t=%0d dout=%0d expected %0d", t, dout, hist[t - DELAY]);
      end
      @(posedge clk); #1;
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
