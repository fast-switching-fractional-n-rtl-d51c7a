// Testbench of phase_error_detector: sample pairs of random angle and
// amplitude (and the four axis directions) are applied; e_o must equal the
// real-valued atan2(x, y), wrapped to [-pi, pi), within 8 binary-angle units
// (0.044 degrees), one clock after valid_i.
module tb_phase_error_detector;
  import tdtl_pkg::*;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0;
  logic valid_i = 1'b0, valid_o;
  sample_t x_i = '0, y_i = '0;
  phase_t e_o;
  int checks = 0, failures = 0;

  phase_error_detector dut (.clk, .rst_n, .valid_i, .x_i, .y_i, .valid_o, .e_o);
  always #5 clk = ~clk;

  task automatic apply(input int x, input int y);
    real ref_bam, d;
    x_i = sample_t'(x); y_i = sample_t'(y); valid_i = 1'b1;
    @(posedge clk); #1;
    valid_i = 1'b0;
    ref_bam = $atan2(real'(x), real'(y)) / (2.0 * PI) * 65536.0;
    d = real'(int'(e_o)) - ref_bam;
    if (d > 32768.0) d -= 65536.0;
    if (d < -32768.0) d += 65536.0;
    checks++;
    if (!valid_o || d > 8.0 || d < -8.0) begin
      failures++; $display("FAIL x=%0d y=%0d e=%0d ref=%f valid=%0d", x, y, e_o, ref_bam, valid_o);
    end
    @(posedge clk); #1;
    checks++;
    if (valid_o) begin failures++; $display("FAIL valid held"); end
  endtask

  initial begin
    real a, r;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    apply(0, 1800); apply(1800, 0); apply(0, -1800); apply(-1800, 0);
    apply(1273, 1273); apply(-1273, -1273);
    for (int i = 0; i < 2000; i++) begin
      a = ($itor($urandom_range(100000)) / 100000.0 - 0.5) * 2.0 * PI;
      r = 200.0 + $itor($urandom_range(1800));
      apply($rtoi(r * $sin(a)), $rtoi(r * $cos(a)));
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
