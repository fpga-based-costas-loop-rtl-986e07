// tb_pd_atan: checks the arctangent phase detector against the real-valued
// atan(Q/I) folded into [-90, +90] degrees (scale pi = 2^15), over random
// vectors of random magnitude, within a small CORDIC error. Also checks
// that the output is the same for a vector and its negation (data sign
// removed) and the one-clock latency.
module tb_pd_atan;
  import costas_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t i_in = '0, q_in = '0, phase;
  int checks = 0, failures = 0;

  pd_atan dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int ii, int qq);
    real ang, e;
    if (ii == 0) ang = (qq >= 0) ? PI / 2 : -PI / 2;
    else         ang = $atan(real'(qq) / real'(ii));
    @(negedge clk); i_in = sample_t'(ii); q_in = sample_t'(qq); in_valid = 1;
    @(negedge clk); in_valid = 0;
    e = real'(phase) - ang * 32768.0 / PI;
    // +-90 degrees are the same point of the folded range
    if (e > 16000.0) e = e - 32768.0;
    if (e < -16000.0) e = e + 32768.0;
    checks++;
    if (!out_valid || e > 6.0 || e < -6.0) begin
      failures++;
      $display("FAIL i=%0d q=%0d phase=%0d exp=%0f", ii, qq, phase, ang * 32768.0 / PI);
    end
  endtask

  initial begin
    real r, th;
    sample_t p0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      r  = 200.0 + real'($urandom_range(0, 32000));
      th = 2.0 * PI * real'($urandom_range(0, 9999)) / 10000.0;
      one($rtoi(r * $cos(th)), $rtoi(r * $sin(th)));
    end
    one(10000, 10000);   // +45 degrees = 8192
    p0 = phase;
    one(-10000, -10000); // negated vector, same angle
    checks++;
    if (phase != p0) begin failures++; $display("FAIL fold %0d vs %0d", phase, p0); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
