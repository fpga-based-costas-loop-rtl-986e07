// tb_lpf_iir1: self-checking test of the first-order IIR low-pass.
// Checks, against a bit-exact integer model of
//   y[n] = b*(x[n]+x[n-1]) + a*y[n-1] (Q1.15 coefficients, 16 fraction bits),
// random inputs sample by sample with a one-clock latency; then the
// filter's response: unit DC gain, strong attenuation at fs/2.
module tb_lpf_iir1;
  import costas_pkg::*;
  localparam int B = 5249, A = 22269;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t x = '0, y;
  int checks = 0, failures = 0;

  lpf_iir1 #(.B(B), .A(A)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint m_acc = 0, m_xp = 0;
  function automatic int model(int xi);
    longint nx, r;
    nx = 2 * B * (longint'(xi) + m_xp) + ((A * m_acc) >>> 15);
    m_acc = longint'(int'(nx));
    m_xp = xi;
    r = (nx + 32768) >>> 16;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  task automatic push(int xi, output int yexp);
    yexp = model(xi);
    @(negedge clk); x = sample_t'(xi); in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || int'(y) != yexp) begin
      failures++;
      $display("FAIL x=%0d y=%0d exp=%0d valid=%0b", xi, y, yexp, out_valid);
    end
  endtask

  initial begin
    int e, ymax;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) push(int'($urandom_range(0, 40000)) - 20000, e);
    // DC gain of one: a constant input settles to itself
    for (int n = 0; n < 200; n++) push(12000, e);
    checks++;
    if (y < 11990 || y > 12010) begin failures++; $display("FAIL DC y=%0d", y); end
    // fs/2 is removed by the zero at z = -1
    ymax = 0;
    for (int n = 0; n < 200; n++) begin
      push((n % 2 == 0) ? 12000 : -12000, e);
      if (n > 150 && (y > ymax || -y > ymax)) ymax = (y > 0) ? y : -y;
    end
    checks++;
    if (ymax > 600) begin failures++; $display("FAIL fs/2 residue %0d", ymax); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
