// tb_agc: drives the AGC with a quadrature tone (I = A cos, Q = A sin at
// 0.02 of the input rate) at a weak and then a strong level. Checks: the
// decimated stream has one sample per DECIM inputs, 3 clocks after the
// kept input; after settling the output envelope is near the reference
// level for both input levels; the gain for the strong input is smaller by
// about the level ratio; and a tone at fs/2 is suppressed by the LPF
// relative to the in-band tone.
module tb_agc;
  import costas_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int DECIM = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t in_i = '0, in_q = '0, out_i, out_q;
  logic [15:0] gain;
  int checks = 0, failures = 0;

  agc #(.DECIM(DECIM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int nin = 0, nout = 0, last_in_cyc = -100, cyc = 0, lat_bad = 0;
  int peak = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && (nin % DECIM == 0)) last_in_cyc <= cyc;
    if (in_valid) nin <= nin + 1;
    if (out_valid) begin
      nout <= nout + 1;
      if (cyc - last_in_cyc != 3) lat_bad <= lat_bad + 1;
      if (out_i > peak) peak <= out_i;
      if (-out_i > peak) peak <= -out_i;
    end
  end

  task automatic drive(real amp, real f, int n);
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = 1;
      in_i = sample_t'($rtoi(amp * $cos(2.0 * PI * f * real'(k))));
      in_q = sample_t'($rtoi(amp * $sin(2.0 * PI * f * real'(k))));
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    int g_weak, g_strong, p_weak, p_strong, p_nyq, n0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    drive(1500.0, 0.02, 20000);
    peak = 0; drive(1500.0, 0.02, 2000); p_weak = peak; g_weak = int'(gain);
    drive(15000.0, 0.02, 20000);
    peak = 0; drive(15000.0, 0.02, 2000); p_strong = peak; g_strong = int'(gain);
    // same gain, tone at fs/2 through the LPF
    n0 = nout;
    drive(15000.0, 0.5, 400);
    peak = 0; drive(15000.0, 0.5, 400); p_nyq = peak;
    repeat (5) @(negedge clk);
    $display("weak: peak=%0d gain=%0d  strong: peak=%0d gain=%0d  nyquist peak=%0d",
             p_weak, g_weak, p_strong, g_strong, p_nyq);
    checks += 6;
    if (p_weak < 6500 || p_weak > 10000) begin failures++; $display("FAIL weak level"); end
    if (p_strong < 6500 || p_strong > 10000) begin failures++; $display("FAIL strong level"); end
    if (g_weak < 8 * g_strong || g_weak > 12 * g_strong) begin failures++; $display("FAIL gain ratio"); end
    if (p_nyq > p_strong / 10) begin failures++; $display("FAIL fs/2 not suppressed"); end
    if (nout != (nin + DECIM - 1) / DECIM) begin failures++; $display("FAIL count %0d %0d", nout, nin); end
    if (lat_bad != 0) begin failures++; $display("FAIL latency %0d", lat_bad); end
    if (n0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
