// tb_level_detector: checks the level detector against an integer model of
// the envelope average and gain integrator for random I/Q inputs, then
// checks the direction of regulation: a weak signal raises the gain, a
// strong one lowers it, and the gain stays within [1, 65535].
module tb_level_detector;
  import costas_pkg::*;
  localparam int REF = 8192, LDS = 6, GS = 6;
  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t in_i = '0, in_q = '0;
  logic [15:0] gain, level;
  int checks = 0, failures = 0;

  level_detector #(.REF_LEVEL(REF), .LD_SHIFT(LDS), .G_SHIFT(GS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int m_lvl = 0, m_gain = 4096;
  task automatic one(int ii, int qq);
    int ai, aq, mx, mn, nl, ng;
    ai = (ii < 0) ? -ii : ii;
    aq = (qq < 0) ? -qq : qq;
    mx = (ai > aq) ? ai : aq;
    mn = (ai > aq) ? aq : ai;
    nl = m_lvl + ((mx + (mn >>> 1) - m_lvl) >>> LDS);
    ng = m_gain + ((REF - m_lvl) >>> GS);
    m_lvl  = (nl > 65535) ? 65535 : (nl < 0 ? 0 : nl);
    m_gain = (ng > 65535) ? 65535 : (ng < 1 ? 1 : ng);
    @(negedge clk); in_i = sample_t'(ii); in_q = sample_t'(qq); in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (int'(level) != m_lvl || int'(gain) != m_gain) begin
      failures++;
      $display("FAIL level=%0d/%0d gain=%0d/%0d", level, m_lvl, gain, m_gain);
    end
  endtask

  initial begin
    int g0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++)
      one(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 65535)) - 32768);
    g0 = m_gain;
    for (int n = 0; n < 3000; n++) one(1000, -500);    // weak: gain rises
    checks++;
    if (!(int'(gain) > g0)) begin failures++; $display("FAIL gain did not rise"); end
    g0 = int'(gain);
    for (int n = 0; n < 6000; n++) one(30000, 30000);  // strong: gain falls
    checks++;
    if (!(int'(gain) < g0) || gain == 0) begin failures++; $display("FAIL gain did not fall"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
