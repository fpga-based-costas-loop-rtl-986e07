// tb_costas_demod_top: end-to-end test of the BPSK demodulator at its
// default parameters. The testbench plays the IF mixer: it produces
//   I = a*d*cos(w n + phi) + noise,  Q = a*d*sin(w n + phi) + noise
// at the input rate (one sample per clock), where w carries the NCO centre
// (1/4 of the loop rate) plus a Doppler offset, d is random BPSK data at
// 32 loop samples (128 input samples) per symbol, and the noise is
// Gaussian. Each case resets the design and runs 150 symbols; part way
// through, the amplitude steps up or down by 10x (a fade).
//
// Checks per case: the mean NCO frequency word after lock matches the
// received carrier within 0.1% of the loop rate; the symbols after the
// lock-in interval are recovered (up to the BPSK 180-degree ambiguity)
// with at most 1% errors; the AGC output level returns near its
// reference after the fade; lock (integrator frequency,
// averaged over a symbol, within 0.3% of the loop rate for good) is reached within 30 symbols, and
// the lock time is reported. Counted
// mechanisms, each of which must occur: AGC gain raised and lowered, AGC
// multiplier saturation (right after an upward fade), decimation (4 inputs
// per loop sample), the NCO's two-read cycle, the arctangent detector's
// half-plane fold (negative I arm), and a loop-filter frequency pull of
// more than 1% of the loop rate.
module tb_costas_demod_top;
  import costas_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  SPS_LOOP = 32;
  localparam int  DEC = 4;
  localparam int  NSYM = 150;
  localparam int  LOCK_SYM = 30;

  logic clk = 0, rst_n = 0, in_valid = 0;
  sample_t in_i = '0, in_q = '0;
  fcw_t fcw_nominal = 32'h4000_0000;
  logic [15:0] agc_gain;
  sample_t agc_q, i_arm, q_arm, phase_err;
  logic data_valid, data_bit;
  fcw_t fcw;
  int checks = 0, failures = 0;

  costas_demod_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters (observed inside the design) ----
  int n_gain_up = 0, n_gain_down = 0, n_sat = 0, n_loop = 0, n_in = 0;
  int n_nco_reads = 0, n_fold = 0, n_pull = 0;
  logic [15:0] gain_d = '0;
  always @(posedge clk) if (rst_n) begin
    gain_d <= agc_gain;
    if (agc_gain > gain_d && gain_d != 0) n_gain_up++;
    if (agc_gain < gain_d) n_gain_down++;
    if (dut.u_agc.scl_valid &&
        (dut.u_agc.scl_i == SAMPLE_MAX || dut.u_agc.scl_i == SAMPLE_MIN)) n_sat++;
    if (in_valid) n_in++;
    if (dut.u_costas.u_nco.u_ctrl.done) n_nco_reads++;
    if (dut.u_costas.u_pd3.in_valid && dut.u_costas.u_pd3.i_in < 0) n_fold++;
    if (dut.u_costas.u_lf.out_valid) begin
      if ($signed(dut.u_costas.lf_freq) > 42949673 || $signed(dut.u_costas.lf_freq) < -42949673)
        n_pull++;
    end
  end

  // symbol sequence of the current case, indexed by loop sample
  bit  sym [NSYM];
  real fcw_target;
  int  m = 0, agree = 0, disagree = 0, last_unlock = 0, nf = 0, peak_after = 0;
  real sum_f = 0.0, f_avg = 0.0;
  always @(posedge clk) begin
    if (!rst_n) begin m <= 0; f_avg = real'(fcw_nominal); end
    else if (data_valid) begin
      m <= m + 1;
      if (m / SPS_LOOP >= LOCK_SYM && m / SPS_LOOP < NSYM && (m % SPS_LOOP) == 20) begin
        if (data_bit == sym[m / SPS_LOOP]) agree++; else disagree++;
      end
      if (m / SPS_LOOP >= LOCK_SYM) begin sum_f += real'(fcw); nf++; end
      if (m / SPS_LOOP >= NSYM - 20) begin
        if (int'(dut.agc_i) > peak_after) peak_after = int'(dut.agc_i);
      end
      // lock: the integrator's frequency, averaged over about one symbol,
      // within 0.003 of fs of the carrier
      f_avg = f_avg + (real'(fcw_nominal - fcw_t'(dut.u_costas.u_lf.integ)) - f_avg) / 32.0;
      if (m < NSYM * SPS_LOOP / 2 &&
          ((f_avg - fcw_target) > 0.003 * 4294967296.0 || (f_avg - fcw_target) < -0.003 * 4294967296.0))
        last_unlock = m;
    end
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // the A/D converter clips at full scale
  function automatic sample_t adc(real v);
    if (v > 32767.0) return SAMPLE_MAX;
    if (v < -32768.0) return SAMPLE_MIN;
    return sample_t'($rtoi(v));
  endfunction

  task automatic run_case(real df, real amp0, real amp1, real sigma_rel, real phi);
    real w, a, ferr, ber;
    for (int k = 0; k < NSYM; k++) sym[k] = 1'($urandom_range(0, 1));
    fcw_target = (0.25 + df) * 4294967296.0;
    w = 2.0 * PI * (0.25 + df) / real'(DEC);
    @(negedge clk); rst_n = 0; in_valid = 0;
    repeat (4) @(negedge clk);
    agree = 0; disagree = 0; sum_f = 0.0; nf = 0; peak_after = 0; last_unlock = 0;
    rst_n = 1;
    for (int n = 0; n < NSYM * SPS_LOOP * DEC; n++) begin
      real d;
      a = (n < NSYM * SPS_LOOP * DEC / 2) ? amp0 : amp1;
      d = sym[n / (SPS_LOOP * DEC)] ? a : -a;
      @(negedge clk);
      in_valid = 1;
      in_i = adc(d * $cos(w * real'(n) + phi) + sigma_rel * a * gauss());
      in_q = adc(d * $sin(w * real'(n) + phi) + sigma_rel * a * gauss());
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    ferr = (sum_f / real'(nf) - fcw_target) / 4294967296.0;
    ber  = real'((agree < disagree) ? agree : disagree) / real'(agree + disagree);
    $display("df=%0.3f amp %0.0f->%0.0f noise=%0.2f: fcw_err=%0.6f fs, symbol errors=%0.4f (%0d/%0d), lock after %0.1f symbols, AGC peak %0d",
             df, amp0, amp1, sigma_rel, ferr, ber, agree, disagree,
             real'(last_unlock) / real'(SPS_LOOP), peak_after);
    checks += 4;
    if (ferr > 0.001 || ferr < -0.001) begin failures++; $display("FAIL frequency"); end
    if (ber > 0.01) begin failures++; $display("FAIL data"); end
    if (peak_after < 5000 || peak_after > 14000) begin failures++; $display("FAIL AGC level"); end
    if (last_unlock / SPS_LOOP >= LOCK_SYM) begin
      failures++; $display("FAIL lock time");
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    run_case( 0.020,  2000.0, 20000.0, 0.15, 0.4);
    run_case(-0.025, 20000.0,  2000.0, 0.30, 2.2);
    run_case( 0.000,  4000.0,  4000.0, 0.50, -1.0);
    $display("mechanisms: gain_up=%0d gain_down=%0d saturation=%0d inputs=%0d loop_samples=%0d nco_reads=%0d fold=%0d pull=%0d",
             n_gain_up, n_gain_down, n_sat, n_in, n_loop, n_nco_reads, n_fold, n_pull);
    checks += 7;
    if (n_gain_up == 0)   begin failures++; $display("FAIL no gain increase"); end
    if (n_gain_down == 0) begin failures++; $display("FAIL no gain decrease"); end
    if (n_sat == 0)       begin failures++; $display("FAIL no saturation"); end
    if (n_nco_reads == 0) begin failures++; $display("FAIL no NCO reads"); end
    if (n_fold == 0)      begin failures++; $display("FAIL no fold"); end
    if (n_pull == 0)      begin failures++; $display("FAIL no frequency pull"); end
    if (n_loop * DEC < n_in - 3 * DEC || n_loop * DEC > n_in + 3 * DEC) begin
      failures++; $display("FAIL decimation %0d loop samples for %0d inputs", n_loop, n_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && data_valid) n_loop++;
endmodule
