// tb_doppler_snr_sweep: characterises the demodulator over Doppler offset
// and noise level, the two axes along which such a receiver is evaluated.
// For every pair of offset (from -0.2 to +0.2 of the loop rate) and noise
// level, the design is reset and fed 100 symbols of noisy BPSK I/Q at
// constant amplitude, with the NCO centre at 1/4 of the loop rate. A table
// reports whether the loop locked (mean NCO frequency within 0.1% of the
// loop rate of the carrier), the symbol error rate after 30 symbols and
// the time to lock.
//
// Checks: inside the designed capture range (|offset| <= 0.03 of the loop
// rate) every case must lock with at most 1% symbol errors at noise up to
// 0.4 of the amplitude per I/Q component. Cases outside that range are
// reported, not checked.
module tb_doppler_snr_sweep;
  import costas_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  SPS_LOOP = 32;
  localparam int  DEC = 4;
  localparam int  NSYM = 100;
  localparam int  LOCK_SYM = 30;
  localparam int  NDF = 11;
  localparam int  NSN = 3;
  localparam real DF [NDF] = '{-0.2, -0.1, -0.05, -0.03, -0.015, 0.0, 0.015, 0.03, 0.05, 0.1, 0.2};
  localparam real SN [NSN] = '{0.1, 0.25, 0.4};

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
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit  sym [NSYM];
  int  m = 0, agree = 0, disagree = 0, nf = 0, lock_m = -1;
  real sum_f = 0.0, fcw_target = 0.0, f_avg = 0.0;
  always @(posedge clk) begin
    if (!rst_n) begin m <= 0; f_avg = real'(fcw_nominal); lock_m = -1; end
    else if (data_valid) begin
      m <= m + 1;
      if (m / SPS_LOOP >= LOCK_SYM && m / SPS_LOOP < NSYM && (m % SPS_LOOP) == 20) begin
        if (data_bit == sym[m / SPS_LOOP]) agree++; else disagree++;
      end
      if (m / SPS_LOOP >= LOCK_SYM) begin sum_f += real'(fcw); nf++; end
      f_avg = f_avg + (real'(fcw_nominal - fcw_t'(dut.u_costas.u_lf.integ)) - f_avg) / 32.0;
      if ((f_avg - fcw_target) > 0.003 * 4294967296.0 || (f_avg - fcw_target) < -0.003 * 4294967296.0)
        lock_m = -1;
      else if (lock_m < 0)
        lock_m = m;
    end
  end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  function automatic sample_t adc(real v);
    if (v > 32767.0) return SAMPLE_MAX;
    if (v < -32768.0) return SAMPLE_MIN;
    return sample_t'($rtoi(v));
  endfunction

  task automatic run_case(real df, real sigma_rel, output bit locked, output real ser);
    real w, a, ferr;
    a = 6000.0;
    for (int k = 0; k < NSYM; k++) sym[k] = 1'($urandom_range(0, 1));
    fcw_target = (0.25 + df) * 4294967296.0;
    w = 2.0 * PI * (0.25 + df) / real'(DEC);
    @(negedge clk); rst_n = 0; in_valid = 0;
    repeat (4) @(negedge clk);
    agree = 0; disagree = 0; sum_f = 0.0; nf = 0;
    rst_n = 1;
    for (int n = 0; n < NSYM * SPS_LOOP * DEC; n++) begin
      real d;
      d = sym[n / (SPS_LOOP * DEC)] ? a : -a;
      @(negedge clk);
      in_valid = 1;
      in_i = adc(d * $cos(w * real'(n) + 0.3) + sigma_rel * a * gauss());
      in_q = adc(d * $sin(w * real'(n) + 0.3) + sigma_rel * a * gauss());
    end
    @(negedge clk); in_valid = 0;
    repeat (10) @(negedge clk);
    ferr   = (sum_f / real'(nf) - fcw_target) / 4294967296.0;
    locked = (ferr < 0.001 && ferr > -0.001);
    ser    = real'((agree < disagree) ? agree : disagree) / real'(agree + disagree);
    $display("offset %7.3f  noise %4.2f  locked %0d  symbol error rate %6.4f  lock time %5.1f symbols",
             df, sigma_rel, locked, ser, (locked && lock_m >= 0) ? real'(lock_m) / real'(SPS_LOOP) : -1.0);
  endtask

  initial begin
    bit  locked;
    real ser;
    int  nlock;
    nlock = 0;
    repeat (3) @(negedge clk);
    for (int i = 0; i < NDF; i++) begin
      for (int j = 0; j < NSN; j++) begin
        run_case(DF[i], SN[j], locked, ser);
        if (locked) nlock++;
        if (DF[i] <= 0.03 && DF[i] >= -0.03) begin
          checks++;
          if (!locked || ser > 0.01) begin failures++; $display("FAIL inside capture range"); end
        end
      end
    end
    $display("locked in %0d of %0d cases", nlock, NDF * NSN);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
