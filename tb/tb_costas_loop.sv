// tb_costas_loop: closed-loop test of the Costas loop alone. A BPSK signal
//   x[n] = A * d[n/SPS] * cos(2*pi*(f0 + df)*n + phi)
// is generated here, one sample every 4 clocks, with the NCO centre at
// f0 = fs/4 and Doppler offsets df of several sizes and both signs. For
// each case the loop is reset and must: bring its mean frequency word after
// lock-in to within 0.1% of fs of (f0 + df)*2^32; after the lock-in interval, recover every
// symbol (up to the 180-degree BPSK ambiguity) from the I-arm sign at the
// middle of each symbol; and keep the Q arm well below the I arm.
module tb_costas_loop;
  import costas_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int  SPS = 32;          // samples per symbol
  localparam int  NSYM = 120;
  localparam int  LOCK_SYM = 20;     // symbols allowed for lock-in
  localparam real AMP = 8000.0;

  logic clk = 0, rst_n = 0, in_valid = 0, data_valid, data_bit;
  sample_t in_data = '0, i_arm, q_arm, phase_err;
  fcw_t fcw_nominal = 32'h4000_0000, fcw;
  int checks = 0, failures = 0;

  costas_loop dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_case(real df, real phi);
    bit   sym [NSYM];
    int   agree, disagree, nq;
    real  fexp, ferr, sum_i, sum_q, sum_f;
    for (int k = 0; k < NSYM; k++) sym[k] = 1'($urandom_range(0, 1));
    rst_n = 0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    agree = 0; disagree = 0; sum_i = 0; sum_q = 0; sum_f = 0; nq = 0;
    for (int n = 0; n < NSYM * SPS; n++) begin
      real v;
      v = AMP * (sym[n / SPS] ? 1.0 : -1.0) * $cos(2.0 * PI * (0.25 + df) * real'(n) + phi);
      @(negedge clk); in_data = sample_t'($rtoi(v)); in_valid = 1;
      @(negedge clk); in_valid = 0;
      repeat (2) @(negedge clk);
      // the decision for sample n is visible now (pipeline of 2 clocks);
      // the arm filter delays the data by about 3 samples
      if (n / SPS >= LOCK_SYM && (n % SPS) == SPS / 2) begin
        if (data_bit == sym[n / SPS]) agree++; else disagree++;
      end
      if (n / SPS >= LOCK_SYM) begin
        sum_i += (i_arm < 0) ? -real'(i_arm) : real'(i_arm);
        sum_q += (q_arm < 0) ? -real'(q_arm) : real'(q_arm);
        sum_f += real'(fcw);
        nq++;
      end
    end
    fexp = (0.25 + df) * 4294967296.0;
    ferr = (sum_f / real'(nq) - fexp) / 4294967296.0;
    $display("df=%f fcw_err=%f fs agree=%0d disagree=%0d |I|=%0.1f |Q|=%0.1f",
             df, ferr, agree, disagree, sum_i / nq, sum_q / nq);
    checks += 3;
    if (ferr > 0.001 || ferr < -0.001) begin failures++; $display("FAIL frequency"); end
    if (agree != 0 && disagree != 0) begin failures++; $display("FAIL data"); end
    if (sum_q > 0.25 * sum_i) begin failures++; $display("FAIL Q arm not near zero"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    run_case(0.0, 0.7);
    run_case(0.005, -2.0);
    run_case(-0.01, 1.3);
    run_case(0.02, 0.3);
    run_case(-0.03, 2.9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
