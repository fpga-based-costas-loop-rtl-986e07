// tb_loop_filter: checks the PI loop filter, freq = KP*e + sum(KI*e)
// (32-bit wrap), one clock after in_valid, for random error sequences,
// and that it holds its output while no sample arrives.
module tb_loop_filter;
  import costas_pkg::*;
  localparam int KP = 6554, KI = 655;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t err = '0;
  fcw_t freq;
  int checks = 0, failures = 0;

  loop_filter #(.KP(KP), .KI(KI)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    logic [31:0] integ, expv;
    integ = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      e = int'($urandom_range(0, 32767)) - 16384;
      integ = integ + 32'(KI * e);
      expv  = integ + 32'(KP * e);
      @(negedge clk); err = sample_t'(e); in_valid = 1;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || freq != expv) begin
        failures++;
        $display("FAIL e=%0d freq=%h exp=%h", e, freq, expv);
      end
      if (n % 50 == 0) begin
        err = 16'sd1000;
        repeat (3) @(negedge clk);
        checks++;
        if (freq != expv) begin failures++; $display("FAIL hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
