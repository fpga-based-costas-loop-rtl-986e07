// tb_pd_mixer: checks the multiplying phase detector: y = sat((x*lo) >>> 15)
// one clock after in_valid, for random operands and the saturating corner.
module tb_pd_mixer;
  import costas_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  sample_t x = '0, lo = '0, y;
  int checks = 0, failures = 0;

  pd_mixer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(int a, int b);
    longint p;
    p = (longint'(a) * longint'(b)) >>> 15;
    if (p > 32767) p = 32767;
    @(negedge clk); x = sample_t'(a); lo = sample_t'(b); in_valid = 1;
    @(negedge clk); in_valid = 0;
    checks++;
    if (!out_valid || longint'(y) != p) begin
      failures++;
      $display("FAIL %0d*%0d y=%0d exp=%0d", a, b, y, p);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++)
      one(int'($urandom_range(0, 65535)) - 32768, int'($urandom_range(0, 65535)) - 32768);
    one(-32768, -32768);   // saturates to +32767
    one(20000, 32767);
    one(-20000, 32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
