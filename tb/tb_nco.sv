// tb_nco: checks the NCO. A phase accumulator model in the testbench
// follows random frequency words; after each step the sine and cosine
// outputs must equal round(32767*sin/cos(2*pi*a/1024)) for the top 10
// phase bits a, and ready must return exactly 3 clocks after the step.
// Also checks the outputs of phase 0 after reset.
module tb_nco;
  import costas_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, step = 0, ready;
  logic [31:0] fcw = '0;
  sample_t sin_out, cos_out;
  int checks = 0, failures = 0;

  nco dut (.*);
  always #5 clk = ~clk;

  function automatic int tab(int k);
    real v;
    v = 32767.0 * $sin(2.0 * PI * real'(k % 1024) / 1024.0);
    return (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_out(logic [31:0] ph);
    int a;
    a = int'(ph[31:22]);
    checks++;
    if (int'(sin_out) != tab(a) || int'(cos_out) != tab(a + 256)) begin
      failures++;
      $display("FAIL a=%0d sin=%0d cos=%0d exp %0d %0d", a, sin_out, cos_out, tab(a), tab(a + 256));
    end
  endtask

  initial begin
    logic [31:0] ph;
    int lat;
    ph = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (!ready) begin failures++; $display("FAIL not ready after reset"); end
    check_out(ph);
    for (int n = 0; n < 800; n++) begin
      fcw = (n < 400) ? 32'($urandom) : 32'h0800_0000 + 32'($urandom_range(0, 65535));
      @(negedge clk); step = 1; ph = ph + fcw;
      @(negedge clk); step = 0;
      lat = 1;
      while (!ready && lat < 10) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
      check_out(ph);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
