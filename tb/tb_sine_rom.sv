// tb_sine_rom: reads every entry of the sine table and compares it with
// round(32767*sin(2*pi*k/1024)) computed here, with one-clock read latency.
module tb_sine_rom;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0;
  logic [9:0] addr = '0;
  logic [15:0] data;
  int checks = 0, failures = 0;

  sine_rom dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v;
    int e;
    for (int k = 0; k < 1024; k++) begin
      @(negedge clk); addr = 10'(k);
      @(negedge clk);
      v = 32767.0 * $sin(2.0 * PI * real'(k) / 1024.0);
      e = (v >= 0.0) ? $rtoi(v + 0.5) : -$rtoi(0.5 - v);
      checks++;
      if (int'($signed(data)) != e) begin
        failures++;
        $display("FAIL k=%0d data=%0d exp=%0d", k, $signed(data), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
