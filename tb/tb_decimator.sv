// tb_decimator: feeds a counting I/Q stream with random gaps and checks
// that exactly the 1st, (1+DECIM)th, ... valid samples come out, one clock
// after they entered.
module tb_decimator;
  localparam int DECIM = 4;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [15:0] in_i = '0, in_q = '0, out_i, out_q;
  int checks = 0, failures = 0;

  decimator #(.DECIM(DECIM), .W(16)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nin, nout;
    nin = 0; nout = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_i = 16'(nin); in_q = 16'(-nin);
      @(posedge clk);
      #1;
      checks++;
      if (in_valid && (nin % DECIM == 0)) begin
        if (!out_valid || out_i != 16'(nin) || out_q != 16'(-nin)) begin
          failures++; $display("FAIL sample %0d", nin);
        end
        nout++;
      end else if (out_valid) begin
        failures++; $display("FAIL extra output at %0d", nin);
      end
      if (in_valid) nin++;
    end
    checks++;
    if (nout != (nin + DECIM - 1) / DECIM) begin failures++; $display("FAIL count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
