// tb_rom_addr_ctrl: the ROM address controller with a behavioural ROM that
// returns a known function of the address (addr*7 + 3). Checks that sin_out
// holds the word at the phase address and cos_out the word a quarter period
// on, that done pulses at the edge ending cycle t+2 after start in cycle t,
// and that busy covers the two read cycles.
module tb_rom_addr_ctrl;
  import costas_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [9:0] phase_addr = '0, rom_addr;
  sample_t rom_data, sin_out, cos_out;
  int checks = 0, failures = 0;

  rom_addr_ctrl dut (.*);
  always #5 clk = ~clk;

  function automatic sample_t romf(logic [9:0] a);
    return sample_t'(int'(a) * 7 + 3);
  endfunction
  always_ff @(posedge clk) rom_data <= romf(rom_addr);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [9:0] pa;
    int lat;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      pa = 10'($urandom_range(0, 1023));
      @(negedge clk); phase_addr = pa; start = 1;
      @(negedge clk); start = 0; phase_addr = 10'($urandom_range(0, 1023));
      lat = 1;
      checks++;
      if (!busy) begin failures++; $display("FAIL busy"); end
      while (!done && lat < 10) begin @(negedge clk); lat++; end
      checks += 3;
      if (lat != 3) begin failures++; $display("FAIL latency %0d", lat); end
      if (sin_out != romf(pa)) begin failures++; $display("FAIL sin pa=%0d", pa); end
      if (cos_out != romf(pa + 10'd256)) begin failures++; $display("FAIL cos pa=%0d", pa); end
      if ($urandom_range(0, 1) == 1) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
