// sine_rom: the NCO's lookup table, one period of a sine in 2^AW entries of
// DW-bit signed samples,
//   entry k = round(AMP * sin(2*pi*k / 2^AW)),   AMP = 2^(DW-1) - 1.
// Sine and cosine are both read from this one table (the cosine a quarter
// period further on), which halves the table memory. The table is computed
// at elaboration by a constant function. Keeping the table in a block
// memory with a registered read follows the document; the depth (1024) is
// this design's choice.
//
// Timing: synchronous read, data is valid one clock after addr.
module sine_rom #(
  parameter int AW = 10,
  parameter int DW = 16
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);
  typedef logic [DW-1:0] table_t [2**AW];

  function automatic table_t make_table();
    table_t t;
    real    amp, v;
    amp = real'((2**(DW-1)) - 1);
    for (int k = 0; k < 2**AW; k++) begin
      v = amp * $sin(2.0 * 3.14159265358979323846 * real'(k) / real'(2**AW));
      if (v >= 0.0) t[k] = DW'($rtoi(v + 0.5));
      else          t[k] = DW'(-$rtoi(0.5 - v));
    end
    return t;
  endfunction

  localparam table_t TABLE = make_table();

  always_ff @(posedge clk) data <= TABLE[addr];
endmodule
