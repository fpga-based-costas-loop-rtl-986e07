// pd_mixer: multiplying phase detector of the Costas loop (PD1 with the NCO
// sine, PD2 with the NCO cosine). It multiplies the 16-bit input sample by
// the 16-bit local oscillator value, scales the product by 2^-15 so that a
// full-scale oscillator has unit gain, and saturates to 16 bits.
// The multiplication follows the document; scaling and saturation are this
// design's choice.
//
// Timing: one register; y and out_valid follow in_valid by one clock.
module pd_mixer
  import costas_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x,
  input  sample_t lo,
  output logic    out_valid,
  output sample_t y
);
  logic signed [63:0] prod;
  assign prod = (64'(x) * 64'(lo)) >>> 15;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= sat16(prod);
    end
  end
endmodule
