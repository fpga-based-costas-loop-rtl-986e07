// lpf_iir1: first-order Butterworth low-pass IIR, the filter used for the
// I and Q arms of the Costas loop and, with other coefficients, for the
// AGC's noise-limiting LPF.
//
// Difference equation (bilinear transform of a one-pole analog prototype):
//   y[n] = b*(x[n] + x[n-1]) + a*y[n-1]
// with K = tan(pi*fc/fs), b = K/(1+K), a = (1-K)/(1+K). B and A are b and a
// in Q1.15. The DC gain is one and there is a zero at fs/2, which is what
// removes the double-frequency mixer product. The state y is held with 16
// fraction bits in 32 bits, following the document's 32-bit precision for
// filters; input and output are 16-bit samples (output rounded and
// saturated). The first-order structure follows the document's arm-filter
// section; the default cutoff (0.06 fs) is this design's choice.
//
// Timing: one sample per in_valid; y and out_valid appear one clock later.
module lpf_iir1
  import costas_pkg::*;
#(
  parameter int B = 5249,   // b in Q1.15  (fc = 0.06 fs)
  parameter int A = 22269   // a in Q1.15
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t x,
  output logic    out_valid,
  output sample_t y
);
  sample_t                   x_prev;
  logic signed [FW-1:0]      acc;        // y with 16 fraction bits
  logic signed [63:0]        feed_fwd, feed_back, acc_next, rounded;

  always_comb begin
    feed_fwd  = 64'(signed'(B)) * (64'(x) + 64'(x_prev)) * 64'sd2;
    feed_back = (64'(signed'(A)) * 64'(acc)) >>> 15;
    acc_next  = feed_fwd + feed_back;
    rounded   = (acc_next + 64'sd32768) >>> 16;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      x_prev    <= '0;
      acc       <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        x_prev <= x;
        acc    <= FW'(acc_next);
        y      <= sat16(rounded);
      end
    end
  end
endmodule
