// loop_filter: Costas loop filter. It turns the phase error from PD3 into
// a frequency correction for the NCO, as a proportional-plus-integral
// filter:
//   integ[n] = integ[n-1] + KI*e[n]
//   freq[n]  = KP*e[n] + integ[n]
// i.e. a first-order IIR section with its pole at z = 1 (an accumulating,
// integrate-type filter). The document calls its loop filter both a
// first-order IIR and an integrate-and-dump filter with gain parameters;
// this PI form satisfies both readings. KP and KI are this design's
// choice: with the error scaled pi = 2^15 and the NCO's 32-bit phase
// word, KP = Kp*2^16 for a normalised proportional gain Kp (rad/sample per
// rad), likewise KI. All arithmetic is 32-bit and wraps modulo 2^32, like
// the frequency word it feeds.
//
// Timing: freq and out_valid follow in_valid by one clock.
module loop_filter
  import costas_pkg::*;
#(
  parameter int KP = 6554,
  parameter int KI = 655
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t err,
  output logic    out_valid,
  output fcw_t    freq
);
  logic signed [FW-1:0] integ, integ_next, prop;

  always_comb begin
    prop       = FW'(signed'(KP)) * FW'(err);
    integ_next = integ + FW'(signed'(KI)) * FW'(err);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      integ     <= '0;
      freq      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        integ <= integ_next;
        freq  <= fcw_t'(prop + integ_next);
      end
    end
  end
endmodule
