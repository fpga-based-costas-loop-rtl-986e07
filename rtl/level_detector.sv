// level_detector: sets the AGC gain. For each sample it estimates the
// envelope of the AGC output from its I and Q components as
// max(|I|,|Q|) + min(|I|,|Q|)/2 (within 12% of sqrt(I^2+Q^2) and free of
// multipliers), averages it with a leaky integrator of time constant
// 2^LD_SHIFT samples, and integrates the difference between REF_LEVEL and
// that average into the gain with step 2^-G_SHIFT. The gain is unsigned
// Q4.12 (4096 = 1.0), clamped to [1, 65535]. The AGC loop closes through
// the multiplier in front of this block. The document gives only the
// block's purpose (to determine the multiplier's scaling factor); the
// feedback method is this design's.
//
// Timing: level and gain update one clock after each in_valid.
module level_detector
  import costas_pkg::*;
#(
  parameter int REF_LEVEL = 8192,
  parameter int LD_SHIFT  = 6,
  parameter int G_SHIFT   = 6,
  parameter int GAIN_INIT = 4096
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sample_t     in_i,
  input  sample_t     in_q,
  output logic [15:0] gain,
  output logic [15:0] level
);
  logic signed [17:0] abs_i, abs_q, mx, mn, mag;
  logic signed [19:0] lvl_next;
  logic signed [23:0] gain_next;

  always_comb begin
    abs_i     = (in_i < 0) ? -18'(in_i) : 18'(in_i);
    abs_q     = (in_q < 0) ? -18'(in_q) : 18'(in_q);
    mx        = (abs_i > abs_q) ? abs_i : abs_q;
    mn        = (abs_i > abs_q) ? abs_q : abs_i;
    mag       = mx + (mn >>> 1);
    lvl_next  = 20'(signed'({1'b0, level})) + ((20'(mag) - 20'(signed'({1'b0, level}))) >>> LD_SHIFT);
    gain_next = 24'(signed'({1'b0, gain}))
              + ((24'(signed'(REF_LEVEL)) - 24'(signed'({1'b0, level}))) >>> G_SHIFT);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level <= '0;
      gain  <= 16'(GAIN_INIT);
    end else if (in_valid) begin
      level <= (lvl_next > 20'sd65535) ? 16'hFFFF :
               (lvl_next < 0) ? 16'h0 : lvl_next[15:0];
      if (gain_next > 24'sd65535)  gain <= 16'hFFFF;
      else if (gain_next < 24'sd1) gain <= 16'd1;
      else                         gain <= gain_next[15:0];
    end
  end
endmodule
