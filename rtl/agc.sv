// agc: automatic gain control in front of the Costas loop, for the I and Q
// branches from the IF mixer. Each branch passes a first-order Butterworth
// LPF (cutoff 0.05 of the input rate) that limits the noise bandwidth,
// then a multiplier by the common gain (unsigned Q4.12) with saturation to
// 16 bits. The level detector watches the multiplier outputs and adjusts
// the gain so that their envelope settles at REF_LEVEL. The decimator then
// keeps one of every DECIM samples for the loop. The four parts (LPF,
// level detector, multiplier, decimator) are the document's; their order,
// the feedback arrangement and all numbers are this design's choice.
//
// Timing: one input sample per in_valid (at most one per clock). A kept
// sample appears at out_i/out_q with out_valid three clocks after it
// entered (LPF, multiplier, decimator registers).
module agc
  import costas_pkg::*;
#(
  parameter int DECIM     = 4,
  parameter int LPF_B     = 4480,
  parameter int LPF_A     = 23807,
  parameter int REF_LEVEL = 8192,
  parameter int LD_SHIFT  = 6,
  parameter int G_SHIFT   = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sample_t     in_i,
  input  sample_t     in_q,
  output logic        out_valid,
  output sample_t     out_i,
  output sample_t     out_q,
  output logic [15:0] gain
);
  sample_t            lpf_i, lpf_q, scl_i, scl_q;
  logic               lpf_valid, lpf_q_valid, scl_valid;
  logic signed [63:0] prod_i, prod_q;
  logic [15:0]        level;

  lpf_iir1 #(.B(LPF_B), .A(LPF_A)) u_lpf_i (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid),
    .x (in_i), .out_valid (lpf_valid), .y (lpf_i)
  );
  lpf_iir1 #(.B(LPF_B), .A(LPF_A)) u_lpf_q (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid),
    .x (in_q), .out_valid (lpf_q_valid), .y (lpf_q)
  );

  // Gain multiplier
  assign prod_i = (64'(lpf_i) * 64'(signed'({1'b0, gain}))) >>> 12;
  assign prod_q = (64'(lpf_q) * 64'(signed'({1'b0, gain}))) >>> 12;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      scl_i     <= '0;
      scl_q     <= '0;
      scl_valid <= 1'b0;
    end else begin
      scl_valid <= lpf_valid;
      if (lpf_valid) begin
        scl_i <= sat16(prod_i);
        scl_q <= sat16(prod_q);
      end
    end
  end

  level_detector #(
    .REF_LEVEL (REF_LEVEL), .LD_SHIFT (LD_SHIFT), .G_SHIFT (G_SHIFT)
  ) u_level (
    .clk (clk), .rst_n (rst_n), .in_valid (scl_valid),
    .in_i (scl_i), .in_q (scl_q), .gain (gain), .level (level)
  );

  decimator #(.DECIM(DECIM), .W(SW)) u_decim (
    .clk (clk), .rst_n (rst_n), .in_valid (scl_valid),
    .in_i (scl_i), .in_q (scl_q),
    .out_valid (out_valid), .out_i (out_i), .out_q (out_q)
  );

  logic unused;
  assign unused = ^{lpf_q_valid, level};
endmodule
