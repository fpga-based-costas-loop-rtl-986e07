// costas_loop: all-digital continuous-mode Costas loop for BPSK.
//
// The real input sample is multiplied by the NCO cosine (PD2, the I arm)
// and sine (PD1, the Q arm). First-order Butterworth arm filters remove
// the double-frequency products. PD3 forms the phase error atan(Q/I) from
// the two arm outputs, the PI loop filter turns it into a frequency
// correction, and the NCO runs at fcw = fcw_nominal - correction. When
// locked the I arm carries the data (its sign is the bit decision) and the
// Q arm is near zero. This structure is the document's; which arm is
// called I, the sign convention and the pipeline are this design's.
//
// Pipeline, counted from an accepted sample in cycle t:
//   t   mixers register the products; the NCO steps to the next sample's
//       phase with the current fcw
//   t+1 arm filters            (i_arm, q_arm, data_bit, data_valid at t+2)
//   t+2 arctangent detector    (phase_err at t+3)
//   t+3 loop filter            (fcw at t+4)
//   t+3 NCO outputs for the next phase are ready
// Samples must be at least 4 clocks apart, so the loop delay is one
// sample. An assertion checks the spacing.
module costas_loop
  import costas_pkg::*;
#(
  parameter int ARM_B = 5249,
  parameter int ARM_A = 22269,
  parameter int KP    = 6554,
  parameter int KI    = 655
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  input  fcw_t    fcw_nominal,     // centre frequency, 2^32 = loop rate
  output logic    data_valid,
  output logic    data_bit,
  output sample_t i_arm,
  output sample_t q_arm,
  output sample_t phase_err,
  output fcw_t    fcw
);
  sample_t nco_sin, nco_cos, mix_i, mix_q;
  logic    nco_ready, mix_valid, mix_q_valid, arm_valid, arm_q_valid;
  logic    pd_valid, lf_valid;
  fcw_t    lf_freq;

  assign fcw = fcw_nominal - lf_freq;

  nco u_nco (
    .clk     (clk),
    .rst_n   (rst_n),
    .step    (in_valid),
    .fcw     (fcw),
    .sin_out (nco_sin),
    .cos_out (nco_cos),
    .ready   (nco_ready)
  );

  pd_mixer u_pd2_i (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid),
    .x (in_data), .lo (nco_cos), .out_valid (mix_valid), .y (mix_i)
  );
  pd_mixer u_pd1_q (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid),
    .x (in_data), .lo (nco_sin), .out_valid (mix_q_valid), .y (mix_q)
  );

  lpf_iir1 #(.B(ARM_B), .A(ARM_A)) u_arm_i (
    .clk (clk), .rst_n (rst_n), .in_valid (mix_valid),
    .x (mix_i), .out_valid (arm_valid), .y (i_arm)
  );
  lpf_iir1 #(.B(ARM_B), .A(ARM_A)) u_arm_q (
    .clk (clk), .rst_n (rst_n), .in_valid (mix_q_valid),
    .x (mix_q), .out_valid (arm_q_valid), .y (q_arm)
  );

  pd_atan u_pd3 (
    .clk (clk), .rst_n (rst_n), .in_valid (arm_valid),
    .i_in (i_arm), .q_in (q_arm), .out_valid (pd_valid), .phase (phase_err)
  );

  loop_filter #(.KP(KP), .KI(KI)) u_lf (
    .clk (clk), .rst_n (rst_n), .in_valid (pd_valid),
    .err (phase_err), .out_valid (lf_valid), .freq (lf_freq)
  );

  assign data_valid = arm_valid;
  assign data_bit   = ~i_arm[SW-1];

  // The NCO must have the outputs of the current phase when a sample comes.
  a_sample_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> nco_ready)
    else $error("costas_loop: input samples closer than 4 clocks");

  logic unused;
  assign unused = ^{mix_q_valid, arm_q_valid, lf_valid};
endmodule
