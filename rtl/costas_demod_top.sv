// costas_demod_top: BPSK demodulator for signals with a Doppler frequency
// offset. The I and Q branches from the IF mixer enter the AGC, which
// limits the noise bandwidth, normalises the level and decimates by DECIM;
// the AGC's I output then drives the all-digital Costas loop, which
// recovers carrier phase and frequency and delivers the data on its I arm.
// The AGC's Q output is not used by the loop and is brought out.
//
// Interface: one input sample per clock at most (in_valid). fcw_nominal
// is the NCO centre frequency as a fraction of the loop rate (input rate /
// DECIM) times 2^32. Outputs change on data_valid, once per loop sample.
// With DECIM = 4 the loop receives one sample every 4 clocks, the fastest
// rate its NCO (two ROM reads per sample) and pipeline allow; DECIM must
// be at least 4.
module costas_demod_top
  import costas_pkg::*;
#(
  parameter int DECIM = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sample_t     in_i,
  input  sample_t     in_q,
  input  fcw_t        fcw_nominal,
  output logic [15:0] agc_gain,
  output sample_t     agc_q,
  output logic        data_valid,
  output logic        data_bit,
  output sample_t     i_arm,
  output sample_t     q_arm,
  output sample_t     phase_err,
  output fcw_t        fcw
);
  logic    agc_valid;
  sample_t agc_i;

  agc #(.DECIM(DECIM)) u_agc (
    .clk (clk), .rst_n (rst_n), .in_valid (in_valid),
    .in_i (in_i), .in_q (in_q),
    .out_valid (agc_valid), .out_i (agc_i), .out_q (agc_q), .gain (agc_gain)
  );

  costas_loop u_costas (
    .clk (clk), .rst_n (rst_n), .in_valid (agc_valid), .in_data (agc_i),
    .fcw_nominal (fcw_nominal),
    .data_valid (data_valid), .data_bit (data_bit),
    .i_arm (i_arm), .q_arm (q_arm), .phase_err (phase_err), .fcw (fcw)
  );
endmodule
