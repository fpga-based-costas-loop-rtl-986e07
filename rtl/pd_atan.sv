// pd_atan: arctangent phase detector (PD3) of the Costas loop. It returns
// atan(Q/I) of the two arm-filter outputs, which stays linear over the
// whole +-90 degree range, instead of the product I*Q of a classic Costas
// loop. The data sign of BPSK is removed first by folding the vector into
// the right half plane (negate I and Q when I < 0), so the result lies in
// [-90, +90] degrees whatever the transmitted bit.
//
// The arctangent is an unrolled CORDIC in vectoring mode: ITER
// micro-rotations by +-atan(2^-k), each steering the vector toward the
// positive real axis and accumulating the angle. Angles use pi = 2^15,
// so the output is within about +-16384. The use of an arctangent detector
// is the document's; the CORDIC realisation is this design's choice.
//
// Four guard bits below the input LSB keep the result accurate for small
// vectors. Timing: combinational CORDIC, one output register; phase and out_valid
// follow in_valid by one clock.
module pd_atan
  import costas_pkg::*;
#(
  parameter int ITER = 14
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t i_in,
  input  sample_t q_in,
  output logic    out_valid,
  output sample_t phase
);
  localparam int GB = 4;    // guard bits below the input LSB
  localparam int XW = 19 + GB;   // room for the CORDIC gain 1.647 and sqrt(2)

  logic signed [XW-1:0] xs [ITER+1];
  logic signed [XW-1:0] ys [ITER+1];
  logic signed [17:0]   zs [ITER+1];

  always_comb begin
    if (i_in < 0) begin
      xs[0] = -(XW'(i_in) <<< GB);
      ys[0] = -(XW'(q_in) <<< GB);
    end else begin
      xs[0] = XW'(i_in) <<< GB;
      ys[0] = XW'(q_in) <<< GB;
    end
    zs[0] = '0;
    for (int k = 0; k < ITER; k++) begin
      if (ys[k] >= 0) begin
        xs[k+1] = xs[k] + (ys[k] >>> k);
        ys[k+1] = ys[k] - (xs[k] >>> k);
        zs[k+1] = zs[k] + cordic_angle(k);
      end else begin
        xs[k+1] = xs[k] - (ys[k] >>> k);
        ys[k+1] = ys[k] + (xs[k] >>> k);
        zs[k+1] = zs[k] - cordic_angle(k);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) phase <= sample_t'(zs[ITER]);
    end
  end
endmodule
