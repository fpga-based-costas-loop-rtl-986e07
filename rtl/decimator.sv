// decimator: down-samples an I/Q stream by DECIM, keeping the first of
// every DECIM valid input samples, so the Costas loop runs at a rate it
// can handle. Anti-alias filtering is the job of the AGC's LPF in front.
// The block is the document's; the factor and plain sample dropping are
// this design's choice.
//
// Timing: out_i/out_q and the out_valid pulse appear one clock after the
// kept input sample.
module decimator #(
  parameter int DECIM = 4,
  parameter int W     = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_i,
  input  logic signed [W-1:0] in_q,
  output logic                out_valid,
  output logic signed [W-1:0] out_i,
  output logic signed [W-1:0] out_q
);
  localparam int CW = (DECIM > 1) ? $clog2(DECIM) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        if (cnt == '0) begin
          out_valid <= 1'b1;
          out_i     <= in_i;
          out_q     <= in_q;
        end
        cnt <= (cnt == CW'(DECIM - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end
endmodule
