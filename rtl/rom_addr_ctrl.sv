// rom_addr_ctrl: ROM address controller of the NCO. A single sine table
// serves both outputs: for each new phase it reads the sine at the phase
// address, then the cosine at the address a quarter period (2^(AW-2)
// entries) further on, and presents both together. It runs on the fast
// clock, two reads per loop sample, while the rest of the loop advances
// only on its sample strobe. That the controller reads both values from
// one ROM on a faster clock is the document's; the three-state sequencer
// below is this design's.
//
// Timing: start (with phase_addr) in cycle t drives the sine address
// directly; the cosine address follows in t+1; sin_out/cos_out update and
// done pulses at the clock edge ending t+2, so they are valid from t+3.
// busy is high from t+1 until done. A start while busy is ignored.
module rom_addr_ctrl
  import costas_pkg::*;
#(
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW-1:0] phase_addr,
  output logic [AW-1:0] rom_addr,
  input  sample_t       rom_data,
  output sample_t       sin_out,
  output sample_t       cos_out,
  output logic          done,
  output logic          busy
);
  typedef enum logic [1:0] {IDLE, RD_COS, FINISH} state_t;

  localparam logic [AW-1:0] QUARTER = AW'(1) << (AW - 2);

  state_t        state;
  logic [AW-1:0] pa;
  sample_t       sin_hold;

  assign busy = (state != IDLE);

  always_comb begin
    unique case (state)
      IDLE:    rom_addr = phase_addr;
      RD_COS:  rom_addr = pa + QUARTER;
      default: rom_addr = pa + QUARTER;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= IDLE;
      pa       <= '0;
      sin_hold <= '0;
      sin_out  <= '0;
      cos_out  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: if (start) begin
          pa    <= phase_addr;
          state <= RD_COS;
        end
        RD_COS: begin
          sin_hold <= rom_data;       // sine read issued in the start cycle
          state    <= FINISH;
        end
        default: begin               // FINISH
          sin_out <= sin_hold;
          cos_out <= rom_data;        // cosine read issued in RD_COS
          done    <= 1'b1;
          state   <= IDLE;
        end
      endcase
    end
  end
endmodule
