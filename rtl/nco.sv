// nco: numerically controlled oscillator of the Costas loop. A 32-bit phase
// accumulator advances by the frequency control word fcw at each step; its
// top AW bits address a single sine table (sine_rom) through the ROM
// address controller, which reads the sine and then the cosine of the new
// phase. The output frequency is fcw / 2^32 times the step rate.
// Structure (accumulator, block-ROM lookup table, one ROM for both
// outputs, address controller) follows the document; the widths are this
// design's choice.
//
// After reset the phase is 0 and the outputs of phase 0 are read once
// without a step. Timing: step in cycle t; sin_out/cos_out of the new
// phase are valid, and ready is high again, from t+3. Steps must be at
// least 3 clocks apart (a step while not ready is ignored by the
// controller and the phase then runs ahead of the outputs).
module nco
  import costas_pkg::*;
#(
  parameter int PW = 32,
  parameter int AW = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic [PW-1:0] fcw,
  output sample_t       sin_out,
  output sample_t       cos_out,
  output logic          ready
);
  logic [PW-1:0] phase, phase_next;
  logic          init_req, start, busy, done;
  logic [AW-1:0] rom_addr;
  logic [15:0]   rom_data;

  assign phase_next = step ? phase + fcw : phase;
  assign start      = step | init_req;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase    <= '0;
      init_req <= 1'b1;
    end else begin
      phase <= phase_next;
      if (start && !busy) init_req <= 1'b0;
    end
  end

  assign ready = !busy && !init_req;

  rom_addr_ctrl #(.AW(AW)) u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start),
    .phase_addr (phase_next[PW-1 -: AW]),
    .rom_addr   (rom_addr),
    .rom_data   (sample_t'(rom_data)),
    .sin_out    (sin_out),
    .cos_out    (cos_out),
    .done       (done),
    .busy       (busy)
  );

  sine_rom #(.AW(AW), .DW(16)) u_rom (
    .clk  (clk),
    .addr (rom_addr),
    .data (rom_data)
  );

  logic unused;
  assign unused = done;
endmodule
