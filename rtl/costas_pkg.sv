// costas_pkg: widths, types and small helpers shared by the BPSK Costas
// demodulator. Samples and NCO outputs are 16-bit signed two's complement
// (the document's 16-bit precision for data and NCO output); filter state,
// loop filter and frequency words are 32 bits (its 32-bit filter precision).
// Phase angles use the scale pi = 2^15, so +-90 degrees is +-16384.
package costas_pkg;
  localparam int unsigned SW = 16;   // sample width
  localparam int unsigned FW = 32;   // filter / frequency word width

  typedef logic signed [SW-1:0] sample_t;
  typedef logic [FW-1:0]        fcw_t;

  localparam sample_t SAMPLE_MAX = 16'sh7FFF;
  localparam sample_t SAMPLE_MIN = -16'sh8000;

  // Saturate a wide signed value to the 16-bit sample range.
  function automatic sample_t sat16(input logic signed [63:0] v);
    if (v > 64'sd32767)       return SAMPLE_MAX;
    else if (v < -64'sd32768) return SAMPLE_MIN;
    else                      return sample_t'(v);
  endfunction

  // atan(2^-i) in units where pi = 2^15, rounded: the CORDIC angle table.
  function automatic logic signed [17:0] cordic_angle(input int i);
    case (i)
      0:  return 18'sd8192;
      1:  return 18'sd4836;
      2:  return 18'sd2555;
      3:  return 18'sd1297;
      4:  return 18'sd651;
      5:  return 18'sd326;
      6:  return 18'sd163;
      7:  return 18'sd81;
      8:  return 18'sd41;
      9:  return 18'sd20;
      10: return 18'sd10;
      11: return 18'sd5;
      12: return 18'sd3;
      13: return 18'sd1;
      14: return 18'sd1;
      default: return 18'sd0;
    endcase
  endfunction
endpackage
