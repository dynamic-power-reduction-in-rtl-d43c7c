// Shared constants for the look-ahead clock-gated LFSR.
//
// Tap masks for the Fibonacci LFSR sizes used with this design. Bit i of a
// mask set means "register i+1 feeds the feedback XOR", so the polynomial
// 1 + x^4 + x^13 + x^15 + x^16 of the 16-bit design becomes bits 3, 12, 14
// and 15, i.e. 16'hD008.  The 16-bit and 4-bit polynomials are the ones the
// design is specified with; the 8-bit (8,6,5,4) and 32-bit (32,22,2,1) tap
// sets are standard maximal-length choices that reproduce the register
// transitions observed for those sizes.  default_taps() returns 0 for any
// other width, which lfsr_feedback rejects at elaboration.
package lfsr_lacg_pkg;

  localparam logic [3:0]  TAPS_4  = 4'hC;          // x^4 + x^3 + 1
  localparam logic [7:0]  TAPS_8  = 8'hB8;         // x^8 + x^6 + x^5 + x^4 + 1
  localparam logic [15:0] TAPS_16 = 16'hD008;      // x^16 + x^15 + x^13 + x^4 + 1
  localparam logic [31:0] TAPS_32 = 32'h8020_0003; // x^32 + x^22 + x^2 + x + 1

  function automatic logic [63:0] default_taps(input int unsigned width);
    case (width)
      4:       return 64'(TAPS_4);
      8:       return 64'(TAPS_8);
      16:      return 64'(TAPS_16);
      32:      return 64'(TAPS_32);
      default: return '0;
    endcase
  endfunction

endpackage
