// rbdc_pkg: constants shared by the radix-corrected relaxation DAC.
//
// A relaxation DAC (ReDAC) drives a first-order RC network with the bits of
// a code, least significant bit first, one bit per clock period T.  When
// exp(T/RC) equals 2 the capacitor ends at VDD*code/2^N; otherwise the DAC
// weighs bit i by r^i with r = exp(T/RC).  The digital side of this design
// converts the radix-2 input code into a radix-r code before it is shifted
// out, and finds r itself by a binary search at start-up.
//
// Number formats used throughout:
//   radix r   : unsigned fixed point, 2 integer bits and M_BITS fractional
//               bits (the search steps r by 2^-1 ... 2^-M_BITS).
//   weights   : unsigned fixed point, M_BITS integer bits and W_FRAC
//               fractional bits (all weights lie below 2^M_BITS).
//   1/r       : unsigned fixed point, Q_FRAC fractional bits (1/3 < 1/r < 1).
// Input codes have N_BITS bits; they are converted into radix-r codes of
// M_BITS > N_BITS bits, so that the smallest radix-r weight stays well below
// one input LSB when r < 2.  The 10-bit resolution is the published one.
// M_BITS = 14 and HOLD = 2 (16 cycles per sample) are derived from the
// published sample rates; the fractional widths are this design's own choice.
package rbdc_pkg;
  localparam int unsigned N_BITS_DEF = 10;  // DAC resolution, bits of an input code
  localparam int unsigned M_BITS_DEF = 14;  // bits of the radix-r code played
  localparam int unsigned W_FRAC_DEF = 16;  // fractional bits of a weight
  localparam int unsigned Q_FRAC_DEF = 20;  // fractional bits of 1/r
  localparam int unsigned HOLD_DEF   = 2;   // cycles per frame with the buffer off

  // Conversion weights r^i*G, or the calibration weights r^i*2^N/r^N.
  typedef enum logic {
    WMODE_CAL  = 1'b0,
    WMODE_CONV = 1'b1
  } wmode_e;
endpackage
