// strf_pkg: number formats and constants shared by the CORDIC stationary-frame
// phase estimator.
//
// Every voltage on a module boundary is a 16-bit two's-complement word in
// Q2.14 (1.0 p.u. = 16384, range [-2, 2)). Every angle on a module boundary
// is a 16-bit word in radians, Q3.13 (pi = 25736). The 16-bit word size
// follows the hardware model of the estimator; the split into integer and
// fraction bits is this design's choice, picked so that +-1 p.u. voltages
// keep headroom and a full turn of angle fits.
//
// Inside the CORDIC pipelines the x/y words carry two extra integer bits
// (the CORDIC gain of about 1.647 on a vector of length up to 2*sqrt(2))
// and two guard fraction bits: Q4.16 in 20 bits. Angles inside carry three
// guard fraction bits: Q3.16 in 19 bits.
package strf_pkg;

  localparam int unsigned DW     = 16;          // boundary word width
  localparam int unsigned VFRAC  = 14;          // fraction bits of a voltage
  localparam int unsigned AFRAC  = 13;          // fraction bits of an angle
  localparam int unsigned XGUARD = 2;           // guard fraction bits of CORDIC x/y
  localparam int unsigned XW     = DW + 4;      // CORDIC x/y width, Q4.16
  localparam int unsigned ZGUARD = 3;           // guard fraction bits of CORDIC angle
  localparam int unsigned ZW     = DW + ZGUARD; // CORDIC angle width, Q3.16

  typedef logic signed [DW-1:0] word_t;   // Q2.14 voltage or Q3.13 angle
  typedef logic signed [XW-1:0] cxy_t;    // CORDIC x or y
  typedef logic signed [ZW-1:0] cz_t;     // CORDIC angle accumulator

  typedef enum logic {
    CORDIC_ROTATE = 1'b0,   // drive the angle to zero (rotation mode)
    CORDIC_VECTOR = 1'b1    // drive y to zero (vectoring mode)
  } cordic_mode_e;

  // pi and pi/2 in the internal Q3.16 angle format
  localparam cz_t PI_Z      = cz_t'(205887);
  localparam cz_t HALF_PI_Z = cz_t'(102944);

  // Inverse CORDIC gain, 1/K = prod_i 1/sqrt(1 + 2^-2i), as an unsigned Q0.18
  // constant: round(0.6072529351 * 2^18). It is the limit for many iterations
  // and agrees with the product for 12 or more iterations to better than 1e-7.
  localparam int unsigned INV_K_Q18 = 159188;

  // Elementary angle sigma_i = atan(2^-i), in Q3.16 radians:
  // round(atan(2^-i) * 2^16). Zero for i >= 17.
  function automatic cz_t atan_elem(input int unsigned i);
    case (i)
      0:  return cz_t'(51472);
      1:  return cz_t'(30386);
      2:  return cz_t'(16055);
      3:  return cz_t'(8150);
      4:  return cz_t'(4091);
      5:  return cz_t'(2047);
      6:  return cz_t'(1024);
      7:  return cz_t'(512);
      8:  return cz_t'(256);
      9:  return cz_t'(128);
      10: return cz_t'(64);
      11: return cz_t'(32);
      12: return cz_t'(16);
      13: return cz_t'(8);
      14: return cz_t'(4);
      15: return cz_t'(2);
      16: return cz_t'(1);
      default: return '0;
    endcase
  endfunction

  // Saturate a wide signed value to a boundary word.
  function automatic word_t sat_word(input logic signed [47:0] v);
    if (v > 48'sd32767)       return word_t'(16'sh7fff);
    else if (v < -48'sd32768) return word_t'(16'sh8000);
    else                      return word_t'(v[DW-1:0]);
  endfunction

endpackage
