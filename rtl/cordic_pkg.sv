// cordic_pkg: number formats, coefficient angles and constant functions shared
// by the unrolled sine/cosine CORDIC.
//
// Angles are in degrees, two's complement, 8 integer bits (sign included) and
// 15 fraction bits: 23 bits in all. The input angle of the core is the
// unsigned 22-bit part of this format (bits 21..0, range 0 .. 127.99 degrees,
// meaningful range 0 .. 90 degrees). The coefficient angle of rotation i
// (i = 1 .. 19) is arctan(2^-(i-1)) in degrees, scaled by 2^15 and truncated
// toward zero; the table below holds exactly those values.
//
// The x/y datapath is two's complement with XY_FRAC fraction bits and two
// more bits (sign and one integer bit), so values in [-2, 2) fit. The width
// of the x/y datapath and the starting length K are choices of this design;
// the angle format and the angle table follow the thesis' coefficient table.
package cordic_pkg;

  localparam int unsigned ANGLE_FRAC = 15;               // fraction bits of an angle
  localparam int unsigned ANGLE_W    = 8 + ANGLE_FRAC;   // signed residual angle width
  localparam int unsigned IN_W       = ANGLE_W - 1;      // unsigned input angle width
  localparam int unsigned MAX_ROT    = 19;               // rotations in the table

  typedef logic signed [ANGLE_W-1:0] angle_t;

  // Coefficient angles alpha_1 .. alpha_19 (index 0 is alpha_1),
  // alpha_i = trunc(2^15 * atan(2^-(i-1)) * 180/pi).
  localparam angle_t ALPHA [MAX_ROT] = '{
    angle_t'(1474560), angle_t'(870483), angle_t'(459939), angle_t'(233472),
    angle_t'(117189),  angle_t'(58651),  angle_t'(29333),  angle_t'(14667),
    angle_t'(7333),    angle_t'(3666),   angle_t'(1833),   angle_t'(916),
    angle_t'(458),     angle_t'(229),    angle_t'(114),    angle_t'(57),
    angle_t'(28),      angle_t'(14),     angle_t'(7)
  };

  // Threshold constants chosen by the angle MUX that replaces the first
  // coefficient adder: the residual after the first two rotations is
  // a - (alpha_1 + alpha_2) above 45 degrees and a - (alpha_1 - alpha_2) below.
  localparam angle_t ANGLE_HI = ALPHA[0] + ALPHA[1];     // 71.565 degrees
  localparam angle_t ANGLE_LO = ALPHA[0] - ALPHA[1];     // 18.435 degrees

  // Length of the starting vector that makes the last of n_rot rotations end
  // on the unit circle: K = prod_{i=0}^{n_rot-1} 1/sqrt(1 + 2^-2i).
  function automatic real cordic_gain(int unsigned n_rot);
    real g;
    g = 1.0;
    for (int unsigned i = 0; i < n_rot; i++)
      g = g / $sqrt(1.0 + 2.0 ** (-2.0 * real'(i)));
    return g;
  endfunction

  // K * num / 8 as an x/y value with frac fraction bits, rounded to nearest.
  // The four starting coordinates after three rotations are K times 1/8, 7/8,
  // 11/8 and 13/8.
  function automatic longint start_coord(int unsigned n_rot, int unsigned frac,
                                         int unsigned num);
    real v;
    v = cordic_gain(n_rot) * real'(num) / 8.0 * (2.0 ** real'(frac));
    return longint'($floor(v + 0.5));
  endfunction

endpackage
