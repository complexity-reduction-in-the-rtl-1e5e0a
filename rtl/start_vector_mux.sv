// start_vector_mux: replaces the first three micro-rotations of the CORDIC by
// a choice among four precomputed starting vectors.
//
// Starting from (K, 0), the rotations by +45, +/-26.57 and +/-14.04 degrees
// can only end in four places, at 4.40, 32.47, 57.53 and 85.60 degrees:
//   s1 s2 = 0 0 : (x4, y4) = K * (13/8,  1/8)
//   s1 s2 = 0 1 : (x4, y4) = K * (11/8,  7/8)
//   s1 s2 = 1 0 : (x4, y4) = K * ( 7/8, 11/8)
//   s1 s2 = 1 1 : (x4, y4) = K * ( 1/8, 13/8)
// where s1 is the direction of rotation 2 (angle above 45 degrees) and s2 the
// direction of rotation 3. The selection is built, as in the thesis, from six
// 2:1 MUXes: one level steered by s2 and one by s1, for x and for y. The four
// constants are K times exact multiples of 1/8, rounded once to XY_FRAC
// fraction bits, with K the CORDIC gain of all N_ROT rotations.
//
// Interface: s1, s2 in; x4, y4 out, XY_FRAC+2 bit two's complement.
// Purely combinational.
module start_vector_mux
  import cordic_pkg::*;
#(
  parameter int unsigned N_ROT   = 19,
  parameter int unsigned XY_FRAC = 20,
  localparam int unsigned W      = XY_FRAC + 2
) (
  input  logic                s1,
  input  logic                s2,
  output logic signed [W-1:0] x4,
  output logic signed [W-1:0] y4
);

  localparam logic signed [W-1:0] C1  = W'(start_coord(N_ROT, XY_FRAC, 1));
  localparam logic signed [W-1:0] C7  = W'(start_coord(N_ROT, XY_FRAC, 7));
  localparam logic signed [W-1:0] C11 = W'(start_coord(N_ROT, XY_FRAC, 11));
  localparam logic signed [W-1:0] C13 = W'(start_coord(N_ROT, XY_FRAC, 13));

  logic signed [W-1:0] x_lo, x_hi, y_lo, y_hi;

  always_comb begin
    // first MUX level, steered by the direction of rotation 3
    x_lo = s2 ? C11 : C13;
    x_hi = s2 ? C1  : C7;
    y_lo = s2 ? C7  : C1;
    y_hi = s2 ? C13 : C11;
    // second MUX level, steered by the Sgn detector
    x4 = s1 ? x_hi : x_lo;
    y4 = s1 ? y_hi : y_lo;
  end

endmodule
