// sgn_detector: decides whether the input angle lies in the upper half of the
// first quadrant, without an adder.
//
// It looks only at the six most significant bits of the 22-bit input angle
// (bits 21..16, weights 64, 32, 16, 8, 4 and 2 degrees) and evaluates
//   sgn = a21 | a20 & a19 | a20 & a18 & a17 & a16,
// the logic function the thesis gives for its Sgn detector (a two-level
// NAND network). With two-degree resolution the function is true for angles
// of 46 degrees and above, so angles in [45, 46) take the lower branch. That
// is harmless: the starting vector then sits at 32.47 degrees and the
// rotations that follow can still reach up to 32.47 + 14.28 degrees.
//
// Interface: angle_hi = input angle bits 21..16; sgn = 1 means "above 45
// degrees" (rotation 2 is counter-clockwise). Purely combinational.
module sgn_detector (
  input  logic [5:0] angle_hi,
  output logic       sgn
);

  // angle_hi[5] .. angle_hi[0] are input angle bits 21 .. 16.
  always_comb begin
    sgn = angle_hi[5]
        | (angle_hi[4] & angle_hi[3])
        | (angle_hi[4] & angle_hi[2] & angle_hi[1] & angle_hi[0]);
  end

endmodule
