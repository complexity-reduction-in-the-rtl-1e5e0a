// angle_row: the upper adder row of the unrolled CORDIC. It tracks the
// residual angle and produces the direction bit of every micro-rotation.
//
// Rotation 1 (+45 degrees) is always counter-clockwise for a first-quadrant
// angle, and the direction of rotation 2 comes from the Sgn detector (input
// sgn). The adder that would compute a - 45 is therefore not built: a MUX
// picks the constant alpha_1 + alpha_2 (71.565 degrees, sgn = 1) or
// alpha_1 - alpha_2 (18.435 degrees, sgn = 0) and one adder forms the
// residual z3 = a - constant. From there each adder forms
//   z(i+1) = z(i) - alpha_i  when d_i = 1,  z(i) + alpha_i  when d_i = 0,
// with d_i = 1 exactly when z(i) >= 0. The row holds N_ROT - 2 adders.
//
// Interface: angle = 22-bit unsigned input angle (15 fraction bits, degrees);
// sgn = Sgn detector output; dir[k] = direction of rotation k+1 (1 =
// counter-clockwise), k = 0 .. N_ROT-1; dir[0] is constant 1 and dir[1]
// equals sgn. Purely combinational.
module angle_row
  import cordic_pkg::*;
#(
  parameter int unsigned N_ROT = 19
) (
  input  logic [IN_W-1:0]  angle,
  input  logic             sgn,
  output logic [N_ROT-1:0] dir
);

  if (N_ROT < 4 || N_ROT > MAX_ROT) begin : g_bad_n_rot
    $error("angle_row: N_ROT must lie in 4 .. %0d", MAX_ROT);
  end

  // z[i] is the residual angle ahead of rotation i (only i >= 3 is built).
  angle_t z [3:N_ROT];

  always_comb begin
    z[3] = angle_t'({1'b0, angle}) - (sgn ? ANGLE_HI : ANGLE_LO);
    for (int unsigned i = 3; i < N_ROT; i++)
      z[i+1] = z[i][ANGLE_W-1] ? z[i] + ALPHA[i-1] : z[i] - ALPHA[i-1];
    dir[0] = 1'b1;
    dir[1] = sgn;
    for (int unsigned i = 3; i <= N_ROT; i++)
      dir[i-1] = ~z[i][ANGLE_W-1];
  end

endmodule
