// xy_rows: the middle (x) and lower (y) adder rows of the CORDIC after the
// eliminated stages, i.e. rotations 4 .. N_ROT.
//
// The starting vector (x4, y4) enters on the left; rotation i adds or
// subtracts the other coordinate shifted right by i-1 bits, in the direction
// dir[i-1] given by the upper adder row. After the last rotation the vector
// lies on the unit circle at the input angle, so x = cos and y = sin.
//
// Interface: x4, y4 = starting vector; dir = direction bits of rotations
// 4 .. N_ROT (dir[i-1] steers rotation i); x, y = final vector. All x/y
// values are XY_FRAC+2 bit two's complement. Purely combinational.
module xy_rows #(
  parameter int unsigned N_ROT   = 19,
  parameter int unsigned XY_FRAC = 20,
  localparam int unsigned W      = XY_FRAC + 2
) (
  input  logic signed [W-1:0] x4,
  input  logic signed [W-1:0] y4,
  input  logic [N_ROT-1:3]    dir,
  output logic signed [W-1:0] x,
  output logic signed [W-1:0] y
);

  // xs[i], ys[i]: vector ahead of rotation i
  logic signed [W-1:0] xs [4:N_ROT+1];
  logic signed [W-1:0] ys [4:N_ROT+1];

  assign xs[4] = x4;
  assign ys[4] = y4;

  for (genvar i = 4; i <= N_ROT; i++) begin : g_rot
    rotation_stage #(.W(W), .SHIFT(i - 1)) u_stage (
      .x_in (xs[i]),
      .y_in (ys[i]),
      .d    (dir[i-1]),
      .x_out(xs[i+1]),
      .y_out(ys[i+1])
    );
  end

  assign x = xs[N_ROT+1];
  assign y = ys[N_ROT+1];

endmodule
