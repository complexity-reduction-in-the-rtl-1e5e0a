// cordic_final: unrolled sine/cosine CORDIC in which the first three
// micro-rotations and the first angle adder are replaced by MUXes.
//
// A first-quadrant angle a (degrees) is captured in an input register. The
// Sgn detector reads its top six bits and tells whether a is above 45
// degrees; that bit steers a MUX choosing the threshold of the first
// remaining angle adder. The upper adder row (angle_row) then produces the
// direction of every rotation. The first two direction bits pick one of four
// precomputed starting vectors (start_vector_mux), and rotations 4 .. N_ROT
// (xy_rows) turn it onto the unit circle at angle a. The final x and y are
// cos(a) and sin(a); they are truncated to OUT_FRAC fraction bits and
// registered.
//
// Interface: angle is 22-bit unsigned with 15 fraction bits, valid range
// 0 .. 90 degrees. cos_out and sin_out are OUT_FRAC+2 bit two's complement
// (sign, one integer bit, OUT_FRAC fraction bits). rst_n is an asynchronous,
// active-low reset that clears both registers.
// Timing: a sample taken with in_valid at one rising clock edge appears on
// cos_out/sin_out, with out_valid, after the next rising edge (latency 1
// cycle, one new angle per cycle). Everything between the two registers is
// one combinational path.
//
// From the thesis: the rotation count (19 coefficient angles), the angle
// format, the Sgn detector, the MUX replacing the first angle adder, the six
// start-vector MUXes and the truncation of the outputs to 15 fraction bits.
// Choices of this design: the valid/reset handshake, the x/y width
// (XY_FRAC = 20 fraction bits) and a starting length equal to the gain of all
// 19 rotations.
module cordic_final
  import cordic_pkg::*;
#(
  parameter int unsigned N_ROT    = 19,
  parameter int unsigned XY_FRAC  = 20,
  parameter int unsigned OUT_FRAC = 15,
  localparam int unsigned W       = XY_FRAC + 2,
  localparam int unsigned OUT_W   = OUT_FRAC + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [IN_W-1:0]         angle,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] cos_out,
  output logic signed [OUT_W-1:0] sin_out
);

  if (OUT_FRAC > XY_FRAC) begin : g_bad_out_frac
    $error("cordic_final: OUT_FRAC must not exceed XY_FRAC");
  end

  logic            valid_q;
  logic [IN_W-1:0] angle_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      angle_q <= '0;
    end else begin
      valid_q <= in_valid;
      if (in_valid) angle_q <= angle;
    end
  end

  logic                sgn;
  logic [N_ROT-1:0]    dir;
  logic signed [W-1:0] x4, y4, x, y;

  sgn_detector u_sgn (
    .angle_hi(angle_q[IN_W-1 -: 6]),
    .sgn     (sgn)
  );

  angle_row #(.N_ROT(N_ROT)) u_angle (
    .angle(angle_q),
    .sgn  (sgn),
    .dir  (dir)
  );

  start_vector_mux #(.N_ROT(N_ROT), .XY_FRAC(XY_FRAC)) u_start (
    .s1(dir[1]),
    .s2(dir[2]),
    .x4(x4),
    .y4(y4)
  );

  xy_rows #(.N_ROT(N_ROT), .XY_FRAC(XY_FRAC)) u_xy (
    .x4 (x4),
    .y4 (y4),
    .dir(dir[N_ROT-1:3]),
    .x  (x),
    .y  (y)
  );

  // Truncation to OUT_FRAC fraction bits: the XY_FRAC - OUT_FRAC lowest
  // bits of x and y are dropped (the lint tool reports them as unused).
  localparam int unsigned DROP = XY_FRAC - OUT_FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      cos_out   <= '0;
      sin_out   <= '0;
    end else begin
      out_valid <= valid_q;
      if (valid_q) begin
        cos_out <= x[W-1:DROP];
        sin_out <= y[W-1:DROP];
      end
    end
  end

endmodule
