// rotation_stage: one micro-rotation of the unrolled CORDIC (one column of the
// middle and lower adder rows).
//
// With d the direction bit (1 = counter-clockwise) and SHIFT = i-1 for
// rotation i, it computes
//   x_out = x_in - y_in * 2^-SHIFT   (d = 1)   or  x_in + y_in * 2^-SHIFT  (d = 0)
//   y_out = y_in + x_in * 2^-SHIFT   (d = 1)   or  y_in - x_in * 2^-SHIFT  (d = 0)
// The scaling by 2^-SHIFT is a wired arithmetic shift (it truncates toward
// minus infinity), so each coordinate costs one adder/subtracter, as in the
// thesis. Both operands and results are W-bit two's complement values; the
// caller chooses W wide enough that no result overflows.
//
// Interface: x_in, y_in, d in; x_out, y_out out. Purely combinational.
module rotation_stage #(
  parameter int unsigned W     = 22,
  parameter int unsigned SHIFT = 3
) (
  input  logic signed [W-1:0] x_in,
  input  logic signed [W-1:0] y_in,
  input  logic                d,
  output logic signed [W-1:0] x_out,
  output logic signed [W-1:0] y_out
);

  logic signed [W-1:0] x_sh, y_sh;

  always_comb begin
    x_sh = x_in >>> SHIFT;
    y_sh = y_in >>> SHIFT;
    if (d) begin
      x_out = x_in - y_sh;
      y_out = y_in + x_sh;
    end else begin
      x_out = x_in + y_sh;
      y_out = y_in - x_sh;
    end
  end

endmodule
