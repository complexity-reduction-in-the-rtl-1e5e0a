// tb_xy_rows: checks rotations 4 .. N_ROT of the x/y adder rows.
//
// Random starting vectors of length up to about 1 and random direction bits
// are applied. The reference repeats the 16 micro-rotations on 64-bit
// integers with floor division by 2^(i-1). A second group of checks feeds
// the true starting vector of a known angle with the matching directions
// and compares the result with cos and sin in real arithmetic.
module tb_xy_rows;

  localparam int N_ROT = 19;
  localparam int FRAC  = 20;
  localparam int W     = FRAC + 2;

  logic signed [W-1:0] x4, y4, x, y;
  logic [N_ROT-1:3]    dir;
  int checks = 0;
  int failures = 0;

  xy_rows #(.N_ROT(N_ROT), .XY_FRAC(FRAC)) dut (.x4, .y4, .dir, .x, .y);

  function automatic longint floor_div(longint v, int s);
    longint p = longint'(1) << s;
    return (v >= 0) ? v / p : -((-v + p - 1) / p);
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint xr, yr, xn;
    real k, th, z, ang, ex, ey;
    // random vectors and directions, bit exact
    for (int n = 0; n < 2000; n++) begin
      x4  = W'(int'($urandom_range(1 << FRAC)) - (1 << (FRAC - 1)));
      y4  = W'(int'($urandom_range(1 << FRAC)) - (1 << (FRAC - 1)));
      dir = (N_ROT - 3)'($urandom);
      #1;
      xr = longint'(x4); yr = longint'(y4);
      for (int i = 4; i <= N_ROT; i++) begin
        if (dir[i-1]) begin
          xn = xr - floor_div(yr, i - 1); yr = yr + floor_div(xr, i - 1);
        end else begin
          xn = xr + floor_div(yr, i - 1); yr = yr - floor_div(xr, i - 1);
        end
        xr = xn;
      end
      checks++;
      if (longint'(x) != xr || longint'(y) != yr) begin
        failures++;
        $display("x4=%0d y4=%0d dir=%b: got %0d %0d expected %0d %0d",
                 x4, y4, dir, x, y, xr, yr);
      end
    end
    // known angles: start at 32.47 degrees on a circle of radius K*|(11,7)/8|
    k = 1.0;
    for (int i = 0; i < N_ROT; i++) k = k * $cos($atan(2.0 ** (-i)));
    for (int n = 0; n < 200; n++) begin
      ang = 18.5 + 26.0 * real'(n) / 200.0;    // inside the 18.43 .. 45 region
      th  = 45.0 - $atan(0.5) * 180.0 / 3.14159265358979
                 + $atan(0.25) * 180.0 / 3.14159265358979;
      x4  = W'(longint'($floor(k * 11.0 / 8.0 * 2.0 ** FRAC + 0.5)));
      y4  = W'(longint'($floor(k * 7.0 / 8.0 * 2.0 ** FRAC + 0.5)));
      z   = ang - th;
      for (int i = 4; i <= N_ROT; i++) begin
        dir[i-1] = (z >= 0.0);
        z = (z >= 0.0) ? z - $atan(2.0 ** (-(i - 1))) * 180.0 / 3.14159265358979
                       : z + $atan(2.0 ** (-(i - 1))) * 180.0 / 3.14159265358979;
      end
      #1;
      ex = real'(x) / 2.0 ** FRAC - $cos(ang * 3.14159265358979 / 180.0);
      ey = real'(y) / 2.0 ** FRAC - $sin(ang * 3.14159265358979 / 180.0);
      checks++;
      if (ex > 2.0e-5 || ex < -2.0e-5 || ey > 2.0e-5 || ey < -2.0e-5) begin
        failures++;
        $display("angle %f: error %e %e", ang, ex, ey);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
