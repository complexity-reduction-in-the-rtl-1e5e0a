// tb_angle_row: checks the direction bits of the upper adder row.
//
// For random first-quadrant angles, and for each value of the Sgn input, the
// reference runs the plain CORDIC residual recursion
//   z1 = a, z2 = a - alpha1, z(i+1) = z(i) -/+ alpha_i
// with d2 forced to the Sgn input and d(i) = (z(i) >= 0) otherwise. Its
// angle table is derived here from $atan (truncated to 15 fraction bits),
// not taken from the design. All N_ROT direction bits must match.
module tb_angle_row;

  localparam int N_ROT = 19;

  logic [21:0]      angle;
  logic             sgn;
  logic [N_ROT-1:0] dir;
  int checks = 0;
  int failures = 0;
  longint alpha [N_ROT];

  angle_row #(.N_ROT(N_ROT)) dut (.angle, .sgn, .dir);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint z;
    logic [N_ROT-1:0] expd;
    for (int i = 0; i < N_ROT; i++)
      alpha[i] = longint'($floor($atan(2.0 ** (-i)) * 180.0 / 3.14159265358979 * 32768.0));
    for (int n = 0; n < 3000; n++) begin
      angle = 22'($urandom_range(90 * 32768));
      if (n < 4) angle = 22'(n * 45 * 16384);   // 0, 22.5, 45, 67.5 degrees
      sgn   = 1'($urandom);
      #1;
      z = longint'(angle);
      expd[0] = 1'b1;
      z = z - alpha[0];
      expd[1] = sgn;
      for (int i = 1; i < N_ROT - 1; i++) begin
        z = expd[i] ? z - alpha[i] : z + alpha[i];
        expd[i+1] = (z >= 0);
      end
      checks++;
      if (dir !== expd) begin
        failures++;
        $display("angle %0d sgn %0b: dir %b expected %b", angle, sgn, dir, expd);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
