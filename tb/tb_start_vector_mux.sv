// tb_start_vector_mux: checks the four starting vectors.
//
// The expected vector is obtained by rotating (K, 0) by +45 degrees and then
// by -/+26.57 and -/+14.04 degrees in real arithmetic, with K the product of
// cos(atan(2^-i)) over the 19 rotations. Each coordinate must agree with the
// design within one least significant bit (20 fraction bits).
module tb_start_vector_mux;

  localparam int N_ROT = 19;
  localparam int FRAC  = 20;
  localparam int W     = FRAC + 2;

  logic s1, s2;
  logic signed [W-1:0] x4, y4;
  int checks = 0;
  int failures = 0;

  start_vector_mux #(.N_ROT(N_ROT), .XY_FRAC(FRAC)) dut (.s1, .s2, .x4, .y4);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real k, x, y, xn, t, ex, ey;
    k = 1.0;
    for (int i = 0; i < N_ROT; i++) k = k * $cos($atan(2.0 ** (-i)));
    for (int sel = 0; sel < 4; sel++) begin
      s1 = sel[1];
      s2 = sel[0];
      x = k; y = 0.0;
      for (int i = 0; i < 3; i++) begin
        t  = 2.0 ** (-i);
        if (i == 0 || (i == 1 && s1) || (i == 2 && s2)) begin
          xn = x - y * t; y = y + x * t;
        end else begin
          xn = x + y * t; y = y - x * t;
        end
        x = xn;
      end
      #1;
      ex = real'(x4) / (2.0 ** FRAC) - x;
      ey = real'(y4) / (2.0 ** FRAC) - y;
      checks++;
      if (ex > 2.0 ** (-FRAC) || ex < -(2.0 ** (-FRAC)) ||
          ey > 2.0 ** (-FRAC) || ey < -(2.0 ** (-FRAC))) begin
        failures++;
        $display("s1=%0b s2=%0b: got (%f, %f), expected (%f, %f)",
                 s1, s2, real'(x4) / (2.0 ** FRAC), real'(y4) / (2.0 ** FRAC), x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
