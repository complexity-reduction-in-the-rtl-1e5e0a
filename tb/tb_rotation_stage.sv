// tb_rotation_stage: random check of single micro-rotations.
//
// Two instances (shift 3 and shift 11) get random coordinates in [-1.5, 1.5)
// and random directions. The expected result is formed with floor division
// by 2^shift on 64-bit integers, i.e. without the shift operator the design
// uses.
module tb_rotation_stage;

  localparam int W = 22;
  localparam int S_A = 3;
  localparam int S_B = 11;

  logic signed [W-1:0] x_in, y_in;
  logic                d;
  logic signed [W-1:0] xa, ya, xb, yb;
  int checks = 0;
  int failures = 0;

  rotation_stage #(.W(W), .SHIFT(S_A)) dut_a (.x_in, .y_in, .d, .x_out(xa), .y_out(ya));
  rotation_stage #(.W(W), .SHIFT(S_B)) dut_b (.x_in, .y_in, .d, .x_out(xb), .y_out(yb));

  function automatic longint floor_div(longint v, int s);
    longint p = longint'(1) << s;
    return (v >= 0) ? v / p : -((-v + p - 1) / p);
  endfunction

  task automatic check(int s, logic signed [W-1:0] xo, logic signed [W-1:0] yo);
    longint xe, ye, xi, yi;
    xi = longint'(x_in);
    yi = longint'(y_in);
    xe = d ? xi - floor_div(yi, s) : xi + floor_div(yi, s);
    ye = d ? yi + floor_div(xi, s) : yi - floor_div(xi, s);
    checks++;
    if (longint'(xo) != xe || longint'(yo) != ye) begin
      failures++;
      $display("shift %0d d=%0b x=%0d y=%0d -> %0d %0d, expected %0d %0d",
               s, d, x_in, y_in, xo, yo, xe, ye);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    localparam int RANGE = 3 << (W - 3);   // 1.5 with W-2 fraction bits
    for (int n = 0; n < 2000; n++) begin
      x_in = W'(int'($urandom_range(2 * RANGE - 1)) - RANGE);
      y_in = W'(int'($urandom_range(2 * RANGE - 1)) - RANGE);
      d    = 1'($urandom);
      #1;
      check(S_A, xa, ya);
      check(S_B, xb, yb);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
