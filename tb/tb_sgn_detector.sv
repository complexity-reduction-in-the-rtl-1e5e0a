// tb_sgn_detector: exhaustive check of the Sgn detector.
//
// All 64 values of the six upper angle bits are applied. The reference is
// the comparison "lower bound of the 2-degree bin >= 46 degrees" worked out
// from the bit weights (bit 21 = 64 degrees ... bit 16 = 2 degrees). A second
// pass applies every whole degree 0 .. 90 and checks that angles of 46 and
// above, and only those, report "above 45".
module tb_sgn_detector;

  logic [5:0] angle_hi;
  logic       sgn;
  int         checks = 0;
  int         failures = 0;

  sgn_detector dut (.angle_hi(angle_hi), .sgn(sgn));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    logic [21:0] a;
    for (int v = 0; v < 64; v++) begin
      angle_hi = 6'(v);
      #1;
      expected = (v * 2 >= 46);
      checks++;
      if (sgn !== expected) begin
        failures++;
        $display("bits %06b: sgn=%0b expected %0b", angle_hi, sgn, expected);
      end
    end
    for (int deg = 0; deg <= 90; deg++) begin
      a = 22'(deg << 15);
      angle_hi = a[21:16];
      #1;
      checks++;
      if (sgn !== (deg >= 46)) begin
        failures++;
        $display("%0d degrees: sgn=%0b", deg, sgn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
