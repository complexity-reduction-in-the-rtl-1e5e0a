// tb_error_sweep: error behaviour over 32768 input angles.
//
// The angles k * 90/32768 degrees, k = 0 .. 32767, are streamed through the
// CORDIC at its default parameters, one per clock. For each output the
// signed error against cos and sin in real arithmetic is recorded. The test
// reports the range of the cosine and sine errors, the mean cosine error and
// the accuracy in bits, n = -log2(max |error|), and requires at least 14
// bits for both functions.
module tb_error_sweep;

  localparam real PI = 3.14159265358979;
  localparam int  N  = 32768;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [21:0] angle;
  logic        out_valid;
  logic signed [16:0] cos_out, sin_out;

  int  checks = 0;
  int  failures = 0;
  int  received = 0;
  real cmin = 1.0, cmax = -1.0, smin = 1.0, smax = -1.0, csum = 0.0;

  cordic_final dut (.clk, .rst_n, .in_valid, .angle, .out_valid, .cos_out, .sin_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real deg, ec, es;
      deg = real'(received) * 90.0 / real'(N);
      ec  = real'(cos_out) / 32768.0 - $cos(deg * PI / 180.0);
      es  = real'(sin_out) / 32768.0 - $sin(deg * PI / 180.0);
      if (ec < cmin) cmin = ec;
      if (ec > cmax) cmax = ec;
      if (es < smin) smin = es;
      if (es > smax) smax = es;
      csum += ec;
      received++;
    end
  end

  initial begin
    real emax_c, emax_s, bits_c, bits_s;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    angle    = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < N; k++) begin
      angle    <= 22'(k * 90);         // k * 90/32768 degrees, 15 fraction bits
      in_valid <= 1'b1;
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    emax_c = (-cmin > cmax) ? -cmin : cmax;
    emax_s = (-smin > smax) ? -smin : smax;
    bits_c = -$ln(emax_c) / $ln(2.0);
    bits_s = -$ln(emax_s) / $ln(2.0);
    $display("cos error %e .. %e, mean %e, %f bits", cmin, cmax, csum / real'(N), bits_c);
    $display("sin error %e .. %e, %f bits", smin, smax, bits_s);
    checks++;
    if (received != N) begin
      failures++;
      $display("received %0d of %0d results", received, N);
    end
    checks++;
    if (bits_c < 14.0) failures++;
    checks++;
    if (bits_s < 14.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
