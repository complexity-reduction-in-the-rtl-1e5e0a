// tb_cordic_final: end-to-end test of the CORDIC at its default parameters.
//
// A stream of angles (corner values, the boundaries of the four start
// regions, the 45..46 degree band the Sgn detector treats as "below 45", and
// random first-quadrant angles) is fed with in_valid, with idle cycles mixed
// in. Every result must arrive exactly one clock after its input was sampled
// and match cos and sin, computed in real arithmetic, within 2^-14. The test
// also counts how often each mechanism of the design was exercised: each of
// the four starting vectors, each setting of the angle-constant MUX, and the
// 45..46 degree band. A mechanism never seen counts as a failure. Reset is
// checked to clear out_valid.
module tb_cordic_final;

  localparam real PI  = 3.14159265358979;
  localparam real TOL = 2.0 ** (-14);
  localparam int  N_RANDOM = 4000;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  logic [21:0] angle;
  logic        out_valid;
  logic signed [16:0] cos_out, sin_out;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  int region_count [4];
  int mux_hi_count = 0, mux_lo_count = 0, band_count = 0;
  real max_err = 0.0;

  cordic_final dut (.clk, .rst_n, .in_valid, .angle, .out_valid, .cos_out, .sin_out);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, in issue order, with the cycle they were sampled in
  logic [21:0] exp_angle [$];
  int          exp_cycle [$];

  // Inputs change and outputs are checked at falling edges, so nothing races
  // with the design's rising-edge registers.

  // count mechanisms on the cycle the core evaluates a sample
  always @(negedge clk) begin
    if (rst_n && dut.valid_q) begin
      region_count[{dut.dir[1], dut.dir[2]}]++;
      if (dut.sgn) mux_hi_count++; else mux_lo_count++;
      if (dut.angle_q >= 22'(45 << 15) && dut.angle_q < 22'(46 << 15)) band_count++;
    end
  end

  // scoreboard
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      logic [21:0] a;
      int          c;
      real         deg, ec, es;
      checks++;
      if (exp_angle.size() == 0) begin
        failures++;
        $display("unexpected output");
      end else begin
        a = exp_angle.pop_front();
        c = exp_cycle.pop_front();
        deg = real'(a) / 32768.0;
        ec  = real'(cos_out) / 32768.0 - $cos(deg * PI / 180.0);
        es  = real'(sin_out) / 32768.0 - $sin(deg * PI / 180.0);
        if (ec < 0) ec = -ec;
        if (es < 0) es = -es;
        if (ec > max_err) max_err = ec;
        if (es > max_err) max_err = es;
        if (ec > TOL || es > TOL) begin
          failures++;
          $display("angle %f: cos %f sin %f, errors %e %e", deg,
                   real'(cos_out) / 32768.0, real'(sin_out) / 32768.0, ec, es);
        end
        checks++;
        if (cycle - c != 1) begin
          failures++;
          $display("angle %f: latency %0d cycles, expected 1", deg, cycle - c);
        end
      end
    end
  end

  // Called at a falling edge: present one angle for one cycle. It is sampled
  // at the next rising edge, which will be edge number cycle + 1.
  task automatic issue(logic [21:0] a);
    angle    = a;
    in_valid = 1'b1;
    exp_angle.push_back(a);
    exp_cycle.push_back(cycle + 1);
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  function automatic logic [21:0] deg_code(real d);
    return 22'(longint'($floor(d * 32768.0)));
  endfunction

  initial begin
    real edges [8] = '{0.0, 18.43, 18.44, 45.0, 45.99, 46.0, 71.56, 90.0};
    rst_n    = 1'b0;
    in_valid = 1'b0;
    angle    = '0;
    repeat (3) @(posedge clk);
    checks++;
    if (out_valid !== 1'b0) begin
      failures++;
      $display("out_valid set during reset");
    end
    @(negedge clk);
    rst_n = 1'b1;
    foreach (edges[i]) issue(deg_code(edges[i]));
    for (int d = 0; d <= 90; d++) issue(22'(d << 15));
    for (int n = 0; n < 50; n++) issue(22'((45 << 15) + $urandom_range(32767)));
    for (int n = 0; n < N_RANDOM; n++) begin
      issue(22'($urandom_range(90 << 15)));
      if ($urandom_range(3) == 0) @(negedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (exp_angle.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_angle.size());
    end
    $display("start vectors used: 4.40:%0d 32.47:%0d 57.53:%0d 85.60:%0d",
             region_count[0], region_count[1], region_count[2], region_count[3]);
    $display("angle MUX 71.57:%0d 18.43:%0d, 45..46 band:%0d, max error %e (%f bits)",
             mux_hi_count, mux_lo_count, band_count, max_err, -$ln(max_err) / $ln(2.0));
    foreach (region_count[i]) begin
      checks++;
      if (region_count[i] == 0) begin
        failures++;
        $display("start vector %0d never used", i);
      end
    end
    checks += 3;
    if (mux_hi_count == 0) failures++;
    if (mux_lo_count == 0) failures++;
    if (band_count == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
