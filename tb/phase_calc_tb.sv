// phase_calc_tb: self-checking testbench of the phase-delay unit.
//
// DC1/DC2 pairs are drawn in all eight octants, on the octant borders (axes
// and diagonals), with small ratios (linear path) and with extreme values.
// The expected phase is atan2(DC2, DC1) computed here in floating point and
// converted to the 12-bit binary angle; the unit must agree within
// TOL angle units (0.35 deg). The latency start -> done (RATIO_W + 3 cycles)
// is checked on every pair, and each octant and both the table and the
// linear path must have been used at least once.
module phase_calc_tb;
  localparam int AW = 32, ANG = 12, RW = 12;
  localparam int TOL = 4;
  localparam real PI = 3.14159265358979;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [AW-1:0] dc1 = '0, dc2 = '0;
  logic busy, done, linear;
  logic [ANG-1:0] phase;
  int checks = 0, failures = 0;
  int octant_hits[8];
  int lin_hits = 0, lut_hits = 0;

  phase_calc #(.ACC_W(AW), .ANG_W(ANG), .RATIO_W(RW)) dut (
    .clk, .rst_n, .start, .dc1, .dc2, .busy, .done, .phase, .linear);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input longint a, input longint b);
    real ang;
    int expv, diff, lat;
    dc1 = AW'(a); dc2 = AW'(b);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    if (a == 0 && b == 0) ang = 0.0;
    else ang = $atan2(real'(b), real'(a));
    if (ang < 0.0) ang = ang + 2.0 * PI;
    expv = $rtoi($floor(ang / (2.0 * PI) * 4096.0 + 0.5)) % 4096;
    diff = int'(phase) - expv;
    if (diff > 2048) diff -= 4096;
    if (diff < -2048) diff += 4096;
    checks++;
    if (diff > TOL || diff < -TOL) begin
      failures++;
      if (failures < 15) $display("dc1=%0d dc2=%0d phase=%0d expected=%0d", a, b, phase, expv);
    end
    checks++;
    if (lat != RW + 3) begin
      failures++;
      $display("latency %0d, expected %0d", lat, RW + 3);
    end
    if (!(a == 0 && b == 0)) octant_hits[int'(ang / (PI / 4.0)) % 8]++;
    if (linear) lin_hits++; else lut_hits++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // axes and diagonals
    one(1000, 0); one(0, 1000); one(-1000, 0); one(0, -1000);
    one(777, 777); one(-777, 777); one(-777, -777); one(777, -777);
    one(0, 0);
    one(2147483647, -64'sd2147483648); one(-64'sd2147483648, 5);
    // small ratios
    one(100000, 3); one(-100000, 1234); one(5, -90000); one(-4321, -40000);
    // random, all octants
    for (int i = 0; i < 3000; i++) begin
      longint a, b;
      int sh;
      sh = $urandom_range(0, 30);
      a = longint'(int'($urandom)) >>> sh;
      b = longint'(int'($urandom)) >>> $urandom_range(0, 30);
      one(a, b);
    end
    for (int o = 0; o < 8; o++) begin
      checks++;
      if (octant_hits[o] == 0) begin failures++; $display("octant %0d never used", o); end
    end
    checks++;
    if (lin_hits == 0 || lut_hits == 0) begin
      failures++; $display("linear path used %0d, table %0d times", lin_hits, lut_hits);
    end
    $display("linear path %0d, table path %0d", lin_hits, lut_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
