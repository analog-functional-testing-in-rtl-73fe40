// mag_calc_tb: self-checking testbench of the magnitude unit.
//
// For random, small and extreme DC1/DC2 pairs the result r must be the
// integer square root of x = DC1^2 + DC2^2, i.e. r^2 <= x < (r+1)^2, checked
// with 128-bit arithmetic here. The latency start -> done (ACC_W + 3 cycles)
// and the busy flag are checked too.
module mag_calc_tb;
  localparam int AW = 32;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic signed [AW-1:0] dc1 = '0, dc2 = '0;
  logic busy, done;
  logic [AW-1:0] mag;
  int checks = 0, failures = 0;

  mag_calc #(.ACC_W(AW)) dut (.clk, .rst_n, .start, .dc1, .dc2, .busy, .done, .mag);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input longint a, input longint b);
    logic [127:0] x, r, r1;
    int lat;
    dc1 = AW'(a); dc2 = AW'(b);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    lat = 1;
    checks++;
    if (!busy) begin failures++; $display("not busy after start"); end
    while (!done && lat < 200) begin @(negedge clk); lat++; end
    x  = 128'(a * a) + 128'(b * b);
    r  = 128'(mag);
    r1 = r + 1;
    checks++;
    if (!(r * r <= x && x < r1 * r1)) begin
      failures++;
      if (failures < 10) $display("dc1=%0d dc2=%0d mag=%0d", a, b, mag);
    end
    checks++;
    if (lat != AW + 3) begin failures++; $display("latency %0d", lat); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    one(0, 0); one(3, 4); one(-3, 4); one(1, 1); one(-64'sd2147483648, -64'sd2147483648);
    one(2147483647, -64'sd2147483648); one(0, -64'sd2147483648); one(65535, 0);
    for (int i = 0; i < 2000; i++)
      one(longint'(int'($urandom)) >>> $urandom_range(0, 31), longint'(int'($urandom)) >>> $urandom_range(0, 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
