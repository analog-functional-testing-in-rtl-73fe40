// mag_calc: magnitude A = sqrt(DC1^2 + DC2^2) of the analyser output.
//
// This is the third of the ways to get the magnitude from the two
// accumulator sums: it needs neither the phase nor a second measurement, and
// adds no error carried over from a phase estimate, at the cost of two
// squarers and a square root. The squares are formed when 'start' is seen;
// the root is then taken one result bit per clock with the digit-by-digit
// (shift/subtract) method. The method of computing the root is this design's
// choice.
//
// Interface and timing: pulse 'start' with DC1/DC2 valid. 'done' pulses
// ACC_W+3 cycles after the start cycle (35 with the defaults), with
// mag = floor(sqrt(DC1^2 + DC2^2)); 'mag' holds until the next start.
// 'busy' is high from the cycle after start until done.
module mag_calc #(
  parameter int ACC_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [ACC_W-1:0] dc1,
  input  logic signed [ACC_W-1:0] dc2,
  output logic                    busy,
  output logic                    done,
  output logic [ACC_W-1:0]        mag
);
  localparam int XW = 2 * ACC_W + 2;  // even width holding DC1^2 + DC2^2
  localparam int IT = XW / 2;

  logic [XW-1:0] op, res, one;
  logic [$clog2(IT+1)-1:0] n;
  logic run;

  logic signed [XW-1:0] d1x, d2x;
  logic [XW-1:0] sq_sum;
  assign d1x    = XW'(dc1);  // sign-extended
  assign d2x    = XW'(dc2);
  assign sq_sum = XW'(d1x * d1x) + XW'(d2x * d2x);

  logic [XW-1:0] trial;
  assign trial = res + one;

  assign busy = run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op   <= '0;
      res  <= '0;
      one  <= '0;
      n    <= '0;
      run  <= 1'b0;
      done <= 1'b0;
      mag  <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          op  <= sq_sum;
          res <= '0;
          one <= XW'(1) << (XW - 2);
          n   <= '0;
          run <= 1'b1;
        end
      end else if (n == ($bits(n))'(IT)) begin
        mag  <= ACC_W'(res);
        done <= 1'b1;
        run  <= 1'b0;
      end else begin
        if (op >= trial) begin
          op  <= op - trial;
          res <= (res >> 1) + one;
        end else begin
          res <= res >> 1;
        end
        one <= one >> 2;
        n   <= n + 1'b1;
      end
    end
  end
endmodule
