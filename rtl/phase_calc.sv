// phase_calc: phase delay atan2(DC2, DC1) of the analyser output, 0..360 deg.
//
// The arctangent table only has to cover 0..45 deg. The unit takes the
// absolute values of DC1 and DC2, divides the smaller by the larger
// (ratio r in [0,1]), looks up phi_f = atan(r) and maps phi_f back into the
// right octant from the two signs and from which magnitude was larger:
//                 DC1>=0,DC2>=0  DC1<0,DC2>=0  DC1<0,DC2<0  DC1>=0,DC2<0
//   |DC1|>=|DC2|  phi_f          180-phi_f     180+phi_f    360-phi_f
//   |DC1|< |DC2|  90-phi_f       90+phi_f      270-phi_f    270+phi_f
// The table is compressed further: for r < 2**-SMALL_LOG2 the arctangent is
// taken as r itself (first term of its Taylor series), so the table holds
// only the entries for r >= 2**-SMALL_LOG2. The 45-deg table, the octant
// mapping and the small-ratio approximation are the method of the BIST; the
// bit-serial divider, the table sizes, mid-bin table values and the binary
// angle output (2**ANG_W = 360 deg) are this design's choices.
//
// Interface and timing: pulse 'start' with DC1/DC2 valid (they are captured
// then). A restoring divider takes RATIO_W+1 cycles, one more cycle maps
// the octant; 'done' pulses for one cycle, RATIO_W+3 cycles after the start
// cycle (15 with the defaults), with 'phase' valid, and 'phase'
// holds until the next start. 'linear' tells that the small-ratio path was
// used. DC1 = DC2 = 0 gives phase 0. 'busy' is high from start to done.
module phase_calc #(
  parameter int ACC_W = 32,
  parameter int ANG_W = 12,
  parameter int RATIO_W = 12,   // fraction bits of r
  parameter int LUT_AW = 8,     // table resolution: 2**LUT_AW bins over [0,1)
  parameter int SMALL_LOG2 = 3  // linear region r < 2**-SMALL_LOG2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic signed [ACC_W-1:0] dc1,
  input  logic signed [ACC_W-1:0] dc2,
  output logic                    busy,
  output logic                    done,
  output logic [ANG_W-1:0]        phase,
  output logic                    linear
);
  localparam int LUT_LO = 2 ** (LUT_AW - SMALL_LOG2);  // first table bin kept
  localparam int LUT_N  = 2 ** LUT_AW - LUT_LO;
  localparam real PI = 3.14159265358979;
  localparam int KF = 10;
  // atan(r) ~ r rad = r * 2**ANG_W / (2*pi) angle units
  localparam int unsigned K_LIN = int'(2.0 ** (ANG_W + KF) / (2.0 * PI));
  localparam logic [ANG_W-1:0] Q90 = ANG_W'(2 ** (ANG_W - 2));
  localparam logic [ANG_W-1:0] Q45 = ANG_W'(2 ** (ANG_W - 3));

  typedef logic [ANG_W-1:0] lut_t [LUT_N];
  function automatic lut_t make_lut();
    lut_t t;
    for (int i = 0; i < LUT_N; i++)
      t[i] = ANG_W'($rtoi($floor($atan((real'(i + LUT_LO) + 0.5) / 2.0 ** LUT_AW)
                                   * 2.0 ** ANG_W / (2.0 * PI) + 0.5)));
    return t;
  endfunction
  localparam lut_t ATAN_LUT = make_lut();

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_MAP} state_e;
  state_e state;

  logic [ACC_W-1:0]   den;
  logic [ACC_W:0]     rem;
  logic [RATIO_W:0]   q;
  logic [$clog2(RATIO_W+2)-1:0] k;
  logic neg1, neg2, swap;

  logic [ACC_W-1:0] a_abs, b_abs;
  assign a_abs = dc1[ACC_W-1] ? ACC_W'(-dc1) : ACC_W'(dc1);
  assign b_abs = dc2[ACC_W-1] ? ACC_W'(-dc2) : ACC_W'(dc2);

  // phi_f from the ratio: linear below 2**-SMALL_LOG2, table above.
  logic [ANG_W-1:0] phi_f;
  logic             use_lin;
  logic [RATIO_W+KF+ANG_W:0] lin_prod;
  logic [LUT_AW-1:0] bin;
  always_comb begin
    use_lin  = (q < (RATIO_W+1)'(2 ** (RATIO_W - SMALL_LOG2)));
    lin_prod = (RATIO_W+KF+ANG_W+1)'(q) * (RATIO_W+KF+ANG_W+1)'(K_LIN);
    bin      = q[RATIO_W-1 -: LUT_AW];
    if (q[RATIO_W])   phi_f = Q45;  // r = 1
    else if (use_lin) phi_f = ANG_W'(lin_prod >> (RATIO_W + KF));
    else              phi_f = ATAN_LUT[int'(bin) - LUT_LO];
  end

  logic [ANG_W-1:0] mapped;
  always_comb begin
    unique case ({neg1, neg2})
      2'b00: mapped = swap ? Q90 - phi_f       : phi_f;
      2'b10: mapped = swap ? Q90 + phi_f       : 2*Q90 - phi_f;
      2'b11: mapped = swap ? 3*Q90 - phi_f     : 2*Q90 + phi_f;
      2'b01: mapped = swap ? 3*Q90 + phi_f     : ANG_W'(0) - phi_f;
      default: mapped = phi_f;
    endcase
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      den    <= '0;
      rem    <= '0;
      q      <= '0;
      k      <= '0;
      neg1   <= 1'b0;
      neg2   <= 1'b0;
      swap   <= 1'b0;
      done   <= 1'b0;
      phase  <= '0;
      linear <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          neg1  <= dc1[ACC_W-1];
          neg2  <= dc2[ACC_W-1];
          swap  <= b_abs > a_abs;
          den   <= (b_abs > a_abs) ? b_abs : a_abs;
          rem   <= {1'b0, (b_abs > a_abs) ? a_abs : b_abs};
          q     <= '0;
          k     <= '0;
          state <= S_DIV;
        end
        S_DIV: begin
          // Quotient bits from weight 2**RATIO_W down to 2**0.
          if (den != '0 && rem >= {1'b0, den}) begin
            q   <= {q[RATIO_W-1:0], 1'b1};
            rem <= (rem - {1'b0, den}) << 1;
          end else begin
            q   <= {q[RATIO_W-1:0], 1'b0};
            rem <= rem << 1;
          end
          if (k == ($bits(k))'(RATIO_W)) state <= S_MAP;
          k <= k + 1'b1;
        end
        S_MAP: begin
          phase  <= (den == '0) ? '0 : mapped;
          linear <= use_lin && !q[RATIO_W];
          done   <= 1'b1;
          state  <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
