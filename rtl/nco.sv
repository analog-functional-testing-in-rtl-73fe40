// nco: numerically controlled oscillator of the DDS test pattern generator.
//
// Each clock the n-bit phase accumulator adds the frequency word fw, so the
// tone frequency is f = fw * f_clk / 2**n. The initial phase word theta is
// added after the accumulator, the sum is truncated to its top p bits and
// those address a sine/cosine look-up table. This is the structure of the
// classic NCO (accumulator, phase adder, truncation, LUT). The widths, the
// synchronous 'restart' that zeroes the accumulator, the full-wave table
// (computed at elaboration, amplitude 2**(W-1)-1, round to nearest) and the
// registered outputs are this design's choices.
//
// Timing: after a cycle with restart=1 the accumulator is 0; the outputs are
// registered, so sin_o/cos_o in cycle k+1 show the table value of the phase
// held in cycle k: sin_o = round(A*sin(2*pi*(acc+theta)[n-1:n-p]/2**p)).
module nco #(
  parameter int PHASE_W = 16,
  parameter int TRUNC_W = 8,
  parameter int SAMPLE_W = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       restart,  // zero the phase accumulator
  input  logic [PHASE_W-1:0]         fw,       // frequency word
  input  logic [PHASE_W-1:0]         theta,    // initial phase word
  output logic signed [SAMPLE_W-1:0] sin_o,
  output logic signed [SAMPLE_W-1:0] cos_o
);
  typedef logic signed [SAMPLE_W-1:0] lut_t [2**TRUNC_W];

  function automatic lut_t make_lut(input bit cosine);
    lut_t t;
    real amp, ang;
    amp = 2.0 ** (SAMPLE_W - 1) - 1.0;
    for (int i = 0; i < 2 ** TRUNC_W; i++) begin
      ang = 2.0 * 3.14159265358979 * i / (2.0 ** TRUNC_W);
      t[i] = SAMPLE_W'($rtoi($floor(amp * (cosine ? $cos(ang) : $sin(ang)) + 0.5)));
    end
    return t;
  endfunction

  localparam lut_t SIN_LUT = make_lut(1'b0);
  localparam lut_t COS_LUT = make_lut(1'b1);

  logic [PHASE_W-1:0] acc;
  logic [PHASE_W-1:0] phase;
  logic [TRUNC_W-1:0] addr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       acc <= '0;
    else if (restart) acc <= '0;
    else              acc <= acc + fw;
  end

  assign phase = acc + theta;
  assign addr  = phase[PHASE_W-1 -: TRUNC_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sin_o <= '0;
      cos_o <= '0;
    end else begin
      sin_o <= SIN_LUT[addr];
      cos_o <= COS_LUT[addr];
    end
  end
endmodule
