// tpg: DDS-based test pattern generator.
//
// Three NCOs run from the same clock. MUX1 picks the stimulus sent to the
// DAC: NCO1, NCO2, or the two-tone sum (NCO1 + NCO2) halved so that it fits
// the DAC word. MUX2 picks the in-phase reference f1(nT) for the analyser's
// MUL1 from the same choices; NCO3's sine is the quadrature reference f2(nT)
// for MUL2. That is the generator structure of the BIST: three NCOs, an
// adder, two multiplexers. The halving of the sum and the extra MUX2 input,
// NCO3's cosine (a reference at the swept frequency while NCO1 and NCO2 are
// busy making a two-tone or a fixed tone), are this design's choices. A
// selection of SRC_NCO3_COS on MUX1 sends NCO3's cosine to the DAC as well.
//
// Timing: all three outputs are registered and aligned: they show, two clocks
// later, the tone phases the accumulators held (NCO output register + MUX
// register). 'restart' restarts all three NCOs together.
module tpg
  import bist_pkg::*;
#(
  parameter int PHASE_W = bist_pkg::DEF_PHASE_W,
  parameter int TRUNC_W = bist_pkg::DEF_TRUNC_W,
  parameter int SAMPLE_W = bist_pkg::DEF_SAMPLE_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       restart,
  input  logic [2:0][PHASE_W-1:0]    fw,      // index 0 = NCO1
  input  logic [2:0][PHASE_W-1:0]    theta,
  input  tone_sel_e                  mux1_sel,
  input  tone_sel_e                  mux2_sel,
  output logic signed [SAMPLE_W-1:0] stim,    // to the DAC
  output logic signed [SAMPLE_W-1:0] ref_i,   // f1(nT), to MUL1
  output logic signed [SAMPLE_W-1:0] ref_q    // f2(nT), to MUL2
);
  logic signed [SAMPLE_W-1:0] s1, s2, s3, c1, c2, c3;
  logic signed [SAMPLE_W:0]   sum;
  logic signed [SAMPLE_W-1:0] half_sum;

  nco #(.PHASE_W(PHASE_W), .TRUNC_W(TRUNC_W), .SAMPLE_W(SAMPLE_W)) u_nco1 (
    .clk, .rst_n, .restart, .fw(fw[0]), .theta(theta[0]), .sin_o(s1), .cos_o(c1));
  nco #(.PHASE_W(PHASE_W), .TRUNC_W(TRUNC_W), .SAMPLE_W(SAMPLE_W)) u_nco2 (
    .clk, .rst_n, .restart, .fw(fw[1]), .theta(theta[1]), .sin_o(s2), .cos_o(c2));
  nco #(.PHASE_W(PHASE_W), .TRUNC_W(TRUNC_W), .SAMPLE_W(SAMPLE_W)) u_nco3 (
    .clk, .rst_n, .restart, .fw(fw[2]), .theta(theta[2]), .sin_o(s3), .cos_o(c3));

  // Two-tone adder; arithmetic shift keeps the sum within SAMPLE_W bits.
  assign sum      = (SAMPLE_W+1)'(s1) + (SAMPLE_W+1)'(s2);
  assign half_sum = SAMPLE_W'(sum >>> 1);

  function automatic logic signed [SAMPLE_W-1:0] pick(input tone_sel_e sel);
    unique case (sel)
      SRC_NCO1:     return s1;
      SRC_NCO2:     return s2;
      SRC_SUM:      return half_sum;
      SRC_NCO3_COS: return c3;
      default:      return s1;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stim  <= '0;
      ref_i <= '0;
      ref_q <= '0;
    end else begin
      stim  <= pick(mux1_sel);
      ref_i <= pick(mux2_sel);
      ref_q <= s3;
    end
  end

  // NCO1 and NCO2 cosine outputs are not routed anywhere in this generator.
  logic unused;
  assign unused = ^{c1, c2};
endmodule
