// ora: MAC-based output response analyser.
//
// MUX4 chooses the analysed signal f(nT): the ADC word (the response of the
// analog path) or the generator's own stimulus (digital loop-back). MUL1
// multiplies it by the in-phase reference, MUL2 by the quadrature reference,
// and the accumulators Accm1/Accm2 sum the products:
//   DC1 = sum f(nT)*ref_i(nT),  DC2 = sum f(nT)*ref_q(nT).
// Two MACs are all it takes to analyse one frequency; a sweep repeats this.
// The structure is that of the BIST's analyser. The one-register pipeline
// (products are registered, then accumulated), the synchronous clear and the
// enable are this design's choices.
//
// Timing: the product of the inputs seen in cycle k is added in cycle k+1 if
// acc_en was 1 in cycle k. 'clear' zeroes both accumulators and the product
// register; an enable in the same cycle as clear is ignored.
module ora
  import bist_pkg::*;
#(
  parameter int SAMPLE_W = bist_pkg::DEF_SAMPLE_W,
  parameter int ACC_W = bist_pkg::DEF_ACC_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       acc_en,
  input  ora_sel_e                   mux4_sel,
  input  logic signed [SAMPLE_W-1:0] adc_in,
  input  logic signed [SAMPLE_W-1:0] tpg_in,
  input  logic signed [SAMPLE_W-1:0] ref_i,
  input  logic signed [SAMPLE_W-1:0] ref_q,
  output logic signed [ACC_W-1:0]    dc1,
  output logic signed [ACC_W-1:0]    dc2
);
  logic signed [SAMPLE_W-1:0]   f_n;
  logic signed [2*SAMPLE_W-1:0] p1, p2;
  logic                         p_vld;

  assign f_n = (mux4_sel == ORA_FROM_TPG) ? tpg_in : adc_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p1    <= '0;
      p2    <= '0;
      p_vld <= 1'b0;
      dc1   <= '0;
      dc2   <= '0;
    end else if (clear) begin
      p1    <= '0;
      p2    <= '0;
      p_vld <= 1'b0;
      dc1   <= '0;
      dc2   <= '0;
    end else begin
      p1    <= f_n * ref_i;   // MUL1
      p2    <= f_n * ref_q;   // MUL2
      p_vld <= acc_en;
      if (p_vld) begin
        dc1 <= dc1 + ACC_W'(p1);  // Accm1
        dc2 <= dc2 + ACC_W'(p2);  // Accm2
      end
    end
  end
endmodule
