// current_source_model: behavioural model of the programmable bias current
// source of the tunable op-amp. The real block is analog (a current mirror
// bank); this file models its transfer, with currents as integers in nA.
//
// A bandgap reference current I_BIAS is mirrored into four binary-weighted
// branches (mirror ratios 1, 2, 4, 8), each switched by one bit of the
// current switch, so the op-amp bias current is
//   I_ref = (8*b3 + 4*b2 + 2*b1 + b0) * I_BIAS.
// The weighting follows the test chip; the value of I_BIAS is this model's
// choice. The model has no settling time: the output follows the switches
// at once.
module current_source_model #(
  parameter int unsigned I_BIAS_NA = 10_000  // I_BIAS in nA (10 uA)
) (
  input  logic [3:0]  b,         // b3..b0 of the current switch
  output logic [31:0] i_ref_na   // I_ref in nA
);
  assign i_ref_na = 32'(b) * I_BIAS_NA;  // b = 8*b3 + 4*b2 + 2*b1 + b0
endmodule
