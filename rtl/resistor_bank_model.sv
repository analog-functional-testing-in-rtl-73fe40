// resistor_bank_model: behavioural model of the programmable resistor bank at
// the op-amp input, used as a tunable thermal-noise source (noise voltage
// sqrt(4kTRB)) to set the noise figure. The real block is analog (switched
// resistors); this file models its resistance, in whole ohms.
//
// Four resistors R1..R4 each sit in series with a switch b1..b4 and the four
// branches are in parallel; a fifth switch b0 shorts the bank:
//   R = 0                                  if b0 = 1
//   R = R1/b1 || R2/b2 || R3/b3 || R4/b4   if b0 = 0
// (a branch with bi = 0 is open). With b0 = 0 and no branch on, the bank is
// open: is_open = 1 and r_ohm = 0. The model adds the branch conductances in
// nS (rounded) and inverts the sum, so r_ohm is within a fraction of an ohm
// of the exact value for resistors up to a few megaohms. The resistor values
// are this model's choice; the structure follows the test chip.
module resistor_bank_model #(
  parameter longint unsigned R1 = 1000,  // ohms
  parameter longint unsigned R2 = 2000,
  parameter longint unsigned R3 = 4000,
  parameter longint unsigned R4 = 8000
) (
  input  logic [4:0]  b,        // b4..b0 of the resistor switch
  output logic [31:0] r_ohm,
  output logic        is_open
);
  localparam longint unsigned NS = 64'd1_000_000_000;
  localparam longint unsigned G1 = (NS + R1 / 2) / R1;  // conductances in nS
  localparam longint unsigned G2 = (NS + R2 / 2) / R2;
  localparam longint unsigned G3 = (NS + R3 / 2) / R3;
  localparam longint unsigned G4 = (NS + R4 / 2) / R4;

  longint unsigned g;
  always_comb begin
    g = (b[1] ? G1 : 64'd0) + (b[2] ? G2 : 64'd0) + (b[3] ? G3 : 64'd0) + (b[4] ? G4 : 64'd0);
    is_open = !b[0] && (g == 64'd0);
    if (b[0] || g == 64'd0) r_ohm = '0;
    else                    r_ohm = 32'((NS + g / 2) / g);
  end
endmodule
