// dut_cmd_shiftreg: serial command register of the tunable op-amp test chip.
//
// The chip takes its tuning word through three pins, CLK, EN and DIN, so the
// tuning needs few pins. While EN is high, each rising CLK edge shifts DIN
// into a CMD_W-bit shift register, first bit sent = most significant bit.
// On the first rising CLK edge with EN low after a shift, the shift register
// is copied into the control register that drives the analog switches, so
// the switches never see a half-shifted word. The command word is
//   {cur_sw[3:0], res_sw[4:0]}
// cur_sw = b3..b0 of the programmable bias current source and res_sw =
// b4..b0 of the programmable input resistor bank. The three-pin serial
// interface and the two switch sets are those of the test chip; the bit
// order, the update-on-EN-low rule and the reset (an on-chip power-on reset
// assumed here as rst_n, clearing everything to 0) are this design's choices.
module dut_cmd_shiftreg #(
  parameter int CUR_W = 4,
  parameter int RES_W = 5
) (
  input  logic             clk,     // serial CLK pin
  input  logic             rst_n,   // power-on reset
  input  logic             en,      // EN pin
  input  logic             din,     // DIN pin
  output logic [CUR_W-1:0] cur_sw,  // b3..b0 of the current switch
  output logic [RES_W-1:0] res_sw   // b4..b0 of the resistor switch
);
  localparam int CMD_W = CUR_W + RES_W;

  logic [CMD_W-1:0] shreg;
  logic             pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      shreg   <= '0;
      pending <= 1'b0;
      cur_sw  <= '0;
      res_sw  <= '0;
    end else if (en) begin
      shreg   <= {shreg[CMD_W-2:0], din};
      pending <= 1'b1;
    end else if (pending) begin
      {cur_sw, res_sw} <= shreg;
      pending <= 1'b0;
    end
  end
endmodule
