// resistor_bank_model_tb: checks the programmable resistor bank model for
// all 32 switch settings: 0 ohm whenever b0 shorts the bank, open when no
// branch is on, otherwise the parallel value of the switched resistors
// (computed here in floating point) within 1 ohm.
module resistor_bank_model_tb;
  logic [4:0] b = '0;
  logic [31:0] r;
  logic is_open;
  int checks = 0, failures = 0;

  resistor_bank_model dut (.b, .r_ohm(r), .is_open);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real rv[5];
    rv[1] = 1000.0; rv[2] = 2000.0; rv[3] = 4000.0; rv[4] = 8000.0;
    for (int k = 0; k < 32; k++) begin
      real g, expect_r;
      b = 5'(k);
      #1;
      g = 0.0;
      for (int i = 1; i <= 4; i++) if (b[i]) g += 1.0 / rv[i];
      checks++;
      if (b[0]) begin
        if (r != 0 || is_open) begin failures++; $display("b=%b not shorted", b); end
      end else if (g == 0.0) begin
        if (!is_open) begin failures++; $display("b=%b not open", b); end
      end else begin
        expect_r = 1.0 / g;
        if (is_open || real'(r) < expect_r - 1.0 || real'(r) > expect_r + 1.0) begin
          failures++; $display("b=%b r=%0d expected %f", b, r, expect_r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
