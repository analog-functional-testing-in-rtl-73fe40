// current_source_model_tb: checks the programmable bias current model
// against I_ref = (8*b3 + 4*b2 + 2*b1 + b0) * I_BIAS for every switch
// setting and two values of I_BIAS.
module current_source_model_tb;
  logic [3:0] b = '0;
  logic [31:0] i_a, i_b;
  int checks = 0, failures = 0;

  current_source_model dut_a (.b, .i_ref_na(i_a));
  current_source_model #(.I_BIAS_NA(2500)) dut_b (.b, .i_ref_na(i_b));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin
      int weight;
      b = 4'(k);
      #1;
      weight = 8 * b[3] + 4 * b[2] + 2 * b[1] + b[0];
      checks++;
      if (i_a != 32'(weight * 10000) || i_b != 32'(weight * 2500)) begin
        failures++; $display("b=%b i=%0d/%0d", b, i_a, i_b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
