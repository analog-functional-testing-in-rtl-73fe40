// ora_tb: self-checking testbench of the MAC-based output response analyser.
//
// Random ADC words, stimulus words and reference words are applied; the
// testbench keeps its own sums of f*ref_i and f*ref_q over the enabled
// cycles (f chosen by MUX4) and compares them with DC1 and DC2 after the
// one-cycle product pipeline. Gaps in the enable, a clear in the middle of a
// run and both MUX4 settings are exercised, plus a full-scale run that checks
// that the sum of 2**16 extreme products is exact.
module ora_tb;
  import bist_pkg::*;
  localparam int SW = 8, AW = 32;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, acc_en = 1'b0;
  ora_sel_e m4 = ORA_FROM_ADC;
  logic signed [SW-1:0] adc = '0, tpgv = '0, ri = '0, rq = '0;
  logic signed [AW-1:0] dc1, dc2;
  int checks = 0, failures = 0;

  ora #(.SAMPLE_W(SW), .ACC_W(AW)) dut (
    .clk, .rst_n, .clear, .acc_en, .mux4_sel(m4), .adc_in(adc), .tpg_in(tpgv),
    .ref_i(ri), .ref_q(rq), .dc1, .dc2);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input ora_sel_e sel, input int n, input bit extreme);
    longint s1, s2;
    m4 = sel;
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    s1 = 0; s2 = 0;
    for (int k = 0; k < n; k++) begin
      adc  = extreme ? -8'sd128 : SW'($urandom);
      tpgv = extreme ? -8'sd128 : SW'($urandom);
      ri   = extreme ? -8'sd128 : SW'($urandom);
      rq   = extreme ?  8'sd127 : SW'($urandom);
      acc_en = extreme ? 1'b1 : ($urandom_range(0, 3) != 0);
      if (acc_en) begin
        s1 += longint'(sel == ORA_FROM_TPG ? tpgv : adc) * longint'(ri);
        s2 += longint'(sel == ORA_FROM_TPG ? tpgv : adc) * longint'(rq);
      end
      @(negedge clk);
    end
    acc_en = 1'b0;
    adc = SW'($urandom); ri = SW'($urandom);  // must not be added
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (longint'(dc1) != s1 || longint'(dc2) != s2) begin
      failures++;
      $display("sel=%0d n=%0d dc1=%0d exp=%0d dc2=%0d exp=%0d", sel, n, dc1, s1, dc2, s2);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 20; i++) run(i % 2 ? ORA_FROM_TPG : ORA_FROM_ADC, $urandom_range(1, 3000), 1'b0);
    run(ORA_FROM_ADC, 65536, 1'b1);
    // clear wins over accumulation
    acc_en = 1'b1; adc = 8'sd100; ri = 8'sd100; m4 = ORA_FROM_ADC;
    repeat (5) @(negedge clk);
    clear = 1'b1; @(negedge clk); clear = 1'b0; acc_en = 1'b0;
    @(negedge clk); @(negedge clk);
    checks++;
    if (dc1 != 0) begin failures++; $display("clear: dc1=%0d", dc1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
