// tpg_tb: self-checking testbench of the test pattern generator.
//
// Three reference phase accumulators run beside the generator. Every cycle
// the stimulus and the two reference outputs are compared with the values
// the MUX1/MUX2 selections call for (NCO1, NCO2, half the two-tone sum or
// NCO3's cosine; NCO3's sine on the quadrature output), computed here from
// the phases two clocks earlier (NCO register + MUX register).
module tpg_tb;
  import bist_pkg::*;
  localparam int PW = 16, TW = 8, SW = 8;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic [2:0][PW-1:0] fw = '0, theta = '0;
  tone_sel_e m1 = SRC_NCO1, m2 = SRC_NCO1;
  logic signed [SW-1:0] stim, ref_i, ref_q;
  int checks = 0, failures = 0;

  tpg #(.PHASE_W(PW), .TRUNC_W(TW), .SAMPLE_W(SW)) dut (
    .clk, .rst_n, .restart, .fw, .theta, .mux1_sel(m1), .mux2_sel(m2), .stim, .ref_i, .ref_q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int tone(input logic [PW-1:0] ph, input bit cosine);
    real a;
    a = 2.0 * 3.14159265358979 * real'(ph[PW-1 -: TW]) / 256.0;
    return $rtoi($floor(127.0 * (cosine ? $cos(a) : $sin(a)) + 0.5));
  endfunction

  function automatic int sel(input tone_sel_e s, input int t1, t2, c3);
    case (s)
      SRC_NCO1: return t1;
      SRC_NCO2: return t2;
      SRC_SUM:  return (t1 + t2) >>> 1;   // floor of the half sum
      default:  return c3;
    endcase
  endfunction

  int sel_count[4];

  task automatic run(input tone_sel_e a, input tone_sel_e b, input int n);
    logic [PW-1:0] acc [3];
    logic [PW-1:0] ph1 [3], ph2 [3];   // phases one and two cycles back
    m1 = a; m2 = b;
    for (int i = 0; i < 3; i++) begin
      fw[i] = PW'($urandom_range(1, 6000));
      theta[i] = PW'($urandom);
    end
    @(negedge clk) restart = 1'b1;
    @(negedge clk) restart = 1'b0;
    for (int i = 0; i < 3; i++) begin acc[i] = '0; ph1[i] = theta[i]; ph2[i] = theta[i]; end
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      if (k >= 1) begin
        int t1, t2, s3, c3;
        t1 = tone(ph2[0], 0); t2 = tone(ph2[1], 0); s3 = tone(ph2[2], 0); c3 = tone(ph2[2], 1);
        checks++;
        if (int'(stim) != sel(a, t1, t2, c3) || int'(ref_i) != sel(b, t1, t2, c3) || int'(ref_q) != s3) begin
          failures++;
          if (failures < 10) $display("k=%0d sel=%0d/%0d stim=%0d exp=%0d ref_i=%0d exp=%0d ref_q=%0d exp=%0d",
                                      k, a, b, stim, sel(a, t1, t2, c3), ref_i, sel(b, t1, t2, c3), ref_q, s3);
        end
      end
      for (int i = 0; i < 3; i++) begin
        ph2[i] = ph1[i];
        acc[i] = acc[i] + fw[i];
        ph1[i] = acc[i] + theta[i];
      end
    end
    sel_count[a]++;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(SRC_NCO1, SRC_NCO2, 600);
    run(SRC_NCO2, SRC_NCO1, 600);
    run(SRC_SUM, SRC_NCO3_COS, 600);
    run(SRC_NCO3_COS, SRC_SUM, 600);
    run(SRC_SUM, SRC_NCO2, 600);
    checks++;
    if (sel_count[SRC_SUM] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
