// nco_tb: self-checking testbench of the NCO.
//
// For several frequency and initial-phase words, a reference phase
// accumulator runs beside the NCO; every cycle the NCO's sine and cosine
// outputs are compared with round(127*sin/cos(2*pi*k/256)) of the truncated
// reference phase of the previous cycle (the outputs are registered). The
// restart, the output latency of one clock and the tone period f_clk*2**n/fw
// (counted from rising zero crossings) are checked as well.
module nco_tb;
  localparam int PW = 16, TW = 8, SW = 8;
  logic clk = 1'b0, rst_n = 1'b0, restart = 1'b0;
  logic [PW-1:0] fw = '0, theta = '0;
  logic signed [SW-1:0] s, c;
  int checks = 0, failures = 0;

  nco #(.PHASE_W(PW), .TRUNC_W(TW), .SAMPLE_W(SW)) dut (
    .clk, .rst_n, .restart, .fw, .theta, .sin_o(s), .cos_o(c));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_val(input logic [PW-1:0] ph, input bit cosine);
    real a;
    a = 2.0 * 3.14159265358979 * real'(ph[PW-1 -: TW]) / 256.0;
    return $rtoi($floor(127.0 * (cosine ? $cos(a) : $sin(a)) + 0.5));
  endfunction

  task automatic run(input logic [PW-1:0] f, input logic [PW-1:0] th, input int n);
    logic [PW-1:0] acc_m, ph_prev;
    int last_up, period_sum, periods;
    logic signed [SW-1:0] s_prev;
    fw = f; theta = th;
    @(negedge clk) restart = 1'b1;
    @(negedge clk) restart = 1'b0;   // accumulator is 0 now
    acc_m = '0;
    ph_prev = acc_m + th;
    last_up = -1; period_sum = 0; periods = 0; s_prev = 0;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      // outputs now show the table value of the phase held last cycle
      checks++;
      if (int'(s) != ref_val(ph_prev, 1'b0) || int'(c) != ref_val(ph_prev, 1'b1)) begin
        failures++;
        if (failures < 10) $display("mismatch fw=%0d k=%0d sin=%0d exp=%0d", f, k, s, ref_val(ph_prev, 1'b0));
      end
      if (s_prev < 0 && s >= 0) begin
        if (last_up >= 0) begin period_sum += k - last_up; periods++; end
        last_up = k;
      end
      s_prev = s;
      acc_m = acc_m + f;
      ph_prev = acc_m + th;
    end
    if (periods > 2) begin
      real meas, expect_p;
      meas = real'(period_sum) / periods;
      expect_p = 65536.0 / f;
      checks++;
      if (meas < expect_p - 1.0 || meas > expect_p + 1.0) begin
        failures++;
        $display("period fw=%0d measured %f expected %f", f, meas, expect_p);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run(16'd655, 16'd0, 2000);      // ~1/100 of f_clk
    run(16'd1000, 16'h4000, 1000);  // 90 deg initial phase
    run(16'd4096, 16'h8000, 500);
    run(16'd21, 16'd12345, 7000);   // slow tone
    for (int i = 0; i < 6; i++) run(16'($urandom_range(1, 8000)), 16'($urandom), 800);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
