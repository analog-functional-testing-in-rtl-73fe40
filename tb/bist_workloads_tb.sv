// bist_workloads_tb: the BIST's evaluation workloads at their own frequencies.
//
// The clock is notional: the analog model counts in clock cycles, so a tone
// frequency is f = fw * f_clk / 65536 for whichever f_clk is meant.
//   A. Two-tone intermodulation test with f_clk = 12.5 MHz: tones at 98.0
//      and 99.95 kHz (fw 514 and 524), both third-order products (fw 504
//      and 534, 96.1 and 101.9 kHz) and both tones are measured with NCO3
//      over 32768 samples (whole periods of all four). Each product's level
//      relative to the tones (dBc) is compared with the cubic model (within
//      1 dB); the cubic term is kept small enough that the ADC never clips.
//   B. Frequency response at log-spaced points from 1.5 kHz to 9.9 MHz with
//      f_clk = 48.5 MHz (fw 2 .. 13312), each point over a whole number of
//      periods, magnitude and phase compared with the device model.
// Every point's cycle count (settle + samples + 40) is checked.
module bist_workloads_tb;
  import bist_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int DELAY = 3;
  localparam real GAIN = 0.9;
  localparam int SETTLE = 400;

  logic clk = 1'b0, rst_n = 1'b0, bist_start = 1'b0, bist_mode = 1'b1;
  logic signed [7:0] sys_dac_data = '0, sys_adc_data;
  test_cfg_t cfg;
  logic signed [7:0] dac_data, adc_data;
  logic mux3_dut;
  result_t result;
  logic result_valid, busy, bist_done;
  logic dut_clk = 1'b0, dut_rst_n = 1'b0, dut_en = 1'b0, dut_din = 1'b0;
  logic [3:0] cur_sw;
  logic [4:0] res_sw;
  logic [31:0] i_bias_na, r_in_ohm;
  logic r_in_open;
  real c3 = 0.0, noise = 0.0;
  int checks = 0, failures = 0;

  bist_top dut (.*);

  analog_path_model #(.DELAY(DELAY), .GAIN(GAIN)) u_analog (
    .clk, .dac_data, .mux3_dut, .cur_sw, .c3, .noise, .adc_data);

  always #5 clk = ~clk;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send_cmd(input logic [3:0] cur, input logic [4:0] res);
    logic [8:0] w;
    w = {cur, res};
    for (int i = 8; i >= 0; i--) begin
      dut_en = 1'b1; dut_din = w[i];
      #20 dut_clk = 1'b1; #20 dut_clk = 1'b0;
    end
    dut_en = 1'b0;
    #20 dut_clk = 1'b1; #20 dut_clk = 1'b0;
    checks++;
    if (cur_sw != cur || res_sw != res) begin failures++; $display("command not applied"); end
  endtask

  // one point; returns the result record
  task automatic measure(input test_cfg_t c, output result_t r);
    int cyc;
    cfg = c;
    @(negedge clk) bist_start = 1'b1;
    @(negedge clk) bist_start = 1'b0;
    cyc = 1;
    while (!result_valid) begin @(negedge clk); cyc++; end
    r = result;
    checks++;
    if (cyc != int'(c.settle) + int'(c.samples) + 41) begin
      failures++; $display("point took %0d cycles", cyc);
    end
    while (!bist_done) @(negedge clk);
  endtask

  function automatic test_cfg_t base(input int samples);
    test_cfg_t c;
    c = '0;
    c.samples = DEF_CNT_W'(samples);
    c.settle = DEF_CNT_W'(SETTLE);
    c.num_points = 1;
    c.mux1_sel = SRC_NCO1;
    c.mux2_sel = SRC_NCO2;
    c.mux4_sel = ORA_FROM_ADC;
    c.dut_path = 1'b1;
    return c;
  endfunction

  task automatic model_resp(input int fw, input logic [3:0] cur, output real g, output real lag);
    real w, a, re, im;
    w = 2.0 * PI * real'(fw) / 65536.0;
    a = ((cur == 0) ? 1.0 : real'(cur)) / 32.0;
    re = 1.0 - (1.0 - a) * $cos(w);
    im = (1.0 - a) * $sin(w);
    g = a * GAIN / $sqrt(re * re + im * im);
    lag = $atan2(im, re) + w * real'(DELAY);
  endtask

  function automatic real db(input real x);
    return 20.0 * $log10(x);
  endfunction

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1; dut_rst_n = 1'b1;

    // ---- A. two-tone test, fig-style 98/100 kHz at 12.5 MHz -----------------
    begin
      int f1, f2, words[4];
      real lvl[4], g, lag, a, gi, lagi, exp_dbc, meas_dbc;
      test_cfg_t c;
      result_t r;
      f1 = 514; f2 = 524;
      words = '{f1, f2, 2 * f1 - f2, 2 * f2 - f1};
      send_cmd(4'b1000, 5'b00001);
      c3 = 5.0e-6;   // small enough that the ADC never clips
      foreach (words[k]) begin
        c = base(32768);
        c.fw[0] = DEF_PHASE_W'(f1);
        c.fw[1] = DEF_PHASE_W'(f2);
        c.fw[2] = DEF_PHASE_W'(words[k]);
        c.mux1_sel = SRC_SUM;
        c.mux2_sel = SRC_NCO3_COS;
        measure(c, r);
        lvl[k] = real'(r.mag);
      end
      // tones: amplitude 63.5 each at the device, plus 9/4 c3 a^3 from the
      // cubic term; third-order products: 3/4 c3 a^3
      a = 63.5;
      for (int k = 2; k < 4; k++) begin
        model_resp(words[k], 4'b1000, gi, lagi);
        model_resp(words[k - 2], 4'b1000, g, lag);
        exp_dbc = db((0.75 * 5.0e-6 * a * a * a * gi) / ((a + 2.25 * 5.0e-6 * a * a * a) * g));
        meas_dbc = db(lvl[k] / lvl[k - 2]);
        $display("IM3 at fw %0d: %0.1f dBc (model %0.1f dBc)", words[k], meas_dbc, exp_dbc);
        checks++;
        if (meas_dbc < exp_dbc - 1.0 || meas_dbc > exp_dbc + 1.0) begin
          failures++; $display("IM3 level off");
        end
      end
      c3 = 0.0;
    end

    // ---- B. frequency response, 1.5 kHz .. 9.9 MHz at 48.5 MHz --------------
    begin
      int fws[8];
      test_cfg_t c;
      result_t r;
      real g, lag, full, exp_deg, meas_deg, d;
      fws = '{2, 8, 32, 128, 512, 2048, 8192, 13312};
      send_cmd(4'b0100, 5'b00001);
      foreach (fws[k]) begin
        int period, n;
        // samples: whole periods, at least 4096
        period = 65536;
        for (int s = 0; s < 16; s++) if (fws[k] % (2 ** (s + 1)) == 0) period = 65536 >> (s + 1);
        n = period * ((4096 + period - 1) / period);
        c = base(n);
        for (int i = 0; i < 3; i++) c.fw[i] = DEF_PHASE_W'(fws[k]);
        c.theta[0] = 16'h4000;
        c.theta[1] = 16'h4000;
        measure(c, r);
        model_resp(fws[k], 4'b0100, g, lag);
        full = 127.0 * 127.0 * real'(n) / 2.0;
        exp_deg = lag * 180.0 / PI;
        exp_deg = exp_deg - 360.0 * $floor(exp_deg / 360.0);
        meas_deg = real'(r.phase) * 360.0 / 4096.0;
        d = meas_deg - exp_deg;
        if (d > 180.0) d -= 360.0;
        if (d < -180.0) d += 360.0;
        $display("%8.1f kHz: %6.2f dB (model %6.2f), %7.2f deg (model %7.2f)",
                 real'(fws[k]) * 48.5e3 / 65536.0, db(real'(r.mag) / full), db(g), meas_deg, exp_deg);
        checks++;
        // 0.5 dB down to -30 dB; below that the 8-bit ADC limits the accuracy
        if (db(g) > -30.0 && (db(real'(r.mag) / full) - db(g) > 0.5 || db(real'(r.mag) / full) - db(g) < -0.5 ||
            d > 2.0 || d < -2.0)) begin
          failures++; $display("response off");
        end
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
