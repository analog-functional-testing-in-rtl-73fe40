// bist_top_tb: end-to-end testbench of the BIST with its default sizes.
//
// The analog side is closed by analog_path_model (DAC, amplifier, MUX3,
// a low-pass device under test whose bandwidth follows the bias current
// switch, ADC). The test chip's command register is loaded over its serial
// pins to set that switch. The testbench runs the test suite of the BIST:
//   1. self-test: digital loop-back (MUX4) of a tone, expected 0 deg and the
//      full-scale magnitude;
//   2. bypass path (MUX3), expected the pure path latency as phase;
//   3. frequency response sweeps through the device at two bias settings
//      (one command word each), magnitude and phase compared with the
//      response of the model computed here in floating point;
//   3b. magnitude with references shifted by the measured phase delay
//      (DC1 must then equal the magnitude and DC2 vanish);
//   4. two-tone test (MUX1 sum) with a cubic device: the intermodulation
//      product at 2f1-f2, measured with NCO3 (MUX2 = NCO3 cosine), compared
//      with 3/4 * c3 * a^3 scaled by the device response;
//   5. noise measurement: NCO3 swept over empty nbins next to a tone, the
//      mean magnitude compared with the Rayleigh mean of the added noise.
// Before the tests the system path (DAC fed by the system, bist_mode = 0)
// is checked. Each result's cycle count is checked (settle + samples + 40 per point),
// and every mechanism (loop-back, bypass, DUT path, sweep, two-tone sum,
// NCO3 cosine reference, command register update, linear and table phase
// paths, noise) must have happened at least once.
module bist_top_tb;
  import bist_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int DELAY = 3;
  localparam real GAIN = 0.9;
  localparam int N = 4096;         // samples per point: whole periods for fw = 16*k
  localparam int SETTLE = 400;

  logic clk = 1'b0, rst_n = 1'b0, bist_start = 1'b0, bist_mode = 1'b0;
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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_approach1, n_system, n_loopback, n_bypass, n_dutpath, n_sweep, n_twotone, n_nco3cos, n_cmd, n_lin, n_lut, n_noise;
  always @(posedge clk) if (dut.u_phase.done) begin
    if (dut.u_phase.linear) n_lin++; else n_lut++;
  end

  // ---- helpers ------------------------------------------------------------
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
    checks++;
    if (i_bias_na != 32'(cur) * 10000) begin failures++; $display("bias current %0d nA", i_bias_na); end
    n_cmd++;
  endtask

  function automatic test_cfg_t base_cfg();
    test_cfg_t c;
    c = '0;
    c.samples = DEF_CNT_W'(N);
    c.settle = DEF_CNT_W'(SETTLE);
    c.num_points = 1;
    c.mux1_sel = SRC_NCO1;
    c.mux2_sel = SRC_NCO2;
    c.mux4_sel = ORA_FROM_ADC;
    c.dut_path = 1'b1;
    return c;
  endfunction

  // single-tone stimulus and references at one frequency word:
  // NCO1 cosine stimulus, NCO2 cosine reference, NCO3 sine reference
  function automatic test_cfg_t tone_cfg(input int fw);
    test_cfg_t c;
    c = base_cfg();
    for (int i = 0; i < 3; i++) c.fw[i] = DEF_PHASE_W'(fw);
    c.theta[0] = 16'h4000;
    c.theta[1] = 16'h4000;
    c.theta[2] = 16'h0000;
    return c;
  endfunction

  result_t res_q[$];
  int      cyc_q[$];

  task automatic run(input test_cfg_t c);
    int cyc, last;
    cfg = c;
    res_q.delete(); cyc_q.delete();
    @(negedge clk) bist_start = 1'b1;
    @(negedge clk) bist_start = 1'b0;
    cyc = 1; last = 0;
    while (1) begin
      if (result_valid) begin
        res_q.push_back(result);
        cyc_q.push_back(cyc - last);
        last = cyc;
      end
      if (bist_done) break;
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (res_q.size() != int'(c.num_points)) begin
      failures++; $display("%0d results for %0d points", res_q.size(), c.num_points);
    end
    // bist_start is seen one cycle later; each point is settle + N + 40 cycles
    foreach (cyc_q[i]) begin
      checks++;
      if (cyc_q[i] != int'(c.settle) + N + 40 + (i == 0 ? 1 : 0)) begin
        failures++; $display("point %0d took %0d cycles", i, cyc_q[i]);
      end
    end
  endtask

  // response of the device model at frequency word fw: gain and phase lag (rad)
  task automatic model_resp(input int fw, input logic [3:0] cur, input bit through_dut,
                            output real g, output real lag);
    real w, a, re, im;
    w = 2.0 * PI * real'(fw) / 65536.0;
    if (through_dut) begin
      a = ((cur == 0) ? 1.0 : real'(cur)) / 32.0;
      // H = a*G / (1 - (1-a) e^{-jw})
      re = 1.0 - (1.0 - a) * $cos(w);
      im = (1.0 - a) * $sin(w);
      g = a * GAIN / $sqrt(re * re + im * im);
      lag = $atan2(im, re);
    end else begin
      g = 1.0;
      lag = 0.0;
    end
    lag = lag + w * real'(DELAY);
  endtask

  function automatic real mag_of(input result_t r);
    return $sqrt(real'(r.dc1) * real'(r.dc1) + real'(r.dc2) * real'(r.dc2));
  endfunction

  task automatic check_point(input result_t r, input real exp_mag, input real lag, input string what);
    real meas_deg, exp_deg, d, tol_deg, tol_mag;
    exp_deg = lag * 180.0 / PI;
    exp_deg = exp_deg - 360.0 * $floor(exp_deg / 360.0);
    meas_deg = real'(r.phase) * 360.0 / 4096.0;
    d = meas_deg - exp_deg;
    if (d > 180.0) d -= 360.0;
    if (d < -180.0) d += 360.0;
    tol_mag = 0.03 * exp_mag + 6000.0;
    tol_deg = 1.0 + $atan(6000.0 / exp_mag) * 180.0 / PI;
    checks++;
    if (real'(r.mag) < exp_mag - tol_mag || real'(r.mag) > exp_mag + tol_mag ||
        d > tol_deg || d < -tol_deg) begin
      failures++;
      $display("%s fw=%0d: mag %0d expected %0.0f, phase %0.2f deg expected %0.2f",
               what, r.fw_ref, r.mag, exp_mag, meas_deg, exp_deg);
    end
    // on-chip magnitude must be the integer root of DC1^2 + DC2^2
    checks++;
    if (real'(r.mag) > mag_of(r) || real'(r.mag) + 1.0 < mag_of(r)) begin
      failures++; $display("magnitude %0d vs %f", r.mag, mag_of(r));
    end
  endtask

  // ---- test suite -----------------------------------------------------------
  initial begin
    test_cfg_t c;
    real g, lag, full;
    cfg = '0;
    full = 127.0 * 127.0 * real'(N) / 2.0;   // tone amplitude x reference amplitude x N/2
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1; dut_rst_n = 1'b1;

    // 0. normal operation: the system owns the DAC, the ADC reaches the system
    for (int i = 0; i < 50; i++) begin
      sys_dac_data = 8'($urandom_range(0, 100)) - 8'sd50;
      @(negedge clk);
      checks++;
      if (dac_data != sys_dac_data) begin failures++; $display("system path not selected"); end
    end
    repeat (DELAY) @(negedge clk);
    checks++;
    if (sys_adc_data != adc_data || adc_data != sys_dac_data) begin
      failures++; $display("ADC word %0d not passed to the system", sys_adc_data);
    end
    n_system++;
    bist_mode = 1'b1;

    // 1. loop-back self-test
    c = tone_cfg(512);
    c.mux4_sel = ORA_FROM_TPG;
    run(c);
    check_point(res_q[0], full, 0.0, "loop-back");
    n_loopback++;

    // 2. bypass path
    c = tone_cfg(1024);
    c.dut_path = 1'b0;
    run(c);
    model_resp(1024, 4'd0, 1'b0, g, lag);
    check_point(res_q[0], full * g, lag, "bypass");
    n_bypass++;

    // 3. frequency response sweeps at two bias settings
    for (int s = 0; s < 2; s++) begin
      logic [3:0] cur;
      cur = (s == 0) ? 4'b1000 : 4'b0010;
      send_cmd(cur, 5'b00001);
      c = tone_cfg(64);
      c.fw_step = 16'd448;
      c.sweep_mask = 3'b111;
      c.num_points = 12;
      run(c);
      foreach (res_q[i]) begin
        model_resp(int'(res_q[i].fw_ref), cur, 1'b1, g, lag);
        check_point(res_q[i], full * g, lag, "sweep");
        $display("bias %b fw %5d: gain %0.4f (model %0.4f), phase %0.2f deg (model %0.2f)",
                 cur, res_q[i].fw_ref, real'(res_q[i].mag) / full, g,
                 real'(res_q[i].phase) * 360.0 / 4096.0, lag * 180.0 / PI);
        checks++;
        if (int'(res_q[i].fw_ref) != 64 + 448 * i) begin failures++; $display("sweep word %0d", res_q[i].fw_ref); end
      end
      n_sweep++;
      n_dutpath++;
    end

    // 3b. magnitude by phase-compensated references: shift both references by
    //     the measured phase delay, then DC1 alone is the magnitude
    begin
      result_t r0;
      logic [15:0] shift;
      c = tone_cfg(1408);
      run(c);
      r0 = res_q[0];
      shift = {r0.phase, 4'b0000};     // 12-bit angle -> 16-bit phase word
      c.theta[1] = 16'h4000 - shift;   // cos(w n - phase)
      c.theta[2] = 16'h0000 - shift;   // sin(w n - phase)
      run(c);
      checks++;
      if (real'(res_q[0].dc1) < 0.99 * real'(r0.mag) || real'(res_q[0].dc1) > 1.01 * real'(r0.mag) ||
          real'(res_q[0].dc2) > 0.02 * real'(r0.mag) || real'(res_q[0].dc2) < -0.02 * real'(r0.mag)) begin
        failures++;
        $display("phase-compensated: DC1 %0d DC2 %0d, magnitude %0d", res_q[0].dc1, res_q[0].dc2, r0.mag);
      end
      $display("phase-compensated reference: DC1 %0d (magnitude %0d), DC2 %0d", res_q[0].dc1, r0.mag, res_q[0].dc2);
      n_approach1++;
    end

    // 4. two-tone intermodulation, bias 0100
    send_cmd(4'b0100, 5'b00001);
    begin
      int f1, f2, fim;
      real a_tone, im3_amp, g_im, lag_im;
      f1 = 1024; f2 = 1152; fim = 2 * f1 - f2;
      c3 = 5.0e-6;   // small enough that the ADC never clips
      c = base_cfg();
      c.fw[0] = DEF_PHASE_W'(f1);
      c.fw[1] = DEF_PHASE_W'(f2);
      c.fw[2] = DEF_PHASE_W'(fim);
      c.mux1_sel = SRC_SUM;
      c.mux2_sel = SRC_NCO3_COS;
      c.num_points = 1;
      run(c);
      // each tone has amplitude 127/2 at the device input
      a_tone = 63.5;
      im3_amp = 0.75 * 5.0e-6 * a_tone * a_tone * a_tone;
      model_resp(fim, 4'b0100, 1'b1, g_im, lag_im);
      checks++;
      if (real'(res_q[0].mag) < 0.9 * im3_amp * g_im * 127.0 * N / 2.0 - 6000.0 ||
          real'(res_q[0].mag) > 1.1 * im3_amp * g_im * 127.0 * N / 2.0 + 6000.0) begin
        failures++;
        $display("IM3: mag %0d expected about %0.0f", res_q[0].mag, im3_amp * g_im * 127.0 * N / 2.0);
      end
      $display("IM3 at 2f1-f2: magnitude %0d, expected about %0.0f",
               res_q[0].mag, im3_amp * g_im * 127.0 * N / 2.0);
      n_twotone++;
      n_nco3cos++;
      c3 = 0.0;
    end

    // 5. noise floor next to a tone
    begin
      real sigma, expect_mean, sum;
      int nbins;
      noise = 2.0;
      c = base_cfg();
      c.fw[0] = 16'd1024;
      c.theta[0] = 16'h4000;
      c.fw[2] = 16'd1024 + 16'd48;   // first empty bin (1024 + 3*16)
      c.fw_step = 16'd80;            // keeps clear of the tone harmonics
      c.sweep_mask = 3'b100;
      c.mux2_sel = SRC_NCO3_COS;
      c.num_points = 8;
      run(c);
      sigma = $sqrt(noise * noise + 1.0 / 12.0);
      expect_mean = $sqrt(real'(N) / 2.0) * sigma * 127.0 * $sqrt(PI / 2.0);
      sum = 0.0; nbins = 0;
      foreach (res_q[i]) begin sum += real'(res_q[i].mag); nbins++; end
      checks++;
      if (sum / nbins < 0.65 * expect_mean || sum / nbins > 1.35 * expect_mean) begin
        failures++; $display("noise: mean magnitude %0.0f expected %0.0f", sum / nbins, expect_mean);
      end
      $display("noise: mean magnitude %0.0f, expected %0.0f", sum / nbins, expect_mean);
      noise = 0.0;
      n_noise++;
    end

    // mechanism coverage
    begin
      int counts[12];
      string names[12];
      counts = '{n_approach1, n_system, n_loopback, n_bypass, n_dutpath, n_sweep, n_twotone, n_nco3cos, n_cmd, n_lin, n_lut, n_noise};
      names = '{"phase-compensated reference", "system path", "loop-back", "bypass", "DUT path", "sweep", "two-tone", "NCO3 cosine ref",
                "command register", "phase linear path", "phase table path", "noise"};
      foreach (counts[i]) begin
        $display("%s: %0d", names[i], counts[i]);
        checks++;
        if (counts[i] == 0) begin failures++; $display("never happened: %s", names[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
