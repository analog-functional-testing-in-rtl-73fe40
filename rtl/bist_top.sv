// bist_top: mixed-signal built-in self-test for analog functional testing,
// with the digital side of its tunable op-amp test chip.
//
// The BIST measures the frequency response (magnitude and phase), the
// linearity (two-tone intermodulation, compression) and the noise of an
// analog device through the system's own DAC and ADC. The test pattern
// generator (three NCOs) drives the DAC with one tone or two; the response
// comes back through the ADC (the analog MUX3 outside chooses whether the
// path goes through the device under test or bypasses it) and the analyser
// correlates it with an in-phase and a quadrature reference tone at the
// frequency of interest, giving DC1 and DC2. From these the phase delay
// atan2(DC2, DC1) and the magnitude sqrt(DC1^2 + DC2^2) are computed on chip.
// The test controller sweeps the analysis frequency over the band, one
// frequency per measurement. MUX4 can feed the stimulus straight back into
// the analyser to check the BIST itself. The BIST borrows the system's own
// converters: in normal operation the DAC is fed by the system's digital
// function (sys_dac_data); with bist_mode = 1 it is fed by the generator.
// The ADC word always goes to the system as well (sys_adc_data).
//
// The test chip side (a separate die in the real system, here side by side
// with its own pins) has the three-pin serial command register that sets the
// op-amp's bias current switch and input resistor switch, and models of the
// programmable current source and resistor bank those switches control.
//
// Interface: 'bist_mode' hands the DAC to the BIST (a selection made by
// whoever starts the test; this design does not tie it to the controller).
// Configuration record 'cfg' and a one-cycle 'bist_start'; one
// 'result' record per sweep point with 'result_valid'; 'bist_done' after the
// last point. 'dac_data' goes to the DAC, 'adc_data' comes from the ADC
// (two's complement, SAMPLE_W bits), 'mux3_dut' drives the analog MUX3.
// Timing of a point: see test_controller.
module bist_top
  import bist_pkg::*;
(
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         bist_start,
  input  test_cfg_t                    cfg,
  // system side: the mission-mode path through the same converters
  input  logic                         bist_mode,
  input  logic signed [DEF_SAMPLE_W-1:0] sys_dac_data,
  output logic signed [DEF_SAMPLE_W-1:0] sys_adc_data,
  // analog side: DAC, analog MUX3, ADC
  output logic signed [DEF_SAMPLE_W-1:0] dac_data,
  output logic                         mux3_dut,
  input  logic signed [DEF_SAMPLE_W-1:0] adc_data,
  // results
  output result_t                      result,
  output logic                         result_valid,
  output logic                         busy,
  output logic                         bist_done,
  // test chip: serial command pins and what they set
  input  logic                         dut_clk,
  input  logic                         dut_rst_n,
  input  logic                         dut_en,
  input  logic                         dut_din,
  output logic [3:0]                   cur_sw,
  output logic [4:0]                   res_sw,
  output logic [31:0]                  i_bias_na,
  output logic [31:0]                  r_in_ohm,
  output logic                         r_in_open
);
  logic [2:0][DEF_PHASE_W-1:0] fw, theta;
  tone_sel_e mux1_sel, mux2_sel;
  ora_sel_e  mux4_sel;
  logic tpg_restart, ora_clear, acc_en, calc_start;
  logic signed [DEF_SAMPLE_W-1:0] stim, ref_i, ref_q;
  logic signed [DEF_ACC_W-1:0] dc1, dc2;
  logic ph_busy, ph_done, ph_linear, mg_busy, mg_done;
  logic [DEF_ANG_W-1:0] phase;
  logic [DEF_ACC_W-1:0] mag;

  test_controller u_ctrl (
    .clk, .rst_n, .bist_start, .cfg,
    .fw, .theta, .mux1_sel, .mux2_sel, .mux4_sel, .dut_path(mux3_dut),
    .tpg_restart, .ora_clear, .acc_en,
    .dc1, .dc2, .calc_start,
    .phase_done(ph_done), .phase, .mag_done(mg_done), .mag,
    .result, .result_valid, .busy, .bist_done
  );

  tpg #(.PHASE_W(DEF_PHASE_W), .TRUNC_W(DEF_TRUNC_W), .SAMPLE_W(DEF_SAMPLE_W)) u_tpg (
    .clk, .rst_n, .restart(tpg_restart), .fw, .theta, .mux1_sel, .mux2_sel,
    .stim, .ref_i, .ref_q
  );

  // DAC multiplexer: system function or test pattern generator
  assign dac_data     = bist_mode ? stim : sys_dac_data;
  assign sys_adc_data = adc_data;

  ora #(.SAMPLE_W(DEF_SAMPLE_W), .ACC_W(DEF_ACC_W)) u_ora (
    .clk, .rst_n, .clear(ora_clear), .acc_en, .mux4_sel,
    .adc_in(adc_data), .tpg_in(stim), .ref_i, .ref_q, .dc1, .dc2
  );

  phase_calc #(.ACC_W(DEF_ACC_W), .ANG_W(DEF_ANG_W)) u_phase (
    .clk, .rst_n, .start(calc_start), .dc1, .dc2,
    .busy(ph_busy), .done(ph_done), .phase, .linear(ph_linear)
  );

  mag_calc #(.ACC_W(DEF_ACC_W)) u_mag (
    .clk, .rst_n, .start(calc_start), .dc1, .dc2,
    .busy(mg_busy), .done(mg_done), .mag
  );

  // Status outputs of the post-processing units that only testbenches watch.
  logic unused;
  assign unused = ^{ph_busy, ph_linear, mg_busy};

  dut_cmd_shiftreg u_cmd (
    .clk(dut_clk), .rst_n(dut_rst_n), .en(dut_en), .din(dut_din),
    .cur_sw, .res_sw
  );

  current_source_model u_isrc (.b(cur_sw), .i_ref_na(i_bias_na));

  resistor_bank_model u_rbank (.b(res_sw), .r_ohm(r_in_ohm), .is_open(r_in_open));
endmodule
