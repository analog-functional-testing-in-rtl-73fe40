// bist_pkg: types and constants shared by the mixed-signal BIST blocks.
//
// The BIST has a DDS test pattern generator (three NCOs), a MAC-based output
// response analyser (two multiplier/accumulators) and a test controller. The
// selector encodings for the generator's MUX1/MUX2 and the analyser's MUX4,
// the per-run configuration record and the result record are defined here.
// The default word sizes are this design's choices except DEF_SAMPLE_W (8-bit
// tone word length, as used for the measured DDS tone).
package bist_pkg;

  // Default widths.
  localparam int DEF_PHASE_W = 16;  // phase accumulator width n
  localparam int DEF_TRUNC_W = 8;   // truncated phase width p (LUT address)
  localparam int DEF_SAMPLE_W = 8;  // DDS / DAC / ADC word length
  localparam int DEF_ACC_W = 32;    // accumulator width of Accm1/Accm2
  localparam int DEF_CNT_W = 16;    // sample, settle and point counters
  localparam int DEF_ANG_W = 12;    // phase result: binary angle, 2**DEF_ANG_W = 360 deg

  // MUX1 (stimulus) and MUX2 (reference for MUL1) choose among the NCO tones.
  typedef enum logic [1:0] {
    SRC_NCO1 = 2'd0,
    SRC_NCO2 = 2'd1,
    SRC_SUM  = 2'd2,  // (NCO1 + NCO2) / 2, the two-tone stimulus
    SRC_NCO3_COS = 2'd3  // cosine output of NCO3 (quadrature reference)
  } tone_sel_e;

  // MUX4: what the ORA analyses.
  typedef enum logic {
    ORA_FROM_ADC = 1'b0,  // response of the analog path (DUT or bypass)
    ORA_FROM_TPG = 1'b1   // digital loop-back of the stimulus
  } ora_sel_e;

  // One test run (a single point or a sweep) as loaded into the controller.
  typedef struct packed {
    logic [2:0][DEF_PHASE_W-1:0] fw;        // frequency words of NCO1..NCO3 (index 0 = NCO1)
    logic [2:0][DEF_PHASE_W-1:0] theta;     // initial phase words
    logic [DEF_PHASE_W-1:0]      fw_step;   // added to the swept NCOs after each point
    logic [2:0]              sweep_mask;// which NCOs are swept
    logic [DEF_CNT_W-1:0]        num_points;// points in the sweep (0 is taken as 1)
    logic [DEF_CNT_W-1:0]        settle;    // cycles of stimulus before accumulating
    logic [DEF_CNT_W-1:0]        samples;   // accumulated samples per point (0 is taken as 1)
    tone_sel_e               mux1_sel;
    tone_sel_e               mux2_sel;
    ora_sel_e                mux4_sel;
    logic                    dut_path;  // analog MUX3: 1 = through the DUT, 0 = bypass
  } test_cfg_t;

  // One measured point.
  typedef struct packed {
    logic [DEF_CNT_W-1:0]        point;     // index within the sweep
    logic [DEF_PHASE_W-1:0]      fw_ref;    // frequency word of NCO3 at this point
    logic signed [DEF_ACC_W-1:0] dc1;       // in-phase sum
    logic signed [DEF_ACC_W-1:0] dc2;       // quadrature sum
    logic [DEF_ANG_W-1:0]        phase;     // atan2(DC2, DC1), 2**DEF_ANG_W = 360 deg
    logic [DEF_ACC_W-1:0]        mag;       // floor(sqrt(DC1^2 + DC2^2))
  } result_t;

endpackage
