// test_controller: sequencer of the BIST (BIST Start -> measurements -> BIST Done).
//
// A test is one configuration record (bist_pkg::test_cfg_t): the frequency
// and initial-phase words of the three NCOs, the MUX1/MUX2/MUX4 selections,
// the analog MUX3 selection (DUT or bypass), and a sweep: num_points points,
// with fw_step added after each point to the frequency word of every NCO set
// in sweep_mask. For each point the controller
//   RESTART  restarts the NCOs and clears the accumulators (1 cycle),
//   SETTLE   lets the stimulus run 'settle' cycles so the analog path and the
//            pipelines fill,
//   ACCUM    enables the accumulators for 'samples' cycles,
//   DRAIN    waits one cycle for the last product to be added,
//   CALC     starts the phase and magnitude units and waits until both have
//            pulsed done (seen one cycle later),
//   REPORT   one cycle; result_valid is high in the cycle after it.
// After the last point bist_done rises and stays high until the next
// bist_start. The BIST as described has a test controller that sets up the
// generator, the multiplexers and the analyser and sweeps the tone over the
// band; the state sequence, the configuration record and the result record
// are this design's choices.
//
// Timing per point: 1 + settle + samples + 1 + (L + 2) + 1 cycles, where L
// is the number of cycles from the cycle calc_start is high to the cycle the
// later of the two done pulses is high (L = DEF_ACC_W + 3 = 35 with the
// magnitude unit of this design, so a point takes settle + samples + 40). bist_start is ignored while a
// test runs. samples = 0 and num_points = 0 are treated as 1.
module test_controller
  import bist_pkg::*;
(
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        bist_start,
  input  test_cfg_t                   cfg,
  // generator and analyser control
  output logic [2:0][DEF_PHASE_W-1:0] fw,
  output logic [2:0][DEF_PHASE_W-1:0] theta,
  output tone_sel_e                   mux1_sel,
  output tone_sel_e                   mux2_sel,
  output ora_sel_e                    mux4_sel,
  output logic                        dut_path,
  output logic                        tpg_restart,
  output logic                        ora_clear,
  output logic                        acc_en,
  // post-processing
  input  logic signed [DEF_ACC_W-1:0] dc1,
  input  logic signed [DEF_ACC_W-1:0] dc2,
  output logic                        calc_start,
  input  logic                        phase_done,
  input  logic [DEF_ANG_W-1:0]        phase,
  input  logic                        mag_done,
  input  logic [DEF_ACC_W-1:0]        mag,
  // results
  output result_t                     result,
  output logic                        result_valid,
  output logic                        busy,
  output logic                        bist_done
);
  typedef enum logic [2:0] {
    S_IDLE, S_RESTART, S_SETTLE, S_ACCUM, S_DRAIN, S_CALC, S_REPORT
  } state_e;
  state_e state;

  test_cfg_t        c;
  logic [DEF_CNT_W-1:0] cnt, point;
  logic             ph_seen, mg_seen;

  assign fw       = c.fw;     // the stored words are stepped during a sweep
  assign theta    = c.theta;
  assign mux1_sel = c.mux1_sel;
  assign mux2_sel = c.mux2_sel;
  assign mux4_sel = c.mux4_sel;
  assign dut_path = c.dut_path;
  assign busy     = (state != S_IDLE);

  assign tpg_restart = (state == S_RESTART);
  assign ora_clear   = (state == S_RESTART);
  assign acc_en      = (state == S_ACCUM);

  logic [DEF_CNT_W-1:0] last_sample, last_point;
  assign last_sample = (c.samples == '0) ? '0 : c.samples - 1'b1;
  assign last_point  = (c.num_points == '0) ? '0 : c.num_points - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      c            <= '0;
      cnt          <= '0;
      point        <= '0;
      ph_seen      <= 1'b0;
      mg_seen      <= 1'b0;
      calc_start   <= 1'b0;
      result       <= '0;
      result_valid <= 1'b0;
      bist_done    <= 1'b0;
    end else begin
      calc_start   <= 1'b0;
      result_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (bist_start) begin
          c         <= cfg;
          point     <= '0;
          bist_done <= 1'b0;
          state     <= S_RESTART;
        end
        S_RESTART: begin
          cnt   <= '0;
          state <= (c.settle == '0) ? S_ACCUM : S_SETTLE;
        end
        S_SETTLE: begin
          if (cnt == c.settle - 1'b1) begin
            cnt   <= '0;
            state <= S_ACCUM;
          end else cnt <= cnt + 1'b1;
        end
        S_ACCUM: begin
          if (cnt == last_sample) state <= S_DRAIN;
          else cnt <= cnt + 1'b1;
        end
        S_DRAIN: begin
          calc_start <= 1'b1;
          ph_seen    <= 1'b0;
          mg_seen    <= 1'b0;
          state      <= S_CALC;
        end
        S_CALC: begin
          if (phase_done) begin
            ph_seen      <= 1'b1;
            result.phase <= phase;
          end
          if (mag_done) begin
            mg_seen    <= 1'b1;
            result.mag <= mag;
          end
          if (ph_seen && mg_seen) begin
            result.point  <= point;
            result.fw_ref <= c.fw[2];
            result.dc1    <= dc1;
            result.dc2    <= dc2;
            state         <= S_REPORT;
          end
        end
        S_REPORT: begin
          result_valid <= 1'b1;
          if (point == last_point) begin
            bist_done <= 1'b1;
            state     <= S_IDLE;
          end else begin
            point <= point + 1'b1;
            for (int i = 0; i < 3; i++)
              if (c.sweep_mask[i]) c.fw[i] <= c.fw[i] + c.fw_step;
            state <= S_RESTART;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
