// test_controller_tb: self-checking testbench of the BIST test controller.
//
// The phase and magnitude units are replaced by stubs that answer
// calc_start with done pulses after fixed latencies and known values; the
// accumulator sums are replaced by counters of the acc_en cycles since the
// last clear. Several sweeps are run and the testbench checks, per point:
// the number of accumulated samples, the settle time between restart and the
// first accumulation, the frequency words (start word plus point * step on
// the swept NCOs only), the reported record, and the cycle count per point
// (settle + samples + L + 5 with L the later stub latency); per sweep: the
// number of results, bist_done, and that bist_start is ignored while busy.
module test_controller_tb;
  import bist_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, bist_start = 1'b0;
  test_cfg_t cfg;
  logic [2:0][DEF_PHASE_W-1:0] fw, theta;
  tone_sel_e mux1_sel, mux2_sel;
  ora_sel_e mux4_sel;
  logic dut_path, tpg_restart, ora_clear, acc_en, calc_start;
  logic signed [DEF_ACC_W-1:0] dc1 = '0, dc2 = '0;
  logic phase_done = 1'b0, mag_done = 1'b0;
  logic [DEF_ANG_W-1:0] phase = '0;
  logic [DEF_ACC_W-1:0] mag = '0;
  result_t result;
  logic result_valid, busy, bist_done;
  int checks = 0, failures = 0;
  int PL = 7, ML = 12;

  test_controller dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // accumulator stand-in: DC1 counts accumulated samples, DC2 = -DC1
  always_ff @(posedge clk) begin
    if (ora_clear) begin dc1 <= '0; dc2 <= '0; end
    else if (acc_en) begin dc1 <= dc1 + 1; dc2 <= dc2 - 1; end
  end

  // post-processing stand-ins
  int ph_cnt = -1, mg_cnt = -1;
  always @(posedge clk) begin
    phase_done <= 1'b0;
    mag_done <= 1'b0;
    if (calc_start) begin ph_cnt <= PL - 1; mg_cnt <= ML - 1; end
    else begin
      if (ph_cnt > 0) ph_cnt <= ph_cnt - 1;
      if (ph_cnt == 1) begin phase_done <= 1'b1; phase <= DEF_ANG_W'(dc1 * 3); end
      if (ph_cnt == 0) ph_cnt <= -1;
      if (mg_cnt > 0) mg_cnt <= mg_cnt - 1;
      if (mg_cnt == 1) begin mag_done <= 1'b1; mag <= DEF_ACC_W'(dc1 * 5); end
      if (mg_cnt == 0) mg_cnt <= -1;
    end
  end

  task automatic sweep(input int points, input int settle, input int samples, input logic [2:0] mask);
    int got = 0, acc_cnt = 0, since_restart = -1, first_acc = -1, cyc = 0, point_start = 0;
    int L, n_pts, n_smp;
    logic [DEF_PHASE_W-1:0] step;
    step = DEF_PHASE_W'($urandom_range(1, 3000));
    cfg = '0;
    for (int i = 0; i < 3; i++) begin
      cfg.fw[i] = DEF_PHASE_W'($urandom_range(1, 20000));
      cfg.theta[i] = DEF_PHASE_W'($urandom);
    end
    cfg.fw_step = step;
    cfg.sweep_mask = mask;
    cfg.num_points = DEF_CNT_W'(points);
    cfg.settle = DEF_CNT_W'(settle);
    cfg.samples = DEF_CNT_W'(samples);
    cfg.mux1_sel = SRC_SUM;
    cfg.mux2_sel = SRC_NCO3_COS;
    cfg.mux4_sel = ORA_FROM_TPG;
    cfg.dut_path = 1'b1;
    n_pts = (points == 0) ? 1 : points;
    n_smp = (samples == 0) ? 1 : samples;
    L = (PL > ML) ? PL : ML;
    @(negedge clk) bist_start = 1'b1;
    @(negedge clk) bist_start = 1'b0;
    while (!bist_done) begin
      // a second start while busy must be ignored
      bist_start = (cyc == 5);
      if (result_valid) begin
        checks++;
        if (acc_cnt != n_smp || first_acc != settle + 1 ||
            result.point != DEF_CNT_W'(got) || result.dc1 != n_smp || result.dc2 != -n_smp ||
            result.phase != DEF_ANG_W'(n_smp * 3) || result.mag != DEF_ACC_W'(n_smp * 5) ||
            result.fw_ref != DEF_PHASE_W'(cfg.fw[2] + (mask[2] ? got * step : 0))) begin
          failures++;
          $display("point %0d: samples %0d first_acc %0d dc1 %0d phase %0d mag %0d",
                   got, acc_cnt, first_acc, result.dc1, result.phase, result.mag);
        end
        // restart .. REPORT is settle + samples + L + 5 cycles; valid comes one later
        checks++;
        if (cyc - point_start != settle + n_smp + L + 5) begin
          failures++; $display("point %0d took %0d cycles, expected %0d", got, cyc - point_start, settle + n_smp + L + 5);
        end
        point_start = cyc;
        got++;
      end
      if (tpg_restart) begin
        since_restart = 0; acc_cnt = 0; first_acc = -1;
        checks++;
        for (int i = 0; i < 3; i++)
          if (fw[i] != DEF_PHASE_W'(cfg.fw[i] + (mask[i] ? got * step : 0))) begin
            failures++; $display("point %0d NCO%0d fw=%0d", got, i + 1, fw[i]);
          end
        checks++;
        if (theta != cfg.theta || mux1_sel != SRC_SUM || mux2_sel != SRC_NCO3_COS ||
            mux4_sel != ORA_FROM_TPG || !dut_path) begin
          failures++; $display("configuration not applied");
        end
      end
      if (acc_en) begin
        if (first_acc < 0) first_acc = since_restart;
        acc_cnt++;
      end
      if (since_restart >= 0) since_restart++;
      @(negedge clk);
      cyc++;
    end
    bist_start = 1'b0;
    // the last result_valid and bist_done rise together
    if (result_valid) got++;
    checks++;
    if (got != n_pts) begin failures++; $display("got %0d results, expected %0d", got, n_pts); end
    repeat (3) @(negedge clk);
    checks++;
    if (!bist_done || busy) begin failures++; $display("bist_done not held"); end
  endtask

  initial begin
    cfg = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    sweep(1, 0, 1, 3'b000);
    sweep(4, 10, 50, 3'b100);
    sweep(0, 3, 0, 3'b011);
    PL = 20; ML = 4;
    sweep(6, 1, 200, 3'b111);
    sweep(3, 40, 17, 3'b101);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
