// analog_path_model: testbench model of the analog side of the BIST loop:
// DAC -> amplifier -> analog MUX3 -> (device under test | bypass) -> ADC.
//
// Not synthesizable; used only to close the loop in the system testbench.
// The DAC word is taken as a voltage in LSB. The device under test is a
// first-order low-pass, y[n] = (1 - a) y[n-1] + a * G * x[n], whose pole a
// follows the op-amp's bias current switch (a = max(weight,1)/32 with
// weight = 8*b3 + 4*b2 + 2*b1 + b0), the way the op-amp's bandwidth follows
// its bias current. Optionally a cubic term c3*x^3 is added at its input
// (intermodulation) and Gaussian noise of sigma NOISE LSB at its output.
// The bypass path has gain 1. Either path then has DELAY clock cycles of
// latency (DAC, ADC and buffers) and is rounded and clipped to the 8-bit ADC.
module analog_path_model #(
  parameter int DELAY = 3,
  parameter real GAIN = 0.9
) (
  input  logic              clk,
  input  logic signed [7:0] dac_data,
  input  logic              mux3_dut,
  input  logic [3:0]        cur_sw,
  input  real               c3,       // cubic coefficient, 1/LSB^2
  input  real               noise,    // noise sigma in LSB
  output logic signed [7:0] adc_data
);
  real y = 0.0;
  real alpha;
  logic signed [7:0] pipe [DELAY];

  always_comb alpha = ((cur_sw == 0) ? 1.0 : real'(cur_sw)) / 32.0;

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += real'($urandom_range(0, 1000000)) / 1000000.0;
    return s - 6.0;
  endfunction

  function automatic logic signed [7:0] quantize(input real v);
    int q;
    q = $rtoi($floor(v + 0.5));
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return 8'(q);
  endfunction

  always @(posedge clk) begin
    real x, v;
    x = real'(dac_data);
    x = x + c3 * x * x * x;
    y = (1.0 - alpha) * y + alpha * GAIN * x;
    v = mux3_dut ? y : real'(dac_data);
    if (noise > 0.0) v = v + noise * gauss();
    pipe[0] <= quantize(v);
    for (int i = 1; i < DELAY; i++) pipe[i] <= pipe[i-1];
  end

  assign adc_data = pipe[DELAY-1];
endmodule
