// dut_cmd_shiftreg_tb: self-checking testbench of the test chip's serial
// command register.
//
// Random 9-bit command words are shifted in MSB first over DIN with EN
// high. The switch outputs must keep the previous word while shifting and
// show the new word {cur_sw, res_sw} after the first CLK edge with EN low.
// Idle clocks with EN low must change nothing, and a reset clears all.
module dut_cmd_shiftreg_tb;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, din = 1'b0;
  logic [3:0] cur_sw;
  logic [4:0] res_sw;
  int checks = 0, failures = 0;

  dut_cmd_shiftreg dut (.clk, .rst_n, .en, .din, .cur_sw, .res_sw);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [8:0] prev = '0;

  task automatic send(input logic [8:0] w);
    for (int i = 8; i >= 0; i--) begin
      @(negedge clk) en = 1'b1; din = w[i];
      @(posedge clk) #1;
      checks++;
      if ({cur_sw, res_sw} != prev) begin failures++; $display("outputs changed while shifting"); end
    end
    @(negedge clk) en = 1'b0; din = 1'b0;
    @(posedge clk) #1;
    checks++;
    if ({cur_sw, res_sw} != w) begin
      failures++; $display("sent %b got cur=%b res=%b", w, cur_sw, res_sw);
    end
    prev = w;
    repeat ($urandom_range(0, 4)) begin
      @(negedge clk) din = 1'($urandom);
      @(posedge clk) #1;
      checks++;
      if ({cur_sw, res_sw} != w) begin failures++; $display("idle clock changed outputs"); end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++;
    if (cur_sw != 0 || res_sw != 0) failures++;
    send(9'b1000_00001);   // cur = 1000, short the resistor bank
    send(9'b0100_00110);
    send(9'b0001_11110);
    for (int i = 0; i < 40; i++) send(9'($urandom));
    @(negedge clk) rst_n = 1'b0;
    #1;
    checks++;
    if (cur_sw != 0 || res_sw != 0) begin failures++; $display("reset did not clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
