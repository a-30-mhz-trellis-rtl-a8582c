// test_channel_tb -- checks the on-chip 1-D channel: for random code words
// each of the five stages must show s1 = L*(u1-u_prev), s2 = L*(u2-u1) and
// the frame flag on the first stage only; samples are 0 when idle.
`timescale 1ns/1ps
module test_channel_tb;
  import msn_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, stage_tick = 0;
  codeword_t code = 0;
  sample_t s1, s2;
  logic frame;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  test_channel dut (.clk, .rst_n, .load, .code, .stage_tick, .s1, .s2, .frame);

  initial begin
    int prev = 0, e1, e2;
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (s1 != 0 || s2 != 0 || frame) failures++;
    for (int w = 0; w < 500; w++) begin
      code = codeword_t'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      for (int k = 0; k < 5; k++) begin
        automatic int u1 = code[9-2*k], u2 = code[8-2*k];
        repeat (2) @(negedge clk);     // outputs hold between ticks
        e1 = LEVEL * (u1 - prev);
        e2 = LEVEL * (u2 - u1);
        checks++;
        if (int'(s1) != e1 || int'(s2) != e2 || frame != (k == 0)) begin
          failures++;
          if (failures < 10) $display("w=%0d k=%0d got %0d %0d %b exp %0d %0d", w, k, s1, s2, frame, e1, e2);
        end
        stage_tick = 1;
        @(negedge clk);
        stage_tick = 0;
        prev = u2;
      end
      checks++;
      if (s1 != 0 || s2 != 0 || frame) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
