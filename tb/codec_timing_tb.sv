// codec_timing_tb -- checks the minor-cycle, stage and word strobes: a
// stage every 4 clocks, a code word (and a data byte) every 20 clocks.
`timescale 1ns/1ps
module codec_timing_tb;
  logic clk = 0, rst_n = 0;
  logic [1:0] minor;
  logic [2:0] stage;
  logic stage_tick, word_tick;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  codec_timing dut (.clk, .rst_n, .minor, .stage, .stage_tick, .word_tick);

  initial begin
    int last_st = -1, last_wd = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      checks++;
      if (minor != 2'(c % 4) || stage != 3'((c / 4) % 5)) failures++;
      if (stage_tick) begin
        checks++;
        if (c % 4 != 3 || (last_st >= 0 && c - last_st != 4)) failures++;
        last_st = c;
      end
      if (word_tick) begin
        checks++;
        if (c % 20 != 19 || (last_wd >= 0 && c - last_wd != 20)) failures++;
        last_wd = c;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
