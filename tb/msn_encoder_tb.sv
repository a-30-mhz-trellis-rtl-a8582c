// msn_encoder_tb -- checks the rate 8/10 MSN encoder.
// For random data bytes: each word must be a legal path from the current
// level (the level, tracked independently, stays in 0..2 at every stage
// boundary), the reported state must follow the word's net level change,
// code_valid must pulse one clock after load, bytes 0..31 must give the
// all-01/10 word spelling the byte's five low bits, and within a level no
// two bytes may share a word (the map must be invertible).
`timescale 1ns/1ps
module msn_encoder_tb;
  import msn_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  byte_t din = 0;
  codeword_t code;
  logic code_valid;
  level_t level;
  int checks = 0, failures = 0;
  int owner [3][1024];
  always #5 clk = ~clk;

  msn_encoder dut (.clk, .rst_n, .load, .din, .code, .code_valid, .level);

  initial begin
    int lev = 1, c;
    bit legal;
    int seen_level [3] = '{0, 0, 0};
    for (int l = 0; l < 3; l++) for (int w = 0; w < 1024; w++) owner[l][w] = -1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      din = byte_t'($urandom);
      load = 1;
      @(negedge clk);
      load = 0;
      checks++;
      if (!code_valid) failures++;
      c = lev; legal = 1;
      for (int k = 0; k < 5; k++) begin
        if (code[9-2*k +: 1] == 1 && code[8-2*k] == 1) c++;
        if (code[9-2*k] == 0 && code[8-2*k] == 0) c--;
        if (c < 0 || c > 2) legal = 0;
      end
      checks++;
      if (!legal) begin failures++; $display("illegal word %b from level %0d", code, lev); end
      if (din < 32) begin
        logic [9:0] e;
        for (int k = 0; k < 5; k++) e[9-2*k -: 2] = din[4-k] ? 2'b10 : 2'b01;
        checks++;
        if (code != e) failures++;
      end
      checks++;
      if (owner[lev][code] != -1 && owner[lev][code] != din) failures++;
      owner[lev][code] = din;
      seen_level[lev]++;
      lev = c;
      checks++;
      if (int'(level) != lev) failures++;
      @(negedge clk);
      checks++;
      if (code_valid) failures++;
    end
    for (int l = 0; l < 3; l++) begin
      checks++;
      if (seen_level[l] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
