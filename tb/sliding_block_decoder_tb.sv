// sliding_block_decoder_tb -- checks word assembly and decoding.
// Every (level, byte) code word of the encoder table is sent as five
// two-bit stages with the frame flag on the first one and random idle
// clocks in between; each must decode to its byte, one clock after the
// fifth stage. Stages without a frame flag before the first word, and a
// word cut short by a new frame flag, must produce no output.
`timescale 1ns/1ps
module sliding_block_decoder_tb;
  import msn_pkg::*;
  localparam enc_tab_t ENC = build_enc_table();
  logic clk = 0, rst_n = 0;
  logic [1:0] in_bits = 0;
  logic in_frame = 0, in_valid = 0;
  byte_t dout;
  logic dout_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  sliding_block_decoder dut (.clk, .rst_n, .in_bits, .in_frame, .in_valid, .dout, .dout_valid);

  task automatic send(codeword_t w, int nst);
    for (int k = 0; k < nst; k++) begin
      in_bits = w[9-2*k -: 2]; in_frame = (k == 0); in_valid = 1;
      @(negedge clk);
      in_valid = 0; in_frame = 0;
      checks++;
      if (dout_valid) failures++;            // nothing before the fifth stage
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    // unframed stages
    for (int k = 0; k < 7; k++) begin
      in_bits = 2'($urandom); in_valid = 1; @(negedge clk); in_valid = 0;
      checks++;
      if (dout_valid) failures++;
    end
    for (int l = 0; l < 3; l++)
      for (int b = 0; b < 256; b++) begin
        automatic codeword_t w = ENC[l][b];
        if (b % 17 == 0) send(codeword_t'($urandom), 3);   // broken-off word
        send(w, 4);
        in_bits = w[1:0]; in_valid = 1;
        @(negedge clk);
        in_valid = 0;
        checks++;
        if (!dout_valid || dout != byte_t'(b)) begin
          failures++;
          if (failures < 10) $display("level %0d byte %0d word %b got %0d v=%b", l, b, w, dout, dout_valid);
        end
        @(negedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
