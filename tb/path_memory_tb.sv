// path_memory_tb -- checks the register-exchange survivor memory against a
// trace-back over the full history of random decisions. States 1 and 6
// only get their legal decisions, and each update names a random output
// state. After every update the oldest stage of that state's survivor must
// equal the bits found by tracing back 32 stages from it (or zero while the history is shorter than the memory),
// and out_valid must follow each update by one clock.
`timescale 1ns/1ps
module path_memory_tb;
  import msn_pkg::*;
  logic clk = 0, rst_n = 0, update = 0;
  acs_dec_t [6:1] dec;
  logic [2:0] out_state = 3'd1;
  logic [1:0] out_bits;
  logic out_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  path_memory dut (.clk, .rst_n, .update, .dec, .out_state, .out_bits, .out_valid);

  int         pred_h [int][1:6];
  logic [1:0] u_h    [int][1:6];

  initial begin
    int n = 0;
    dec = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 4000; i++) begin
      for (int s = 1; s <= 6; s++) begin
        dec[s] = acs_dec_t'($urandom_range(0, 3));
        if (s == 1) dec[s].pair = 1'b1;
        if (s == 6) dec[s].pair = 1'b0;
        // predecessor from the trellis: level and last bit
        begin
          automatic int l = (s - 1) / 2, odd = s % 2, pl, pb;
          if (odd) pl = dec[s].pair ? l : l - 1;
          else     pl = dec[s].pair ? l + 1 : l;
          pb = dec[s].even ? 0 : 1;
          pred_h[n][s] = 2*pl + (pb ? 1 : 2);
          if (pl < l)      u_h[n][s] = 2'b11;
          else if (pl > l) u_h[n][s] = 2'b00;
          else             u_h[n][s] = odd ? 2'b01 : 2'b10;
        end
      end
      update = (i % 3 != 2);
      out_state = 3'($urandom_range(1, 6));
      @(negedge clk);
      if (update) begin
        int s, k;
        logic [1:0] e;
        s = int'(out_state); k = n;
        for (int j = 0; j < PATH_LEN - 1 && k >= 0; j++) begin s = pred_h[k][s]; k--; end
        e = (k >= 0) ? u_h[k][s] : 2'b00;
        checks++;
        if (!out_valid || out_bits !== e) begin
          failures++;
          if (failures < 10) $display("n=%0d got %b exp %b v=%b", n, out_bits, e, out_valid);
        end
        n++;
      end else begin
        checks++;
        if (out_valid) failures++;
      end
      update = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
