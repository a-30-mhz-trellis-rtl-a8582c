// pipelined_acs_tb -- checks the four-input pipelined ACS unit.
// Every clock a new set of four path metrics (random, spread below 600
// around a random base so that they wrap the modulo range), four branch
// metrics and a random half-disable control is applied. A reference with
// exact integers computes the minimum with the unit's tie rule; the result
// and the decision must appear exactly three clocks later, with the tag.
`timescale 1ns/1ps
module pipelined_acs_tb;
  import msn_pkg::*;
  logic clk = 0, rst_n = 0;
  pm_t pm_a, pm_b, pm_c, pm_d;
  bm_t bm_a, bm_b, bm_c, bm_d;
  logic force_ac = 0, force_bd = 0;
  logic [1:0] tag_in = 0, tag_out;
  pm_t pm_out;
  acs_dec_t dec;
  int checks = 0, failures = 0, wraps = 0;
  always #5 clk = ~clk;

  pipelined_acs dut (.clk, .rst_n, .pm_a, .pm_b, .pm_c, .pm_d, .bm_a, .bm_b,
                     .bm_c, .bm_d, .force_ac, .force_bd, .tag_in, .pm_out,
                     .dec, .tag_out);

  typedef struct { int pm; logic [1:0] dec; logic [1:0] tag; } exp_t;
  exp_t q[$];

  initial begin
    int base, p[4], bmv[4], sum[4], w, wx, wy;
    int pipe_fill = 0;
    pm_a = 0; pm_b = 0; pm_c = 0; pm_d = 0; bm_a = 0; bm_b = 0; bm_c = 0; bm_d = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      base = $urandom_range(0, (1 << PM_W) - 1);
      for (int k = 0; k < 4; k++) begin
        p[k]   = base + ((i % 7 == 0) ? 0 : $urandom_range(0, 500));
        bmv[k] = (i % 11 == 0) ? 0 : $urandom_range(0, 252) - 94;
        sum[k] = p[k] + bmv[k];
        if (p[k] >= (1 << PM_W)) wraps++;
      end
      case ($urandom_range(0, 3))
        0: begin force_ac = 1; force_bd = 0; end
        1: begin force_ac = 0; force_bd = 1; end
        default: begin force_ac = 0; force_bd = 0; end
      endcase
      // order: sum[0]=A, sum[1]=B, sum[2]=C, sum[3]=D
      wx = (sum[2] < sum[0]) ? 2 : 0;
      wy = (sum[3] < sum[1]) ? 3 : 1;
      if (force_bd) w = wy;
      else if (force_ac) w = wx;
      else w = (sum[wy] < sum[wx]) ? wy : wx;
      pm_a = pm_t'(p[0]); pm_b = pm_t'(p[1]); pm_c = pm_t'(p[2]); pm_d = pm_t'(p[3]);
      bm_a = bm_t'(bmv[0]); bm_b = bm_t'(bmv[1]); bm_c = bm_t'(bmv[2]); bm_d = bm_t'(bmv[3]);
      tag_in = 2'(i);
      q.push_back('{pm: sum[w] & ((1 << PM_W) - 1), dec: {w == 1 || w == 3, w >= 2}, tag: 2'(i)});
      @(negedge clk);
      pipe_fill++;
      if (pipe_fill >= 3) begin
        exp_t e;
        e = q.pop_front();
        checks++;
        if (pm_out !== pm_t'(e.pm) || dec !== e.dec || tag_out !== e.tag) begin
          failures++;
          if (failures < 10) $display("i=%0d got %0d/%b/%0d exp %0d/%b/%0d", i, pm_out, dec, tag_out, e.pm, e.dec, e.tag);
        end
      end
    end
    checks++;
    if (wraps == 0) failures++;   // the modulo wrap must have been exercised
    $display("wrapped operands: %0d", wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (25000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
