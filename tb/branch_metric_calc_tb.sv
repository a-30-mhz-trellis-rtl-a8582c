// branch_metric_calc_tb -- checks the seven branch metrics against the
// full squared Euclidean distance: for every label, L*bm + s1^2 + s2^2
// must equal (L*v1 - s1)^2 + (L*v2 - s2)^2. Also checks that the metrics
// are held while load is low and appear one clock after load.
`timescale 1ns/1ps
module branch_metric_calc_tb;
  import msn_pkg::*;
  logic clk = 0, rst_n = 0, load = 0;
  sample_t s1 = 0, s2 = 0;
  bm_set_t bm;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  branch_metric_calc dut (.clk, .rst_n, .load, .s1, .s2, .bm);

  function automatic int sqdist(int v1, int v2, int a, int b);
    return (LEVEL*v1 - a)**2 + (LEVEL*v2 - b)**2;
  endfunction

  task automatic chk(string nm, bm_t got, int v1, int v2, int a, int b);
    checks++;
    if (LEVEL*int'(got) + a*a + b*b != sqdist(v1, v2, a, b)) begin
      failures++;
      $display("%s s=(%0d,%0d) got %0d", nm, a, b, got);
    end
  endtask

  initial begin
    int a, b;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      if (i < 4096 && i % 3 == 0) begin a = -32 + (i/3) % 64; b = -32 + (i/192) % 64; end
      else begin a = $urandom_range(0, 63) - 32; b = $urandom_range(0, 63) - 32; end
      s1 = sample_t'(a); s2 = sample_t'(b); load = 1;
      @(negedge clk);
      load = 0; s1 = sample_t'($urandom); s2 = sample_t'($urandom);
      chk("zz", bm.zz, 0, 0, a, b);
      chk("pz", bm.pz, 1, 0, a, b);
      chk("mp", bm.mp, -1, 1, a, b);
      chk("zp", bm.zp, 0, 1, a, b);
      chk("zm", bm.zm, 0, -1, a, b);
      chk("pm", bm.pm, 1, -1, a, b);
      chk("mz", bm.mz, -1, 0, a, b);
      @(negedge clk);                // held while load is low
      chk("hold", bm.pm, 1, -1, a, b);
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
