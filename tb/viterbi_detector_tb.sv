// viterbi_detector_tb -- checks the pipelined six-state Viterbi detector
// against a plain reference Viterbi algorithm.
//
// A random legal code sequence is drawn stage by stage from the six-state
// trellis (level 0..2, last bit), sent through an ideal dicode channel,
// scaled to L per +1 and disturbed by uniform noise of a slowly changing
// amplitude (0 to 24 LSB, clipped to 6 bits). The reference keeps exact
// integer path metrics built from full squared Euclidean distances,
// derives each state's predecessors from the trellis definition, keeps
// every decision and traces back from the state of smallest metric (the
// lowest-numbered one on a tie) to find the bits the
// register-exchange memory must deliver. Checked for every stage: the six
// ACS decisions of the detector, the detected code bits, the frame flag,
// and the rate of one stage per four clocks. The reference also reports
// the largest spread of its exact path metrics, which must stay well
// below half of the 2^PM_W modulo range.
`timescale 1ns/1ps
module viterbi_detector_tb;
  import msn_pkg::*;

  localparam int NSTAGES = 3000;
  localparam int LENP    = PATH_LEN;

  logic clk = 0, rst_n = 0;
  logic [1:0] minor;
  sample_t s1, s2;
  logic frame_in;
  logic [1:0] out_bits;
  logic out_frame, out_valid;

  always #5 clk = ~clk;

  viterbi_detector dut (.clk, .rst_n, .minor, .s1, .s2, .frame_in,
                        .out_bits, .out_frame, .out_valid);

  int checks = 0, failures = 0;

  // ------------------------------------------------------ reference model
  longint pm [1:6];
  int     hist_pred [int][1:6];    // stage -> state -> predecessor
  logic [1:0] hist_u [int][1:6];
  logic   frame_hist [int];
  logic [1:0] ref_dec [int][1:6];  // {pair, even}
  longint max_spread = 0;
  int     best_hist [int];

  function automatic int lvl(int s); return (s - 1) / 2; endfunction
  function automatic int lastb(int s); return s % 2; endfunction  // odd -> 1
  function automatic int st(int l, int b); return 2*l + (b ? 1 : 2); endfunction

  // one reference ACS step for stage t with samples a,b (zero_bm: all 0)
  task automatic ref_stage(int t, int a, int b, bit zero_bm);
    longint npm [1:6];
    for (int s = 1; s <= 6; s++) begin
      int l = lvl(s), bb = lastb(s);
      int lo = (bb == 1) ? l - 1 : l;       // lower predecessor level
      longint cand [4];
      int     cp   [4];
      logic [1:0] cu [4];
      bit     ok   [4];
      // order: X odd, X even, Y odd, Y even  (= A, C, B, D)
      for (int k = 0; k < 4; k++) begin
        int pl = lo + k / 2, pb = (k % 2 == 0) ? 1 : 0;
        logic [1:0] u;
        int v1, v2;
        longint d;
        ok[k] = (pl >= 0 && pl <= 2);
        if (pl == l + 1) u = 2'b00; else if (pl == l - 1) u = 2'b11; else u = {~bb[0], bb[0]};
        if (ok[k] && u[0] != bb[0]) ok[k] = 0;
        v1 = int'(u[1]) - pb;
        v2 = int'(u[0]) - int'(u[1]);
        d = zero_bm ? 0 : longint'((L_*v1 - a)**2 + (L_*v2 - b)**2);
        cp[k] = ok[k] ? st(pl, pb) : s;
        cu[k] = u;
        cand[k] = ok[k] ? pm[cp[k]] + d : 0;
      end
      begin
        int wx, wy, w;
        wx = (cand[1] < cand[0]) ? 1 : 0;
        wy = (cand[3] < cand[2]) ? 3 : 2;
        if (!ok[0]) w = wy;
        else if (!ok[2]) w = wx;
        else w = (cand[wy] < cand[wx]) ? wy : wx;
        npm[s] = cand[w];
        hist_pred[t][s] = cp[w];
        hist_u[t][s] = cu[w];
        ref_dec[t][s] = {w >= 2, w % 2 == 1};
      end
    end
    begin
      longint mn, mx;
      mn = npm[1]; mx = npm[1];
      best_hist[t] = 1;
      for (int s = 1; s <= 6; s++) begin
        if (npm[s] < mn) best_hist[t] = s;
        pm[s] = npm[s];
        if (npm[s] < mn) mn = npm[s];
        if (npm[s] > mx) mx = npm[s];
      end
      if (!zero_bm && (mx - mn) / L_ > max_spread) max_spread = (mx - mn) / L_;
    end
  endtask

  localparam int L_ = LEVEL;

  // bits of stage t - (LENP-1) on the best survivor at stage t
  function automatic logic [2:0] ref_out(int t);
    int s = best_hist[t], k = t;
    for (int i = 0; i < LENP - 1; i++) begin
      if (k < -1) return 3'b000;
      s = hist_pred[k][s];
      k--;
    end
    if (k < -1) return 3'b000;
    return {frame_hist.exists(k) ? frame_hist[k] : 1'b0, hist_u[k][s]};
  endfunction

  // ------------------------------------------------------------- stimulus
  int cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;

  initial begin
    int lev = 1, lb = 0, noise = 0;
    int a, b;
    logic [1:0] u;
    minor = 0; s1 = 0; s2 = 0; frame_in = 0;
    for (int s = 1; s <= 6; s++) pm[s] = 0;
    ref_stage(-1, 0, 0, 1);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NSTAGES; t++) begin
      // pick a legal stage
      do u = 2'($urandom_range(0, 3));
      while ((u == 2'b11 && lev == 2) || (u == 2'b00 && lev == 0));
      if (u == 2'b11) lev++;
      if (u == 2'b00) lev--;
      if (t % 200 == 0) noise = (t % 600 == 0) ? 0 : $urandom_range(0, 24);
      a = L_ * (int'(u[1]) - lb) + $urandom_range(0, 2*noise) - noise;
      b = L_ * (int'(u[0]) - int'(u[1])) + $urandom_range(0, 2*noise) - noise;
      if (a > 31) a = 31; if (a < -32) a = -32;
      if (b > 31) b = 31; if (b < -32) b = -32;
      lb = u[0];
      truth[t] = u;
      clean[t] = (noise == 0);
      frame_hist[t] = (t % 5 == 0);
      ref_stage(t, a, b, 0);
      // present samples during minor cycle 3
      for (int m = 0; m < 4; m++) begin
        minor = 2'(m);
        if (m == 3) begin s1 = sample_t'(a); s2 = sample_t'(b); frame_in = (t % 5 == 0); end
        @(negedge clk);
      end
    end
    s1 = 0; s2 = 0; frame_in = 0;
    for (int k = 0; k < 80; k++) begin minor = 2'(k % 4); @(negedge clk); end
    $display("reference max path-metric spread (in bm units) = %0d", max_spread);
    checks++;
    if (max_spread >= (1 << (PM_W-1)) / 2) failures++;
    checks++;
    if (n_clean == 0) failures++;
    if (n_out < NSTAGES) begin failures++; $display("too few outputs %0d", n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- checking
  logic [1:0] truth [int];
  bit clean [int];
  int n_clean = 0;
  int n_upd = 0, n_out = 0, last_out_cyc = -1;
  always @(posedge clk) if (rst_n) begin
    if (dut.pm_update && n_upd <= NSTAGES) begin
      int t;
      t = n_upd - 1;               // first update belongs to stage -1
      for (int s = 1; s <= 6; s++) begin
        begin
          checks++;
          if (dut.dec_stage[s] !== ref_dec[t][s]) begin
            failures++;
            if (failures < 10) $display("stage %0d state %0d dec %b exp %b", t, s, dut.dec_stage[s], ref_dec[t][s]);
          end
        end
      end
      n_upd++;
    end
    if (out_valid && n_out <= NSTAGES) begin
      logic [2:0] e;
      int t;
      t = n_out - 1;
      e = ref_out(t);
      // with no noise the detected bits must be the transmitted ones
      if (t - (LENP-1) >= 0 && clean[t - (LENP-1)] && clean[t]) begin
        checks++;
        n_clean++;
        if (out_bits !== truth[t - (LENP-1)]) begin
          failures++;
          if (failures < 10) $display("noiseless stage %0d got %b sent %b", t-(LENP-1), out_bits, truth[t-(LENP-1)]);
        end
      end
      checks++;
      if ({out_frame, out_bits} !== e) begin
        failures++;
        if (failures < 10) $display("out stage %0d got %b exp %b", t, {out_frame, out_bits}, e);
      end
      if (last_out_cyc >= 0) begin
        checks++;
        if (cyc - last_out_cyc != 4) failures++;
      end
      last_out_cyc = cyc;
      n_out++;
    end
  end

  initial begin
    repeat (4 * NSTAGES + 400) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
