// trellis_codec_chip_tb -- end-to-end test of the codec at its default
// parameters.
//
// Phase 1, chip-test mode: random bytes go through encoder, on-chip 1-D
// channel, Viterbi detector and decoder; every decoded byte must equal the
// byte taken a fixed 153 clocks earlier (worked out from the pipeline:
// 4 clocks to the first sample strobe, 3+4 to the first stage's update,
// 16 to the last stage's, 31 stages of path memory at 4 clocks, one
// output register in the path memory and one in the decoder).
// Phase 2, normal mode: the code words leave on code_out and return as
// samples from a dicode channel modelled here, with small uniform noise
// (+-3 LSB) and isolated impulses of 10..14 LSB that make a symbol-by-
// symbol slicer (thresholds at +-L/2) fail. The detector must still
// deliver every byte. Phase 3 returns to chip-test mode.
// Counted mechanisms, each of which must occur: words decoded in each
// mode, mode switches, the C1 and C2 half-disables actually overruling
// the compare, modulo wrap-around of a path metric, all three encoder
// levels, and slicer errors corrected by the detector.
`timescale 1ns/1ps
module trellis_codec_chip_tb;
  import msn_pkg::*;

  localparam int WORDS_PER_PHASE = 400;
  localparam int LAT = 153;

  logic clk = 0, rst_n = 0, test_mode = 1;
  byte_t din = 0;
  logic din_req;
  codeword_t code_out;
  logic code_valid;
  sample_t s1_in, s2_in;
  logic frame_in, sample_req;
  byte_t dout;
  logic dout_valid;

  always #5 clk = ~clk;

  trellis_codec_chip dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  byte_t sent [int];        // byte taken at cycle
  int    sent_mode [int];   // mode in force for that word
  int n_test = 0, n_norm = 0, n_switch = 0, n_c1 = 0, n_c2 = 0, n_wrap = 0;
  int n_slicer = 0, n_impulse = 0;
  int level_seen [3] = '{0, 0, 0};
  int phase = 1, skip_until = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------- data source
  always @(posedge clk) if (rst_n && din_req) begin
    sent[cyc] = din;
    sent_mode[cyc] = test_mode;
    din <= byte_t'($urandom);
    level_seen[dut.enc_level]++;
  end

  // ------------------------------------- external dicode channel + noise
  codeword_t ch_sr = 0;
  int        ch_idx = 5, ch_prev = 0, since_imp = 0;
  int        e1, e2, n1, n2;
  always_comb begin
    if (ch_idx < 5) begin
      e1 = LEVEL * (int'(ch_sr[9]) - ch_prev);
      e2 = LEVEL * (int'(ch_sr[8]) - int'(ch_sr[9]));
    end else begin
      e1 = 0; e2 = 0;
    end
  end
  function automatic sample_t clip(int x);
    if (x > 31) return 31;
    if (x < -32) return -32;
    return sample_t'(x);
  endfunction
  function automatic int slice(int x);
    return (x > LEVEL/2) ? 1 : (x < -LEVEL/2) ? -1 : 0;
  endfunction
  always @(posedge clk) begin
    if (code_valid) begin
      ch_sr  <= code_out;
      ch_idx <= 0;
    end else if (sample_req && ch_idx < 5) begin
      ch_sr   <= {ch_sr[7:0], 2'b00};
      ch_prev <= int'(ch_sr[8]);
      ch_idx  <= ch_idx + 1;
    end
  end
  // new noise for every stage, applied while the stage is on the pins
  always @(posedge clk) if (sample_req || code_valid) begin
    n1 = $urandom_range(0, 6) - 3;
    n2 = $urandom_range(0, 6) - 3;
    since_imp++;
    if (since_imp > 40 && $urandom_range(0, 9) == 0) begin
      since_imp = 0;
      // push one sample across a slicer threshold
      n1 = ($urandom_range(0, 1) ? 1 : -1) * int'($urandom_range(10, 14));
      n_impulse++;
    end
  end
  assign s1_in    = clip(e1 + n1);
  assign s2_in    = clip(e2 + n2);
  assign frame_in = (ch_idx == 0);

  always @(posedge clk) if (rst_n && !test_mode && sample_req && ch_idx < 5) begin
    if (slice(int'(s1_in)) != e1 / LEVEL || slice(int'(s2_in)) != e2 / LEVEL) n_slicer++;
  end

  // ------------------------------------------------------------- checker
  always @(posedge clk) if (rst_n && dout_valid) begin
    int src;
    src = cyc - LAT;
    if (cyc >= skip_until) begin
      checks++;
      if (!sent.exists(src) || sent[src] != dout) begin
        failures++;
        if (failures < 10) $display("cycle %0d: dout %h, expected %h (present %0d)", cyc, dout,
                                    sent.exists(src) ? sent[src] : 8'h00, sent.exists(src));
      end else if (sent_mode[src]) n_test++;
      else n_norm++;
    end
  end

  // ------------------------------------------------- mechanism monitors
  pm_t st1_prev = 0;
  bit  st1_valid = 0;
  always @(posedge clk) if (rst_n) begin
    pm_t d;
    // C1: P1 told to take (B,D) although (A,C) compares smaller
    d = dut.u_vd.u_p1.w_ac - dut.u_vd.u_p1.w_bd;
    if (dut.u_vd.u_p1.f_bd2 && d[PM_W-1]) n_c1++;
    d = dut.u_vd.u_p2.w_bd - dut.u_vd.u_p2.w_ac;
    if (dut.u_vd.u_p2.f_ac2 && d[PM_W-1]) n_c2++;
    // path metric of state 1 wrapping around the modulo range
    if (dut.u_vd.p1_tag == 2'd0) begin
      if (st1_valid && (dut.u_vd.p1_pm[PM_W-1:PM_W-2] == 2'b00 && st1_prev[PM_W-1:PM_W-2] == 2'b11 ||
                        dut.u_vd.p1_pm[PM_W-1:PM_W-2] == 2'b11 && st1_prev[PM_W-1:PM_W-2] == 2'b00))
        n_wrap++;
      st1_prev  <= dut.u_vd.p1_pm;
      st1_valid <= 1;
    end
  end

  task automatic switch_mode(bit m);
    @(negedge clk);
    test_mode = m;
    n_switch++;
    skip_until = cyc + LAT + 30;   // words in flight at the switch are mixed
  endtask

  task automatic expect_pos(string what, int n);
    checks++;
    $display("  %-34s %0d", what, n);
    if (n == 0) begin failures++; $display("  (never happened)"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (WORDS_PER_PHASE * 20) @(negedge clk);
    switch_mode(0);
    repeat (WORDS_PER_PHASE * 20) @(negedge clk);
    switch_mode(1);
    repeat (WORDS_PER_PHASE * 20 + LAT + 40) @(negedge clk);
    $display("mechanisms:");
    expect_pos("bytes checked in chip-test mode", n_test);
    expect_pos("bytes checked in normal mode", n_norm);
    expect_pos("mode switches", n_switch);
    expect_pos("C1 overruled a compare (P1, state 1)", n_c1);
    expect_pos("C2 overruled a compare (P2, state 6)", n_c2);
    expect_pos("state-1 metric wrapped", n_wrap);
    expect_pos("words from level 0", level_seen[0]);
    expect_pos("words from level 1", level_seen[1]);
    expect_pos("words from level 2", level_seen[2]);
    expect_pos("noise impulses", n_impulse);
    expect_pos("slicer errors corrected", n_slicer);
    checks++;
    if (n_test + n_norm < 3 * WORDS_PER_PHASE - 30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WORDS_PER_PHASE * 60 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
