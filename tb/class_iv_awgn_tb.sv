// class_iv_awgn_tb -- system test of the workload the codec is meant for:
// a class-IV (1 - D^2) channel served by two dicode codecs.
//
// Two trellis_codec_chip instances (A and B) encode independent random
// data. Their code bits are interleaved (A on even, B on odd positions)
// into one channel stream, sent through a 1 - D^2 channel, disturbed by
// Gaussian noise of standard deviation sigma (in LSB; a noiseless +1 is
// 16 LSB), clipped to 6 bits and deinterleaved back into the two chips.
// The interleaver, channel and noise source are modelled here.
//
// Three noise levels are run, each for WORDS words per chip. Measured per
// level: byte errors after decoding, and symbol errors a slicer with
// thresholds at +-8 LSB would make on the same samples. Checked:
//   * the two chips together take two bytes per 20 clocks (24 Mbit/s at
//     a 30 MHz clock), each byte returning after 153 clocks;
//   * at sigma = 2.5 LSB no byte is lost;
//   * at every level the decoded byte error rate is below the slicer's
//     symbol error rate, i.e. the detector removes most channel errors;
//   * byte errors do not decrease as the noise grows.
`timescale 1ns/1ps
module class_iv_awgn_tb;
  import msn_pkg::*;

  localparam int WORDS = 1500;
  localparam int LAT   = 153;
  localparam real SIGMA [3] = '{2.5, 4.5, 5.5};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  byte_t     din   [2];
  logic      din_req [2];
  codeword_t code  [2];
  logic      code_valid [2];
  sample_t   s1 [2], s2 [2];
  logic      frame [2], sample_req [2];
  byte_t     dout [2];
  logic      dout_valid [2];

  for (genvar c = 0; c < 2; c++) begin : g_chip
    trellis_codec_chip u_chip (
      .clk, .rst_n, .test_mode(1'b0),
      .din(din[c]), .din_req(din_req[c]), .code_out(code[c]), .code_valid(code_valid[c]),
      .s1_in(s1[c]), .s2_in(s2[c]), .frame_in(frame[c]), .sample_req(sample_req[c]),
      .dout(dout[c]), .dout_valid(dout_valid[c])
    );
  end

  int checks = 0, failures = 0, cyc = 0;
  int lvl = 0;
  real sigma = SIGMA[0];
  byte_t sent [2][int];
  int byte_err [3] = '{0, 0, 0}, bytes [3] = '{0, 0, 0};
  int sym_err  [3] = '{0, 0, 0}, syms  [3] = '{0, 0, 0};
  int word_err [3] = '{0, 0, 0}, words [3] = '{0, 0, 0};
  bit word_bad [2] = '{0, 0};
  int n_req = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // data sources
  for (genvar c = 0; c < 2; c++) begin : g_src
    always @(posedge clk) if (rst_n && din_req[c]) begin
      sent[c][cyc] = din[c];
      din[c] <= byte_t'($urandom);
      if (c == 0) n_req++;
    end
  end

  // Gaussian noise (Box-Muller)
  function automatic real gauss(real sd);
    real u1, u2;
    u1 = (real'($urandom_range(1, 1 << 30))) / real'(1 << 30);
    u2 = (real'($urandom_range(0, (1 << 30) - 1))) / real'(1 << 30);
    return sd * $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction
  function automatic sample_t clip(real x);
    int r;
    r = $rtoi(x + ((x >= 0) ? 0.5 : -0.5));
    if (r > 31) r = 31;
    if (r < -32) r = -32;
    return sample_t'(r);
  endfunction
  function automatic int slice(int x);
    return (x > LEVEL/2) ? 1 : (x < -LEVEL/2) ? -1 : 0;
  endfunction

  // Interleaved 1 - D^2 channel. The channel stream is
  //   ... A.u1 B.u1 A.u2 B.u2 ...  per stage of the two chips,
  // so y_k = x_k - x_{k-2} pairs every bit of a chip with that chip's
  // previous bit. Both chips run in lockstep (same clock and reset), so
  // one stage of each is sent per four clocks.
  codeword_t sr [2];
  int idx [2] = '{5, 5};
  logic [3:0] hist = 0;               // last four channel bits, newest in [0]
  int e [2][2];                       // noiseless channel outputs
  always @(posedge clk) begin
    for (int c = 0; c < 2; c++) begin
      if (code_valid[c]) begin
        sr[c]  <= code[c];
        idx[c] <= 0;
      end
    end
    if (sample_req[0] && idx[0] < 5) begin
      logic [3:0] h;
      for (int c = 0; c < 2; c++) begin
        sr[c]  <= {sr[c][7:0], 2'b00};
        idx[c] <= idx[c] + 1;
      end
      // the four channel bits of this stage, in transmission order
      h = {sr[0][9], sr[1][9], sr[0][8], sr[1][8]};
      hist <= h;
    end
  end
  always_comb begin
    // x_k - x_{k-2} for the four bits of the stage on the pins
    logic [7:0] x;   // x[7:4] previous stage, x[3:0] this stage (oldest first = higher)
    x = {hist, sr[0][9], sr[1][9], sr[0][8], sr[1][8]};
    e[0][0] = LEVEL * (int'(x[3]) - int'(x[5]));   // A.u1 - A.prev
    e[1][0] = LEVEL * (int'(x[2]) - int'(x[4]));   // B.u1 - B.prev
    e[0][1] = LEVEL * (int'(x[1]) - int'(x[3]));   // A.u2 - A.u1
    e[1][1] = LEVEL * (int'(x[0]) - int'(x[2]));   // B.u2 - B.u1
  end
  real nz [2][2];
  always @(posedge clk) if (sample_req[0] || code_valid[0])
    for (int c = 0; c < 2; c++) for (int k = 0; k < 2; k++) nz[c][k] = gauss(sigma);
  for (genvar c = 0; c < 2; c++) begin : g_pins
    assign s1[c]    = (idx[c] < 5) ? clip(real'(e[c][0]) + nz[c][0]) : '0;
    assign s2[c]    = (idx[c] < 5) ? clip(real'(e[c][1]) + nz[c][1]) : '0;
    assign frame[c] = (idx[c] == 0);
  end

  // slicer reference and output checking
  always @(posedge clk) if (rst_n && sample_req[0] && idx[0] < 5 && cyc > 200)
    for (int c = 0; c < 2; c++) begin
      bit bad;
      syms[lvl] += 2;
      bad = 0;
      if (slice(int'(s1[c])) != e[c][0] / LEVEL) begin sym_err[lvl]++; bad = 1; end
      if (slice(int'(s2[c])) != e[c][1] / LEVEL) begin sym_err[lvl]++; bad = 1; end
      if (idx[c] == 0) word_bad[c] = bad; else word_bad[c] = word_bad[c] | bad;
      if (idx[c] == 4) begin
        words[lvl]++;
        if (word_bad[c]) word_err[lvl]++;
      end
    end
  int skip_until = 0;
  for (genvar c = 0; c < 2; c++) begin : g_chk
    always @(posedge clk) if (rst_n && dout_valid[c] && cyc >= skip_until) begin
      int src;
      src = cyc - LAT;
      bytes[lvl]++;
      if (!sent[c].exists(src)) begin
        failures++;
        $display("chip %0d: byte at cycle %0d has no source at %0d", c, cyc, src);
      end else if (sent[c][src] != dout[c]) byte_err[lvl]++;
    end
  end

  initial begin
    int start_req, start_cyc;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int l = 0; l < 3; l++) begin
      lvl = l;
      sigma = SIGMA[l];
      skip_until = cyc + LAT + 40;      // bytes sent at the previous level
      start_req = n_req; start_cyc = cyc;
      repeat (WORDS * 20) @(negedge clk);
      // rate: one byte per chip per 20 clocks
      checks++;
      if ((n_req - start_req) != (cyc - start_cyc) / 20) begin
        failures++;
        $display("rate: %0d bytes in %0d clocks", n_req - start_req, cyc - start_cyc);
      end
    end
    repeat (LAT + 20) @(negedge clk);
    for (int l = 0; l < 3; l++) begin
      real ber, ser, wer;
      ber = real'(byte_err[l]) / real'(bytes[l]);
      ser = real'(sym_err[l]) / real'(syms[l]);
      wer = real'(word_err[l]) / real'(words[l]);
      $display("sigma %4.1f LSB: %0d/%0d bytes wrong (%.2e); slicer: symbols %.2e, words %0d/%0d (%.2e)",
               SIGMA[l], byte_err[l], bytes[l], ber, ser, word_err[l], words[l], wer);
      checks++;
      if (bytes[l] < 2 * WORDS - 20) failures++;
      checks++;
      if (l > 0 && ber >= wer) failures++;
      checks++;
      if (l > 0 && byte_err[l] < byte_err[l-1]) failures++;
    end
    checks++;
    if (byte_err[0] != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * WORDS * 20 + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
