// trellis_codec_chip -- rate 8/10 MSN trellis codec for a dicode (1-D)
// partial-response channel.
//
// Write side: every 20 clocks (word_tick) a data byte is taken on din and
// the encoder puts out a 10-bit code word on code_out (code_valid for one
// clock). Read side: every 4 clocks (sample_req high) a pair of 6-bit
// soft samples s1_in,s2_in of the channel output is taken, with frame_in
// high for the first stage of each code word; the Viterbi detector turns
// the samples into code bits and the sliding-block decoder turns five
// stages of them into a byte on dout (dout_valid for one clock).
//
// Chip-test mode (test_mode = 1): the encoder output goes through the
// on-chip noiseless 1-D channel into the detector instead of the external
// samples, so dout must repeat din after a fixed delay.
//
// At a 30 MHz clock: 7.5 M trellis stages/s, 12 Mbit/s of data.
// The serial/parallel conversion, the interleaving for a class-IV
// (1-D^2) channel and the analog front end are outside this block.
module trellis_codec_chip
  import msn_pkg::*;
#(
  parameter int LEN = PATH_LEN,
  parameter int L   = LEVEL
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      test_mode,
  // encoder side
  input  byte_t     din,
  output logic      din_req,
  output codeword_t code_out,
  output logic      code_valid,
  // detector side
  input  sample_t   s1_in,
  input  sample_t   s2_in,
  input  logic      frame_in,
  output logic      sample_req,
  // decoder side
  output byte_t     dout,
  output logic      dout_valid
);

  logic [1:0] minor;
  logic [2:0] stage;
  logic       stage_tick, word_tick;
  level_t     enc_level;

  codec_timing u_timing (
    .clk, .rst_n, .minor, .stage, .stage_tick, .word_tick
  );

  assign din_req    = word_tick;
  assign sample_req = stage_tick;

  msn_encoder u_enc (
    .clk, .rst_n, .load(word_tick), .din,
    .code(code_out), .code_valid, .level(enc_level)
  );

  sample_t t_s1, t_s2;
  logic    t_frame;

  test_channel #(.L(L)) u_chan (
    .clk, .rst_n, .load(code_valid), .code(code_out), .stage_tick,
    .s1(t_s1), .s2(t_s2), .frame(t_frame)
  );

  sample_t    d_s1, d_s2;
  logic       d_frame;
  logic [1:0] det_bits;
  logic       det_frame, det_valid;

  always_comb begin
    d_s1    = test_mode ? t_s1    : s1_in;
    d_s2    = test_mode ? t_s2    : s2_in;
    d_frame = test_mode ? t_frame : frame_in;
  end

  viterbi_detector #(.LEN(LEN), .L(L)) u_vd (
    .clk, .rst_n, .minor, .s1(d_s1), .s2(d_s2), .frame_in(d_frame),
    .out_bits(det_bits), .out_frame(det_frame), .out_valid(det_valid)
  );

  sliding_block_decoder u_dec (
    .clk, .rst_n, .in_bits(det_bits), .in_frame(det_frame),
    .in_valid(det_valid), .dout, .dout_valid
  );

endmodule
