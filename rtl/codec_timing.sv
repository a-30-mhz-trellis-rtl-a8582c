// codec_timing -- local control unit that paces the whole codec.
//
// One trellis stage (two code bits) takes four clocks, the minor cycles
// 0..3 in which the two time-shared ACS units work through their states;
// one 10-bit code word is five stages, i.e. twenty clocks, so the encoder
// and the decoder run at one fifth of the detector's stage rate. At the
// 30 MHz clock this gives 7.5 Mstage/s, 15 Mbit/s of code bits and
// 12 Mbit/s of user data.
//
// Outputs, all registered counters or decodes of them:
//   minor       minor-cycle count 0..3
//   stage       stage count within a code word 0..4
//   stage_tick  last minor cycle of a stage (samples are taken here)
//   word_tick   last minor cycle of the last stage of a code word (the
//               encoder takes its next data byte here)
module codec_timing (
  input  logic       clk,
  input  logic       rst_n,
  output logic [1:0] minor,
  output logic [2:0] stage,
  output logic       stage_tick,
  output logic       word_tick
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      minor <= '0;
      stage <= '0;
    end else begin
      minor <= minor + 2'd1;
      if (minor == 2'd3) stage <= (stage == 3'd4) ? 3'd0 : stage + 3'd1;
    end

  assign stage_tick = (minor == 2'd3);
  assign word_tick  = stage_tick && (stage == 3'd4);

endmodule
