// msn_encoder -- rate 8/10 matched-spectral-null trellis encoder.
//
// A finite-state machine turns each data byte into a 10-bit code word. The
// state is the running-digital-sum level (0, 1 or 2) of the code sequence
// at the word boundary; the word is read from a table indexed by state and
// byte, and the next state is the old level plus the word's net level
// change. Every word keeps the level inside 0..2 at every stage boundary,
// so the coded sequence has a spectral null at dc and follows the
// detector's six-state trellis. The table (a ROM, built at elaboration by
// msn_pkg::build_enc_table) realizes a substitute code with this trellis;
// see msn_pkg for its definition. The encoder starts on level 1.
//
// Timing: when load is high din is taken; code holds the new word from the
// next clock until the next load, and code_valid pulses for that one clock.
// The first transmitted bit is code[9].
module msn_encoder
  import msn_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  byte_t     din,
  output codeword_t code,
  output logic      code_valid,
  output level_t    level
);

  localparam enc_tab_t ENC = build_enc_table();

  codeword_t w;
  level_t    level_next;

  always_comb begin
    w          = ENC[level][din];
    level_next = level_t'(int'(level) + word_net(w));
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      level      <= level_t'(1);
      code       <= '0;
      code_valid <= 1'b0;
    end else begin
      code_valid <= load;
      if (load) begin
        code  <= w;
        level <= level_next;
      end
    end

  assert property (@(posedge clk) disable iff (!rst_n) level <= level_t'(2));

endmodule
