// sliding_block_decoder -- turns detected code bits back into data bytes.
//
// The detector delivers two code bits per trellis stage together with a
// frame flag that marks the first stage of a code word. The decoder
// gathers five stages into a 10-bit word and looks the word up in a ROM
// (msn_pkg::build_dec_table), the inverse of the encoder table. With the
// substitute code of msn_pkg every word decodes on its own, so the window
// of this decoder is one code word; words that are no code word decode to
// 0x00, and an error in one word affects only that byte.
//
// Timing: in_bits/in_frame are taken when in_valid is high (first
// transmitted bit in in_bits[1]). dout and dout_valid follow one clock
// after the fifth stage of a word; a frame flag restarts word assembly.
module sliding_block_decoder
  import msn_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] in_bits,
  input  logic       in_frame,
  input  logic       in_valid,
  output byte_t      dout,
  output logic       dout_valid
);

  localparam dec_tab_t DEC = build_dec_table();

  logic [7:0] part;     // the first four stages of the word
  logic [2:0] cnt;      // stages gathered so far, 5 = idle

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      part       <= '0;
      cnt        <= 3'd5;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout_valid <= 1'b0;
      if (in_valid) begin
        if (in_frame) begin
          part <= {6'b0, in_bits};
          cnt  <= 3'd1;
        end else if (cnt < 3'd4) begin
          part <= {part[5:0], in_bits};
          cnt  <= cnt + 3'd1;
        end else if (cnt == 3'd4) begin
          dout       <= DEC[{part, in_bits}];
          dout_valid <= 1'b1;
          cnt        <= 3'd5;
        end
      end
    end

endmodule
