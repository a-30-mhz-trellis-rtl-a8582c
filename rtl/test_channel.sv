// test_channel -- on-chip noiseless 1-D (dicode) channel for chip-test mode.
//
// In test mode the encoder's code words are fed through this channel
// straight into the detector, so the decoded output must equal a delayed
// copy of the data input. The channel serializes a 10-bit word into five
// stages of two bits u1,u2 (first bit code[9]) and outputs per stage
//     s1 = L*(u1 - u_prev),   s2 = L*(u2 - u1)
// where u_prev is the last bit of the previous stage and L the sample
// value of a +1. frame is high during the first stage of a word. Outside
// a word (after reset, or when no new word came) the samples are 0.
//
// Timing: load takes a word (it must not coincide with stage_tick); the
// outputs are combinational from the held stage and advance to the next
// stage on each stage_tick, the cycle in which the detector samples them.
module test_channel
  import msn_pkg::*;
#(
  parameter int L = LEVEL
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      load,
  input  codeword_t code,
  input  logic      stage_tick,
  output sample_t   s1,
  output sample_t   s2,
  output logic      frame
);

  codeword_t  sr;
  logic [2:0] idx;      // stage of the word on the outputs, 5 = idle
  logic       u_prev;
  logic       busy;

  assign busy  = (idx < 3'd5);
  assign frame = busy && (idx == 3'd0);

  function automatic sample_t level_of(input logic a, input logic b);
    // L * (a - b)
    if (a == b) return '0;
    return a ? sample_t'(L) : sample_t'(-L);
  endfunction

  always_comb begin
    s1 = busy ? level_of(sr[9], u_prev) : '0;
    s2 = busy ? level_of(sr[8], sr[9])  : '0;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      sr     <= '0;
      idx    <= 3'd5;
      u_prev <= 1'b0;
    end else if (load) begin
      sr  <= code;
      idx <= 3'd0;
    end else if (stage_tick && busy) begin
      sr     <= {sr[7:0], 2'b00};
      u_prev <= sr[8];
      idx    <= idx + 3'd1;
    end

  assert property (@(posedge clk) disable iff (!rst_n) !(load && stage_tick));

endmodule
