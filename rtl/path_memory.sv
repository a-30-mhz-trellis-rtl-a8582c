// path_memory -- register-exchange survivor memory for the six-state
// trellis.
//
// Register i always holds the code-bit sequence of the survivor ending in
// state i: LEN stages of two bits (64 bits at the default LEN = 32), the
// newest stage in the two least significant bits. On every update (one per
// trellis stage) each register is rewritten at once with the register of
// the predecessor chosen by that state's ACS decision, shifted by one
// stage, with the two code bits of the chosen branch appended. The
// predecessor and the branch bits follow from the trellis (see msn_pkg):
//   odd state s  (last bit 1): pair 0 -> states s-2/s-1, bits 11
//                              pair 1 -> states s  /s+1, bits 01
//   even state s (last bit 0): pair 0 -> states s-1/s,   bits 10
//                              pair 1 -> states s+1/s+2, bits 00
// where dec.even picks the second (even-numbered) state of the pair.
//
// Output: the oldest stage of the survivor of state out_state (given with
// update; the detector passes the state of smallest path metric), taken
// from the updated registers and registered; out_valid pulses one cycle
// after each update.
module path_memory
  import msn_pkg::*;
#(
  parameter int LEN = PATH_LEN
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                update,
  input  acs_dec_t [6:1]      dec,
  input  logic     [2:0]      out_state,
  output logic     [1:0]      out_bits,
  output logic                out_valid
);

  logic [2*LEN-1:0] path_q [6:1];
  logic [2*LEN-1:0] path_d [6:1];
  int               pred   [6:1];

  always_comb begin
    for (int s = 1; s <= 6; s++) begin
      logic [1:0] u;
      if (s % 2 == 1) begin
        pred[s] = (dec[s].pair ? s : s - 2) + int'(dec[s].even);
        u       = dec[s].pair ? 2'b01 : 2'b11;
      end else begin
        pred[s] = (dec[s].pair ? s + 1 : s - 1) + int'(dec[s].even);
        u       = dec[s].pair ? 2'b00 : 2'b10;
      end
      if (pred[s] < 1 || pred[s] > 6) pred[s] = s;   // unreachable branch
      path_d[s] = {path_q[pred[s]][2*LEN-3:0], u};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 1; s <= 6; s++) path_q[s] <= '0;
      out_bits  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= update;
      if (update) begin
        for (int s = 1; s <= 6; s++) path_q[s] <= path_d[s];
        out_bits <= path_d[out_state][2*LEN-1 -: 2];
      end
    end
  end

  // States 1 and 6 have only two incoming branches.
  assert property (@(posedge clk) disable iff (!rst_n)
                   update |-> (dec[1].pair && !dec[6].pair &&
                               out_state >= 3'd1 && out_state <= 3'd6));

endmodule
