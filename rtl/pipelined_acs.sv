// pipelined_acs -- four-input add-compare-select unit with three pipeline
// latches, shared by three trellis states plus one dummy state.
//
// Structure (as in the design description): an adder stage forms the four
// candidate sums pm+bm, a latch, a first compare-select stage reduces the
// pairs (A,C) and (B,D), a latch, a second compare-select picks the
// winner of the two pairs, and a final latch. A new state enters every
// clock (minor cycle), so one unit serves four states per trellis stage.
//
// Modulo normalization: path metrics are PM_W-bit numbers that are allowed
// to wrap. Because the spread of all live metrics is kept below half of
// 2^PM_W, x is smaller than y exactly when the PM_W-bit difference x-y,
// read as signed, is negative. No metric is ever subtracted or rescaled.
//
// Half-disable: force_bd makes the second compare-select take the (B,D)
// pair, force_ac the (A,C) pair; they stand for the control signals that
// switch off the two inputs carrying a metric of the wrong trellis stage
// (minor cycles 1 and 4). Ties keep the earlier candidate (A before C,
// B before D, pair (A,C) before (B,D)): this design's choice.
//
// Interface: the pm_* and bm_* inputs and the force controls are sampled
// in the same cycle; pm_out and dec (pair: 1 = B/D pair won, even: 1 = the
// C/D member won) are valid three cycles later. A tag rides along.
module pipelined_acs
  import msn_pkg::*;
#(
  parameter int TAG_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pm_t              pm_a, pm_b, pm_c, pm_d,
  input  bm_t              bm_a, bm_b, bm_c, bm_d,
  input  logic             force_ac,
  input  logic             force_bd,
  input  logic [TAG_W-1:0] tag_in,
  output pm_t              pm_out,
  output acs_dec_t         dec,
  output logic [TAG_W-1:0] tag_out
);

  // latch 1: sums
  pm_t              s_a, s_b, s_c, s_d;
  logic             f_ac1, f_bd1;
  logic [TAG_W-1:0] tag1;
  // latch 2: pair winners
  pm_t              w_ac, w_bd;
  logic             e_ac, e_bd, f_ac2, f_bd2;
  logic [TAG_W-1:0] tag2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {s_a, s_b, s_c, s_d, f_ac1, f_bd1, tag1} <= '0;
      {w_ac, w_bd, e_ac, e_bd, f_ac2, f_bd2, tag2} <= '0;
      {pm_out, dec, tag_out} <= '0;
    end else begin
      // adder stage
      s_a   <= pm_a + pm_t'(bm_a);
      s_b   <= pm_b + pm_t'(bm_b);
      s_c   <= pm_c + pm_t'(bm_c);
      s_d   <= pm_d + pm_t'(bm_d);
      f_ac1 <= force_ac;
      f_bd1 <= force_bd;
      tag1  <= tag_in;
      // first compare-select
      e_ac  <= pm_lt(s_c, s_a);
      w_ac  <= pm_lt(s_c, s_a) ? s_c : s_a;
      e_bd  <= pm_lt(s_d, s_b);
      w_bd  <= pm_lt(s_d, s_b) ? s_d : s_b;
      f_ac2 <= f_ac1;
      f_bd2 <= f_bd1;
      tag2  <= tag1;
      // second compare-select
      if (f_bd2 || (!f_ac2 && pm_lt(w_bd, w_ac))) begin
        pm_out <= w_bd;
        dec    <= '{pair: 1'b1, even: e_bd};
      end else begin
        pm_out <= w_ac;
        dec    <= '{pair: 1'b0, even: e_ac};
      end
      tag_out <= tag2;
    end
  end

  // Both halves may never be switched off together.
  assert property (@(posedge clk) disable iff (!rst_n) !(force_ac && force_bd));

endmodule
