// viterbi_detector -- six-state Viterbi detector for the MSN-coded dicode
// channel, built from two time-shared pipelined ACS units.
//
// Area-efficient pipelining (after the design description): the six-state
// trellis is folded onto two processors. P1 serves the states that end in
// a 1 (1,3,5) and P2 those that end in a 0 (2,4,6); a dummy state is added
// to each (7 to P1, 8 to P2) so that a trellis stage takes four clocks
// ("minor cycles"):
//     minor cycle   0    1    2    3
//     P1 state      1    3    5    7 (dummy)
//     P2 state      8    2    4    6      (8 is a dummy)
// A new metric leaves each three-stage ACS pipeline three clocks after its
// state entered. In minor cycle m both units need the old metrics of
// states 2m-1, 2m+1 (odd) and 2m, 2m+2 (even); with the schedule above
// these are always found on four fixed nets:
//     A = P1 output two clocks ago, B = P1 output one clock ago,
//     C = P2 output one clock ago,  D = P2 output now.
// In minor cycle 0 nets A and C hold metrics of the wrong stage (dummy
// states 7 and 8); P1 (state 1) then ignores its (A,C) half (control C1).
// In minor cycle 3 nets B and D are of the wrong stage; P2 (state 6)
// ignores its (B,D) half (control C2). Because the trellis looks the same
// on every level, each unit uses the same four branch metrics in every
// minor cycle:
//     P1: A->bm(0,0)  C->bm(+1,0)  B->bm(-1,+1)  D->bm(0,+1)
//     P2: A->bm(0,-1) C->bm(+1,-1) B->bm(-1,0)   D->bm(0,0)
// Path metrics use modulo normalization (see pipelined_acs).
//
// Decisions and new metrics of states 1..5 are held until state 6 leaves
// P2; the register-exchange path memory is then updated for the whole
// stage at once, and the oldest stage of the survivor of the state with
// the smallest metric (modulo comparison, lowest state number on a tie)
// is put out. Reading the best state rather than a fixed one is needed
// with this trellis: a path one level away from the true one carries the
// same bits and can stay unmerged for far longer than 32 stages, so the
// survivor of a fixed state can be wrong even without noise.
//
// Interface: minor is the minor-cycle count (0..3) from the timing unit.
// In a cycle with minor == 3 the sample pair s1,s2 of the next stage and
// its frame flag (first stage of a code word) are taken. One stage of two
// detected code bits (first transmitted bit in out_bits[1]) leaves per four
// clocks, with out_valid for one clock and out_frame carrying the frame
// flag of that stage; the latency is LEN+1 stages plus a few clocks.
module viterbi_detector
  import msn_pkg::*;
#(
  parameter int LEN = PATH_LEN,
  parameter int L   = LEVEL
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] minor,
  input  sample_t    s1,
  input  sample_t    s2,
  input  logic       frame_in,
  output logic [1:0] out_bits,
  output logic       out_frame,
  output logic       out_valid
);

  logic stage_tick;
  assign stage_tick = (minor == 2'd3);

  // ---------------------------------------------------------------- BMC
  bm_set_t bm;
  branch_metric_calc #(.L(L)) u_bmc (
    .clk, .rst_n, .load(stage_tick), .s1, .s2, .bm
  );

  logic frame_cur, frame_prev;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      frame_cur  <= 1'b0;
      frame_prev <= 1'b0;
    end else if (stage_tick) begin
      frame_cur  <= frame_in;
      frame_prev <= frame_cur;
    end

  // ------------------------------------------------------ ACS feedback
  pm_t        p1_pm, p2_pm;          // last pipeline latch of P1, P2
  pm_t        p1_d1, p1_d2, p2_d1;   // the same, delayed
  acs_dec_t   p1_dec, p2_dec;
  logic [1:0] p1_tag, p2_tag;
  pm_t        net_a, net_b, net_c, net_d;
  logic       c1, c2;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      p1_d1 <= '0;
      p1_d2 <= '0;
      p2_d1 <= '0;
    end else begin
      p1_d1 <= p1_pm;
      p1_d2 <= p1_d1;
      p2_d1 <= p2_pm;
    end

  assign net_a = p1_d2;
  assign net_b = p1_d1;
  assign net_c = p2_d1;
  assign net_d = p2_pm;
  assign c1    = (minor == 2'd0);
  assign c2    = (minor == 2'd3);

  pipelined_acs #(.TAG_W(2)) u_p1 (
    .clk, .rst_n,
    .pm_a(net_a), .pm_b(net_b), .pm_c(net_c), .pm_d(net_d),
    .bm_a(bm.zz), .bm_b(bm.mp), .bm_c(bm.pz), .bm_d(bm.zp),
    .force_ac(1'b0), .force_bd(c1), .tag_in(minor),
    .pm_out(p1_pm), .dec(p1_dec), .tag_out(p1_tag)
  );

  pipelined_acs #(.TAG_W(2)) u_p2 (
    .clk, .rst_n,
    .pm_a(net_a), .pm_b(net_b), .pm_c(net_c), .pm_d(net_d),
    .bm_a(bm.zm), .bm_b(bm.mz), .bm_c(bm.pm), .bm_d(bm.zz),
    .force_ac(c2), .force_bd(1'b0), .tag_in(minor),
    .pm_out(p2_pm), .dec(p2_dec), .tag_out(p2_tag)
  );

  // --------------------------------------------------- decision capture
  acs_dec_t [6:1] dec_q;
  acs_dec_t [6:1] dec_stage;
  pm_t            pm_q     [1:5];
  pm_t            pm_stage [1:6];
  logic     [2:0] best;
  logic           pm_update;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dec_q <= '0;
      for (int s = 1; s <= 5; s++) pm_q[s] <= '0;
    end else begin
      case (p1_tag)
        2'd0:    begin dec_q[1] <= p1_dec; pm_q[1] <= p1_pm; end
        2'd1:    begin dec_q[3] <= p1_dec; pm_q[3] <= p1_pm; end
        2'd2:    begin dec_q[5] <= p1_dec; pm_q[5] <= p1_pm; end
        default: ;                        // dummy state 7
      endcase
      case (p2_tag)
        2'd1:    begin dec_q[2] <= p2_dec; pm_q[2] <= p2_pm; end
        2'd2:    begin dec_q[4] <= p2_dec; pm_q[4] <= p2_pm; end
        default: ;                        // dummy 8; 6 is used directly
      endcase
    end

  always_comb begin
    dec_stage    = dec_q;
    dec_stage[6] = p2_dec;
    for (int s = 1; s <= 5; s++) pm_stage[s] = pm_q[s];
    pm_stage[6] = p2_pm;
    best = 3'd1;
    for (int s = 2; s <= 6; s++)
      if (pm_lt(pm_stage[s], pm_stage[best])) best = 3'(s);
  end
  assign pm_update = (p2_tag == 2'd3);

  path_memory #(.LEN(LEN)) u_pm (
    .clk, .rst_n, .update(pm_update), .dec(dec_stage), .out_state(best),
    .out_bits, .out_valid
  );

  // frame flags travel beside the survivors, one stage per update
  logic [LEN-1:0] frame_sr;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      frame_sr  <= '0;
      out_frame <= 1'b0;
    end else if (pm_update) begin
      frame_sr  <= {frame_sr[LEN-2:0], frame_prev};
      out_frame <= frame_sr[LEN-2];
    end

endmodule
