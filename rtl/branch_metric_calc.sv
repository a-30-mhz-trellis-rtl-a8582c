// branch_metric_calc -- branch metrics of one trellis stage.
//
// For a branch whose noiseless channel outputs are v1,v2 in {-1,0,+1} and
// received soft samples s1,s2, the squared distance (L*v1-s1)^2+(L*v2-s2)^2
// is reduced, as in the design description, by dropping the s^2 terms
// common to all branches and dividing by L, the sample value of a +1:
//     bm(v1,v2) = L*(v1^2 + v2^2) - 2*v1*s1 - 2*v2*s2
// Only a one-bit shift (2*s) and adders are needed. The seven labels the
// trellis uses are computed in parallel; bm(0,0) is identically zero and
// is kept in the set only so that both ACS units are wired alike. The scale L (LEVEL) and the
// signed two's-complement sample format are this design's choice.
//
// Timing: when load is high the samples s1,s2 are taken and the metrics
// appear on bm one cycle later; they then stay constant for the whole
// trellis stage (the four minor cycles in which the ACS units use them).
module branch_metric_calc
  import msn_pkg::*;
#(
  parameter int L = LEVEL
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    load,
  input  sample_t s1,
  input  sample_t s2,
  output bm_set_t bm
);

  localparam logic signed [BM_W:0] L1 = (BM_W+1)'(L);
  localparam logic signed [BM_W:0] L2 = (BM_W+1)'(2*L);

  logic signed [BM_W:0] t1, t2;   // 2*s, one extra bit for the shift
  bm_set_t bm_d;

  always_comb begin
    t1 = (BM_W+1)'(s1) <<< 1;
    t2 = (BM_W+1)'(s2) <<< 1;
    bm_d.zz = '0;
    bm_d.pz = bm_t'(L1 - t1);
    bm_d.mz = bm_t'(L1 + t1);
    bm_d.zp = bm_t'(L1 - t2);
    bm_d.zm = bm_t'(L1 + t2);
    bm_d.mp = bm_t'(L2 + t1 - t2);
    bm_d.pm = bm_t'(L2 - t1 + t2);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    bm <= '0;
    else if (load) bm <= bm_d;

endmodule
