// msn_pkg -- constants, types and code tables shared by the rate 8/10
// matched-spectral-null (MSN) trellis codec.
//
// Trellis. The coded dicode (1-D) channel is described by a six-state
// trellis whose stages carry two code bits u1u2 (0/1) and two noiseless
// channel outputs v1v2 = u_i - u_{i-1} in {-1,0,+1}. A state is the pair
// (running-digital-sum level, last code bit): states 1,3,5 end in a 1 and
// sit on levels 0,1,2; states 2,4,6 end in a 0 on levels 0,1,2. A stage
// "11" raises the level by one, "00" lowers it by one, "01" and "10" keep
// it. This numbering reproduces every connection the design relies on:
// state 1 is reached only from states 1 and 2 (labels -1,1 and 0,1),
// state 6 only from states 5 and 6, states 2 and 3 from states 1..4 and
// states 4 and 5 from states 3..6.
//
// Code. The original rate 8/10 codebook is not reproduced here; the
// tables below define a substitute rate 8/10 code with the same trellis:
// every 10-bit code word is a five-stage path that keeps the level inside
// 0..2, so the detector trellis above is exactly the code's trellis. The
// encoder state is the level at the word boundary. Data bytes map as:
//   0..31    the 32 words made only of 01/10 stages (valid from any level);
//            the byte's five low bits pick 01 (0) or 10 (1) per stage,
//   32..242  the 211 words whose level offset stays in 0..+1, ranked in
//            ascending numeric order (levels 0 and 1 use the word, level
//            2 uses its bit complement, whose offset stays in -1..0),
//   243..255 the first 13 words, in ascending order, that need the whole
//            range 0..+2 (level 0; level 2 uses the complement), or, from
//            level 1, that reach both -1 and +1.
// Every word therefore decodes to one byte whatever level it left from,
// so the decoder needs no state. The tables are computed by constant
// functions at elaboration and synthesize to ROM logic.
package msn_pkg;

  localparam int SAMPLE_W  = 6;    // soft-decision sample width
  localparam int LEVEL     = 16;   // sample value of a noiseless +1 output
  localparam int BM_W      = 9;    // branch metric width (signed)
  localparam int PM_W      = 11;   // path metric width (modulo arithmetic)
  localparam int PATH_LEN  = 32;   // register-exchange stages per state

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [BM_W-1:0]     bm_t;
  typedef logic        [PM_W-1:0]     pm_t;
  typedef logic        [1:0]          level_t;
  typedef logic        [9:0]          codeword_t;
  typedef logic        [7:0]          byte_t;

  // Branch metrics of the seven channel-output labels v1v2 used by the
  // trellis (z = 0, p = +1, m = -1).
  typedef struct packed {
    bm_t zz;   // ( 0, 0)
    bm_t pz;   // (+1, 0)
    bm_t mp;   // (-1,+1)
    bm_t zp;   // ( 0,+1)
    bm_t zm;   // ( 0,-1)
    bm_t pm;   // (+1,-1)
    bm_t mz;   // (-1, 0)
  } bm_set_t;

  // ACS decision: pair selects the later pair of candidates (B,D), i.e. the
  // predecessor on the same level; odd_even selects the even-numbered
  // (last bit 0) predecessor of the chosen pair.
  typedef struct packed {
    logic pair;
    logic even;
  } acs_dec_t;

  // x < y for path metrics under modulo normalization: valid while the
  // true difference is smaller than half of 2^PM_W.
  function automatic logic pm_lt(input pm_t x, input pm_t y);
    pm_t diff;
    diff = x - y;
    return diff[PM_W-1];
  endfunction

  typedef logic [2:0][255:0][9:0] enc_tab_t;
  typedef logic [1023:0][7:0]     dec_tab_t;

  // Level offsets of a word: end offset and the minimum and maximum offsets
  // reached at stage boundaries (the word start included).
  typedef struct packed {
    logic signed [3:0] net;
    logic signed [3:0] lo;
    logic signed [3:0] hi;
  } walk_t;

  function automatic walk_t word_walk(input codeword_t w);
    walk_t r;
    r = '0;
    for (int k = 0; k < 5; k++) begin
      if (w[9-2*k] && w[8-2*k])        r.net = r.net + 4'sd1;
      else if (!w[9-2*k] && !w[8-2*k]) r.net = r.net - 4'sd1;
      if (r.net < r.lo) r.lo = r.net;
      if (r.net > r.hi) r.hi = r.net;
    end
    return r;
  endfunction

  // Bit k of the result is set when word w is a legal code word from level k.
  function automatic logic [2:0] word_levels(input codeword_t w);
    walk_t r;
    logic [2:0] m;
    r = word_walk(w);
    for (int l = 0; l < 3; l++) m[l] = (l + int'(r.lo) >= 0) && (l + int'(r.hi) <= 2);
    return m;
  endfunction

  function automatic int word_net(input codeword_t w);
    walk_t r;
    r = word_walk(w);
    return int'(r.net);
  endfunction

  function automatic enc_tab_t build_enc_table();
    enc_tab_t t;
    int r01, r0, r1;
    logic [2:0] m;
    logic [4:0] fb;
    t   = '0;
    r01 = 0;
    r0  = 0;
    r1  = 0;
    for (int i = 0; i < 1024; i++) begin
      m = word_levels(codeword_t'(i));
      if (m == 3'b111) begin
        for (int k = 0; k < 5; k++) fb[4-k] = 1'((i >> (9-2*k)) & 1);
        for (int l = 0; l < 3; l++) t[l][fb] = codeword_t'(i);
      end else if (m == 3'b011) begin
        t[0][32+r01] = codeword_t'(i);
        t[1][32+r01] = codeword_t'(i);
        t[2][32+r01] = ~codeword_t'(i);
        r01++;
      end else if (m == 3'b001) begin
        if (r0 < 13) begin
          t[0][243+r0] = codeword_t'(i);
          t[2][243+r0] = ~codeword_t'(i);
        end
        r0++;
      end else if (m == 3'b010) begin
        if (r1 < 13) t[1][243+r1] = codeword_t'(i);
        r1++;
      end
    end
    return t;
  endfunction

  function automatic dec_tab_t build_dec_table();
    dec_tab_t d;
    enc_tab_t e;
    e = build_enc_table();
    d = '0;
    for (int l = 0; l < 3; l++)
      for (int b = 0; b < 256; b++) d[e[l][b]] = byte_t'(b);
    return d;
  endfunction

endpackage
