// branch_metric: distances of the received codeword to the four possible
// codewords {P,Q} = 00, 01, 10, 11.
//
// A received codeword is one symbol pair at rates 1/2 and 3/4 (where the
// de-puncturer may have erased one of the two symbols) and 2 or 4 pairs at
// rates 1/4 and 1/8, where the coder repeats its (P, Q) pair. For each
// symbol the distance to a transmitted '0' is its soft value v and the
// distance to a '1' is (max - v); an erased symbol adds nothing. Soft
// symbols are 3-bit (max 7); at rate 1/8 only their two upper bits are used
// (max 3), the 2-bit quantisation the document assumes for that rate. The
// largest metric is then 14, 14, 28 and 24 for rates 1/2, 3/4, 1/4, 1/8.
//
// Timing: pairs arrive on in_valid with first/last marking the first and
// last pair of a codeword (from the timer). The distances accumulate, and
// one cycle after the last pair bm holds the four metrics with bm_valid high
// for one cycle. The offset-binary soft format and the erasure handling
// by a zero distance are this design's choices.
module branch_metric
  import vit_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  rate_t     rate,
  input  logic      in_valid,
  input  sym_pair_t in_pair,
  input  logic      first,
  input  logic      last,
  output logic      bm_valid,
  output bm_vec_t   bm
);
  bm_vec_t acc;

  // Distance of one soft symbol to a transmitted bit c.
  function automatic logic [BM_W-1:0] sym_dist(input logic [SYM_W-1:0] v,
                                               input logic era, input logic c,
                                               input rate_t r);
    logic [SYM_W-1:0] q, mx;
    if (r == RATE_1_8) begin
      q  = SYM_W'(v[SYM_W-1:1]);
      mx = SYM_W'(3);
    end else begin
      q  = v;
      mx = SYM_W'(7);
    end
    if (era)    sym_dist = '0;
    else if (c) sym_dist = BM_W'(mx - q);
    else        sym_dist = BM_W'(q);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bm_valid <= 1'b0;
      for (int c = 0; c < 4; c++) begin
        acc[c] <= '0;
        bm[c]  <= '0;
      end
    end else begin
      bm_valid <= in_valid && last;
      if (in_valid) begin
        for (int c = 0; c < 4; c++) begin
          logic [BM_W-1:0] sum;
          sum = (first ? '0 : acc[c])
              + sym_dist(in_pair.p, in_pair.p_era, c[1], rate)
              + sym_dist(in_pair.q, in_pair.q_era, c[0], rate);
          acc[c] <= sum;
          if (last) bm[c] <= sum;
        end
      end
    end
  end
endmodule
