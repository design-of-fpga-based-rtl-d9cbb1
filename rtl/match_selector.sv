// match_selector (MS): last pipeline stage. For every target issued in the
// cycle it picks, among the comparators that worked on that target, the
// result with the longest match (on a tie the nearer history, i.e. the lower
// comparator index, wins). It then turns the ordered stream of per-position
// results into LZ77 output with zlib-style lazy matching:
//
//   * a match of at least MIN_LEN bytes is not emitted at once but kept
//     pending until the result of the next position is known;
//   * if the next position has a strictly longer match, the pending position
//     is emitted as a literal and the longer match becomes pending;
//   * otherwise the pending match is emitted as an LD pair and the positions
//     it covers are skipped;
//   * a position without a match is emitted as a literal.
//
// `cur` is the first position not yet represented in the output (the
// engine controller registers cur_next). Results for positions below it lie
// inside an emitted LD pair and are ignored, which is how the valid bits of
// the covered unit operations are cleared. Up to LANES tokens leave per
// cycle, packed to the low indices in stream order.
//
// Longest-match selection and lazy matching follow the design description;
// the tie rule and the pending-register form of lazy matching are this
// design's choices.
module match_selector
  import lz77_pkg::*;
#(
  parameter int unsigned LANES = NSTR,
  parameter int unsigned NCMP  = NSC,
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  clen_t                      cur,
  input  logic [LANES-1:0]           lane_valid,
  input  logic [LANES-1:0]           lane_use,
  input  pos_t [LANES-1:0]           cindex,
  input  logic [LANES-1:0][7:0]      literal,
  input  logic [NCMP-1:0]            sc_valid,
  input  logic [NCMP-1:0][LW-1:0]    sc_lane,
  input  cmp_res_t [NCMP-1:0]        sc_res,
  output logic [LANES-1:0]           tok_valid,
  output token_t [LANES-1:0]         tok,
  output clen_t                      cur_next,
  output logic                       ev_lazy      // a pending match lost to a longer one
);

  logic                 pend_q, pend_d;
  pos_t                 ppos_q, ppos_d;
  mlen_t                plen_q, plen_d;
  logic [DIST_BITS-1:0] pdist_q, pdist_d;
  logic [7:0]           plit_q, plit_d;

  mlen_t [LANES-1:0]                blen;
  logic  [LANES-1:0][DIST_BITS-1:0] bdist;

  // longest match per target
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      blen[l]  = '0;
      bdist[l] = '0;
      for (int k = 0; k < NCMP; k++) begin
        if (sc_valid[k] && sc_lane[k] == LW'(l) && sc_res[k].valid && sc_res[k].len > blen[l]) begin
          blen[l]  = sc_res[k].len;
          bdist[l] = sc_res[k].ld_dist;
        end
      end
    end
  end

  // in-order lazy-matching stream
  always_comb begin
    clen_t c;
    int unsigned n;
    c       = cur;
    n       = 0;
    pend_d  = pend_q;
    ppos_d  = ppos_q;
    plen_d  = plen_q;
    pdist_d = pdist_q;
    plit_d  = plit_q;
    tok_valid = '0;
    tok       = '0;
    ev_lazy   = 1'b0;
    for (int l = 0; l < LANES; l++) begin
      if (lane_valid[l] && lane_use[l] && {1'b0, cindex[l]} >= c) begin
        if (pend_d) begin
          if (blen[l] > plen_d) begin
            tok_valid[n]       = 1'b1;
            tok[n].is_pair     = 1'b0;
            tok[n].literal     = plit_d;
            n++;
            ev_lazy  = 1'b1;
            c        = clen_t'(ppos_d) + 1'b1;
            ppos_d   = cindex[l];
            plen_d   = blen[l];
            pdist_d  = bdist[l];
            plit_d   = literal[l];
          end else begin
            tok_valid[n]       = 1'b1;
            tok[n].is_pair     = 1'b1;
            tok[n].literal     = plit_d;
            tok[n].len_code    = LEN_BITS'(plen_d - mlen_t'(MIN_LEN));
            tok[n].ld_dist        = pdist_d;
            n++;
            c      = clen_t'(ppos_d) + clen_t'(plen_d);
            pend_d = 1'b0;
          end
        end else if (blen[l] >= mlen_t'(MIN_LEN)) begin
          pend_d  = 1'b1;
          c       = clen_t'(cindex[l]);
          ppos_d  = cindex[l];
          plen_d  = blen[l];
          pdist_d = bdist[l];
          plit_d  = literal[l];
        end else begin
          tok_valid[n]   = 1'b1;
          tok[n].is_pair = 1'b0;
          tok[n].literal = literal[l];
          n++;
          c = clen_t'(cindex[l]) + 1'b1;
        end
      end
    end
    cur_next = c;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q  <= 1'b0;
      ppos_q  <= '0;
      plen_q  <= '0;
      pdist_q <= '0;
      plit_q  <= '0;
    end else if (flush) begin
      pend_q  <= 1'b0;
    end else begin
      pend_q  <= pend_d;
      ppos_q  <= ppos_d;
      plen_q  <= plen_d;
      pdist_q <= pdist_d;
      plit_q  <= plit_d;
    end
  end

endmodule
