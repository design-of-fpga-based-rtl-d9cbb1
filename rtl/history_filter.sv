// history_filter (HF): first step of dynamic skip (false history filtering).
//
// Alongside every history in the hash memory the HF keeps a TAG_BITS-wide
// filtering tag, a function of the three-byte string that was hashed. Its tag
// memory has the same ways, buckets and update pattern as the DMU's hash
// memory (the DMU's per-lane hash and write strobe drive it), so tag way w
// always belongs to history way w.
//
// For each target the HF compares the stored tags of the bucket's valid
// histories with the target's own tag. A history whose tag differs cannot
// start a match of three or more bytes, so it is dropped before it reaches a
// comparator. The surviving histories are packed to the front, nearest first,
// and counted (nHist). With filter_en low only the validity of a history
// counts, which gives the engine without dynamic skip.
//
// Purely combinational from lookup to output; the tag write happens at the
// clock edge together with the DMU's bucket write.
//
// The 7-bit tag and its role follow the design description; which string
// bits form the tag is this design's choice (see lz77_pkg::lz_tag).
module history_filter
  import lz77_pkg::*;
#(
  parameter int unsigned LANES   = NSTR,
  parameter int unsigned WAYS    = NWAY,
  parameter int unsigned ENTRIES = HASH_ENTRIES,
  localparam int unsigned HW     = $clog2(ENTRIES),
  localparam int unsigned CW     = $clog2(WAYS + 1)
) (
  input  logic                               clk,
  input  logic                               filter_en,
  input  logic [LANES+1:0][7:0]              key_bytes,
  input  logic [LANES-1:0][HW-1:0]           lane_hash,
  input  logic [LANES-1:0]                   lane_upd,
  input  pos_t [LANES-1:0][WAYS-1:0]         hist,
  input  logic [LANES-1:0][WAYS-1:0]         hist_valid,
  output pos_t [LANES-1:0][WAYS-1:0]         hindex,
  output logic [LANES-1:0][CW-1:0]           nhist,
  output logic [LANES-1:0][CW-1:0]           nfiltered   // valid histories removed
);

  tag_t tmem [WAYS][ENTRIES];
  tag_t [LANES-1:0] tgt_tag;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      logic [WAYS-1:0] keep;
      int unsigned n, nf;
      tgt_tag[l] = lz_tag(key_bytes[l], key_bytes[l+1], key_bytes[l+2]);
      n  = 0;
      nf = 0;
      for (int w = 0; w < WAYS; w++) hindex[l][w] = '0;
      for (int w = 0; w < WAYS; w++) begin
        keep[w] = hist_valid[l][w] &&
                  (!filter_en || (tmem[w][lane_hash[l]] == tgt_tag[l]));
        if (hist_valid[l][w] && !keep[w]) nf++;
        if (keep[w]) begin
          hindex[l][n] = hist[l][w];
          n++;
        end
      end
      nhist[l]     = CW'(n);
      nfiltered[l] = CW'(nf);
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      if (lane_upd[l]) begin
        tmem[0][lane_hash[l]] <= tgt_tag[l];
        for (int w = 1; w < WAYS; w++) tmem[w][lane_hash[l]] <= tmem[w-1][lane_hash[l]];
      end
    end
  end

endmodule
