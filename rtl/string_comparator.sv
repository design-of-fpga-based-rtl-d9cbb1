// string_comparator (SC): compares the target string (starting at cindex)
// with one earlier string (starting at hindex) and reports how many leading
// bytes agree. The length is capped at MAX_LEN and at the end of the chunk.
// A result of at least MIN_LEN bytes is an LD pair candidate (res.valid),
// with dist = cindex - hindex; anything shorter means the target would be
// output as a literal.
//
// Both strings arrive as RW-byte windows read from the data memory. The two
// windows may overlap (dist < length); this is the usual LZ77 overlapping
// copy and is decoded correctly because the earlier bytes are produced first.
//
// Combinational: the result is valid in the cycle the windows are.
//
// Its function (length of the common prefix, literal or LD pair) follows the
// design description; comparing the whole window in one cycle is this
// design's choice.
module string_comparator
  import lz77_pkg::*;
#(
  parameter int unsigned RW = MAX_LEN
) (
  input  logic               valid,
  input  pos_t               cindex,
  input  pos_t               hindex,
  input  clen_t              chunk_len,
  input  logic [RW-1:0][7:0] tgt,
  input  logic [RW-1:0][7:0] hst,
  output cmp_res_t           res
);

  always_comb begin
    int unsigned n, lim;
    logic run;
    n   = 0;
    run = 1'b1;
    for (int i = 0; i < RW; i++) begin
      run = run && (tgt[i] == hst[i]);
      if (run) n++;
    end
    lim = int'(chunk_len) - int'(cindex);
    if (n > lim)     n = lim;
    if (n > MAX_LEN) n = MAX_LEN;
    res.len   = mlen_t'(n);
    res.ld_dist  = DIST_BITS'(cindex - hindex);
    res.valid = valid && (n >= MIN_LEN);
  end

endmodule
