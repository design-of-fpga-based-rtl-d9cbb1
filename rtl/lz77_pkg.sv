// lz77_pkg: sizes, types and small helper functions shared by the LZ77
// compression engine.
//
// The engine searches NSTR target strings per cycle; each search may yield up
// to NWAY previous positions (histories) from a NWAY-way hash memory, and
// NSC string comparators are shared between the targets. The numbers below
// are the configuration evaluated for the design: two targets per cycle,
// four ways of 4096 buckets, four comparators, a 32 KB chunk held in the data
// memory, a 7-bit filtering tag, a 32-entry history FIFO, 14-bit distances and
// 8-bit length codes (length minus three, as in zlib, maximum 258).
// The number of hash-memory banks (8) and the hash/tag functions are this
// design's own choices. The tag deliberately uses only the upper bits of the
// three bytes (the hash already covers the lower ones), so the linter reports
// the unused lower bits of lz_tag's arguments; that is intended.
// A block linted on its own uses only some of these constants, so unused
// package parameters are reported per block; they are used elsewhere.
package lz77_pkg;

  // ---------------- configuration ----------------
  localparam int unsigned NSTR         = 2;      // target strings per unit-operation cycle
  localparam int unsigned NWAY         = 4;      // hash-memory ways = histories per target (n)
  localparam int unsigned NSC          = 4;      // string comparators
  localparam int unsigned HASH_ENTRIES = 4096;   // buckets per way
  localparam int unsigned NBANK        = 8;      // hash-memory banks (assumed)
  localparam int unsigned DM_BYTES     = 32768;  // data memory = chunk size
  localparam int unsigned TAG_BITS     = 7;      // filtering tag width
  localparam int unsigned HB_DEPTH     = 32;     // hFIFO entries
  localparam int unsigned MIN_LEN      = 3;      // shortest string replaced by an LD pair
  localparam int unsigned MAX_LEN      = 258;    // longest string replaced (8-bit length code)
  localparam int unsigned DIST_BITS    = 14;     // LD-pair distance width
  localparam int unsigned LEN_BITS     = 8;      // LD-pair length-code width (len - MIN_LEN)
  localparam int unsigned MAX_DIST     = (1 << DIST_BITS) - 1;

  localparam int unsigned POS_W   = $clog2(DM_BYTES);       // byte position in the chunk
  localparam int unsigned CLEN_W  = POS_W + 1;              // chunk length (0..DM_BYTES)
  localparam int unsigned HASH_W  = $clog2(HASH_ENTRIES);
  localparam int unsigned NH_W    = $clog2(NWAY + 1);       // nHist width
  localparam int unsigned ML_W    = $clog2(MAX_LEN + 1);    // match length width

  typedef logic [POS_W-1:0]  pos_t;
  typedef logic [CLEN_W-1:0] clen_t;
  typedef logic [HASH_W-1:0] hash_t;
  typedef logic [TAG_BITS-1:0] tag_t;
  typedef logic [NH_W-1:0]   nhist_t;
  typedef logic [ML_W-1:0]   mlen_t;

  // operation mode, chosen with every compression request
  typedef enum logic {
    MODE_CF = 1'b0,   // compression-ratio first
    MODE_TF = 1'b1    // throughput first
  } mode_e;

  // one hFIFO entry (one target string after history filtering)
  typedef struct packed {
    logic                  is_valid;  // target exists and its result may be used
    pos_t                  cindex;    // start of the target string
    logic [7:0]            literal;   // byte at cindex
    nhist_t                nhist;     // histories left after filtering
    pos_t [NWAY-1:0]       hindex;    // histories, [0] is the nearest
  } hentry_t;

  // one comparator result
  typedef struct packed {
    logic   valid;
    mlen_t  len;
    logic [DIST_BITS-1:0] ld_dist;
  } cmp_res_t;

  // one LZ77 output token
  typedef struct packed {
    logic                 is_pair;   // 1: LD pair, 0: literal
    logic [7:0]           literal;
    logic [LEN_BITS-1:0]  len_code;  // match length - MIN_LEN
    logic [DIST_BITS-1:0] ld_dist;
  } token_t;

  // hash of the three bytes starting at a position: each byte folded to
  // four bits with a different mix, packed into 12 bits
  function automatic hash_t lz_hash(input logic [7:0] b0, input logic [7:0] b1,
                                    input logic [7:0] b2);
    logic [11:0] h;
    h = {b0[3:0], b1[3:0], b2[3:0]} ^ {b1[7:4], b2[7:4], b0[7:4]};
    return hash_t'(h);
  endfunction

  // filtering tag: upper bits of the first two bytes, a part of the
  // three-byte string not fully recoverable from the hash
  function automatic tag_t lz_tag(input logic [7:0] b0, input logic [7:0] b1,
                                  input logic [7:0] b2);
    logic [6:0] t;
    t = {b0[7:4], b1[7:5]} ^ {4'b0, b2[7:5]};
    return tag_t'(t);
  endfunction

endpackage
