// dictionary_mgmt_unit (DMU): the hardware counterpart of zlib's hash table.
//
// For every target string it hashes the first three bytes, reads the bucket
// (all NWAY ways in one access: way 0 holds the most recent history) and
// records the target's own position in the same bucket, pushing the oldest
// history out. Lookup and update of a bucket happen in the same cycle (the
// bucket is read combinationally and written at the clock edge), so a later
// target always sees the positions of earlier ones.
//
// The hash memory is split into NBANK banks by the low hash bits and each bank
// has a single port. Two targets of the same unit operation whose buckets fall
// into the same bank cannot be served together: the later one waits for the
// next cycle and the pipeline in front of the DMU stalls (`advance` low).
// Targets that are served in a cycle are flagged in lane_proc, always as a
// contiguous group in lane order.
//
// A history is reported valid only if it was written during the current
// chunk and lies 1..MAX_DIST bytes before the target (distances are 14 bits).
// `clear` (new chunk) invalidates every bucket in one cycle.
//
// Four ways of 4096 buckets and the multi-way, multi-bank organisation follow
// the design description; the bank count, the hash function and the
// combinational bucket read are this design's choices.
module dictionary_mgmt_unit
  import lz77_pkg::*;
#(
  parameter int unsigned LANES   = NSTR,
  parameter int unsigned WAYS    = NWAY,
  parameter int unsigned ENTRIES = HASH_ENTRIES,
  parameter int unsigned BANKS   = NBANK,
  localparam int unsigned HW     = $clog2(ENTRIES),
  localparam int unsigned BW     = (BANKS > 1) ? $clog2(BANKS) : 1
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               clear,
  input  logic                               hold,        // downstream cannot accept
  input  logic                               moved,       // ISB presents new targets
  input  logic [LANES-1:0]                   lane_valid,
  input  logic [LANES-1:0]                   lane_hashable,
  input  pos_t                               pos,         // position of lane 0
  input  logic [LANES+1:0][7:0]              key_bytes,
  output logic [LANES-1:0]                   lane_proc,   // served this cycle
  output logic [LANES-1:0][HW-1:0]           lane_hash,
  output logic [LANES-1:0]                   lane_upd,    // bucket written this cycle
  output pos_t [LANES-1:0][WAYS-1:0]         hist,
  output logic [LANES-1:0][WAYS-1:0]         hist_valid,
  output logic                               advance,     // all lanes served
  output logic                               bank_conflict
);

  pos_t       hmem [WAYS][ENTRIES];
  logic [WAYS-1:0] hvld [ENTRIES];

  logic [LANES-1:0] done_q, done_d;
  logic [LANES-1:0] active;
  logic [LANES-1:0][BW-1:0] bank;

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      lane_hash[l] = HW'(lz_hash(key_bytes[l], key_bytes[l+1], key_bytes[l+2]));
      bank[l]      = (BANKS > 1) ? BW'(lane_hash[l]) : '0;
      active[l]    = lane_valid[l] && lane_hashable[l];
    end
  end

  // serve lanes in order; stop at the first one whose bank is already in use
  always_comb begin
    logic blocked;
    logic [BANKS-1:0] busy;
    blocked       = hold;
    busy          = '0;
    lane_proc     = '0;
    lane_upd      = '0;
    bank_conflict = 1'b0;
    for (int l = 0; l < LANES; l++) begin
      if (!done_q[l] && !blocked) begin
        if (active[l] && busy[bank[l]]) begin
          blocked       = 1'b1;
          bank_conflict = 1'b1;
        end else begin
          lane_proc[l] = 1'b1;
          lane_upd[l]  = active[l];
          if (active[l]) busy[bank[l]] = 1'b1;
        end
      end
    end
    done_d  = done_q | lane_proc;
    advance = &done_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  done_q <= '0;
    else if (clear || advance)   done_q <= '0;
    else if (moved)              done_q <= '0;
    else                         done_q <= done_d;
  end

  // lookup
  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      for (int w = 0; w < WAYS; w++) begin
        pos_t d;
        hist[l][w] = hmem[w][lane_hash[l]];
        d          = pos + pos_t'(l) - hist[l][w];
        hist_valid[l][w] = active[l] && hvld[lane_hash[l]][w] &&
                           (d != '0) && (int'(d) <= int'(MAX_DIST)) &&
                           (hist[l][w] < pos + pos_t'(l));
      end
    end
  end

  // update: the new position enters way 0, the oldest history leaves
  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      if (lane_upd[l] && !clear) begin
        hmem[0][lane_hash[l]] <= pos + pos_t'(l);
        for (int w = 1; w < WAYS; w++) hmem[w][lane_hash[l]] <= hmem[w-1][lane_hash[l]];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) hvld[e] <= '0;
    end else if (clear) begin
      for (int e = 0; e < ENTRIES; e++) hvld[e] <= '0;
    end else begin
      for (int l = 0; l < LANES; l++) begin
        if (lane_upd[l]) hvld[lane_hash[l]] <= {hvld[lane_hash[l]][WAYS-2:0], 1'b1};
      end
    end
  end

endmodule
