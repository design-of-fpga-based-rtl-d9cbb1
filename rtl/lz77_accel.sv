// lz77_accel: LZ77 compression engine whose balance between compression
// ratio and throughput is chosen per chunk at run time.
//
// The host loads a chunk (up to DM_BYTES) into the data memory, then starts
// the engine with a mode:
//   TF (throughput first): comparisons beyond a target's share of the
//      comparators are skipped, so the pipeline never waits for them;
//   CF (compression-ratio first): every remaining comparison is made, and a
//      unit operation whose comparisons do not fit into the comparators in
//      one cycle is spread over several cycles while the front stalls.
// Dynamic skip (dyn_skip) first removes comparisons that cannot produce a
// match (tag filtering), which lets TF spend comparators on useful histories
// and lets CF finish more unit operations in one cycle.
//
// Pipeline (NSTR = 2 target strings per cycle, NSC = 4 comparators):
//   ISB  input_stream_buffer   positions pos, pos+1 and their first bytes
//   DMU  dictionary_mgmt_unit  4-way hash bucket lookup and insert (bank
//                              conflicts serialise the two targets)
//   HF   history_filter        tag filtering, nHist
//   HB   history_buffer        hFIFO (32 entries) + DM address selector
//   DM   data_memory           windows at the histories and the targets
//   SC   string_comparator x4  match lengths
//   MS   match_selector        longest match, lazy matching, output tokens
//   EC   engine_controller     start/mode/done, cur (valid-bit control)
// ISB, DMU and HF work in the same cycle and write the hFIFO; the HB's
// selection addresses the DM, whose windows reach the comparators and the MS
// in the next cycle.
//
// Output: up to NSTR tokens per cycle (tok_valid/tok, registered), in stream
// order: a literal, or an LD pair of length len_code+3 (3..258) and distance
// dist (1..16383). `done` pulses in the cycle in which the last tokens appear. The ev_*
// outputs pulse on pipeline events and exist for measurement.
//
// The block structure, the two modes, dynamic skip and the sizes follow the
// design description; the single-cycle 258-byte compare, the register
// boundaries and the host write port are this design's choices.
//
// Tool warnings that stand: the history buffer's occupancy output (hb_count)
// is left open here because only its testbench observes it (PINCONNECTEMPTY);
// rst_n also appears in the `disable iff` of the hFIFO's assertions, which the
// linter reports as a reset used both synchronously and asynchronously
// (SYNCASYNCNET). Neither produces logic.
module lz77_accel
  import lz77_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  // host: data memory load
  input  logic                  dm_wr_en,
  input  pos_t                  dm_wr_addr,
  input  logic [7:0]            dm_wr_data,
  // host: control
  input  logic                  start,
  input  mode_e                 mode,
  input  logic                  dyn_skip,
  input  clen_t                 chunk_len,
  output logic                  busy,
  output logic                  done,
  output logic [31:0]           cycles,
  // compressed stream
  output logic [NSTR-1:0]       tok_valid,
  output token_t [NSTR-1:0]     tok,
  // pipeline events
  output logic                  ev_bank_conflict,
  output logic                  ev_hb_full,
  output logic                  ev_tf_extra_skip,
  output logic                  ev_tf_borrow,
  output logic                  ev_cf_split,
  output logic                  ev_lazy,
  output logic                  ev_jump,
  output logic                  ev_filtered
);

  localparam int unsigned NPORT = 1 + NSTR + NSC;
  localparam int unsigned LW    = (NSTR > 1) ? $clog2(NSTR) : 1;

  // control
  logic  clear, run, dsk;
  mode_e cmode;
  clen_t clen, cur, cur_next;

  // DM
  logic [NPORT-1:0]                   dm_rd_en;
  pos_t [NPORT-1:0]                   dm_rd_addr;
  logic [NPORT-1:0][MAX_LEN-1:0][7:0] dm_rd_data;

  // front
  pos_t                       isb_pos, isb_dm_addr;
  logic                       isb_jump;
  logic [NSTR-1:0]            lane_valid, lane_hashable;
  logic [NSTR+1:0][7:0]       key_bytes;
  logic                       isb_moved, dmu_advance;
  logic [NSTR-1:0]            lane_proc, lane_upd;
  logic [NSTR-1:0][HASH_W-1:0] lane_hash;
  pos_t [NSTR-1:0][NWAY-1:0]  hist, hindex;
  logic [NSTR-1:0][NWAY-1:0]  hist_valid;
  logic [NSTR-1:0][NH_W-1:0]  nhist, nfilt;

  // HB
  logic                       hb_full;
  logic [NSTR-1:0]            hb_wr_en;
  hentry_t [NSTR-1:0]         hb_wr_entry;
  pos_t [NSC-1:0]             dm_hist_addr;
  pos_t [NSTR-1:0]            dm_tgt_addr;
  logic [NSTR-1:0]            iss_lane_valid, iss_lane_use;
  pos_t [NSTR-1:0]            iss_cindex;
  logic [NSTR-1:0][7:0]       iss_literal;
  logic [NSC-1:0]             iss_sc_valid;
  logic [NSC-1:0][LW-1:0]     iss_sc_lane;
  pos_t [NSC-1:0]             iss_sc_hindex;
  cmp_res_t [NSC-1:0]         sc_res;

  logic [NSTR-1:0]            ms_tok_valid;
  token_t [NSTR-1:0]          ms_tok;
  logic                       ms_lazy;

  engine_controller u_ec (
    .clk, .rst_n,
    .start, .mode_in (mode), .dyn_skip_in (dyn_skip), .chunk_len_in (chunk_len),
    .cur_next,
    .clear, .busy (run), .done, .mode (cmode), .dyn_skip (dsk),
    .chunk_len (clen), .cur, .cycles
  );
  assign busy = run;

  data_memory #(.DEPTH(DM_BYTES), .NPORT(NPORT), .RW(MAX_LEN)) u_dm (
    .clk,
    .wr_en (dm_wr_en), .wr_addr (dm_wr_addr), .wr_data (dm_wr_data),
    .rd_en (dm_rd_en), .rd_addr (dm_rd_addr), .rd_data (dm_rd_data)
  );

  always_comb begin
    dm_rd_en      = '1;
    for (int l = 0; l < NSTR; l++) dm_rd_addr[1 + l]        = dm_tgt_addr[l];
    for (int k = 0; k < NSC; k++)  dm_rd_addr[1 + NSTR + k] = dm_hist_addr[k];
    dm_rd_addr[0] = isb_dm_addr;
  end

  input_stream_buffer #(.LANES(NSTR), .RW(MAX_LEN)) u_isb (
    .clk, .rst_n,
    .start (clear), .run, .chunk_len (clen),
    .advance (dmu_advance), .cur,
    .dm_addr (isb_dm_addr), .dm_data (dm_rd_data[0]),
    .pos (isb_pos), .lane_valid, .lane_hashable, .key_bytes,
    .moved (isb_moved), .jumped (isb_jump)
  );

  dictionary_mgmt_unit #(.LANES(NSTR), .WAYS(NWAY), .ENTRIES(HASH_ENTRIES), .BANKS(NBANK)) u_dmu (
    .clk, .rst_n, .clear,
    .hold (hb_full), .moved (isb_moved),
    .lane_valid, .lane_hashable, .pos (isb_pos), .key_bytes,
    .lane_proc, .lane_hash, .lane_upd, .hist, .hist_valid,
    .advance (dmu_advance), .bank_conflict (ev_bank_conflict)
  );

  history_filter #(.LANES(NSTR), .WAYS(NWAY), .ENTRIES(HASH_ENTRIES)) u_hf (
    .clk, .filter_en (dsk),
    .key_bytes, .lane_hash, .lane_upd, .hist, .hist_valid,
    .hindex, .nhist, .nfiltered (nfilt)
  );

  always_comb begin
    for (int l = 0; l < NSTR; l++) begin
      hb_wr_en[l]             = lane_proc[l] && lane_valid[l];
      hb_wr_entry[l].is_valid = 1'b1;
      hb_wr_entry[l].cindex   = isb_pos + pos_t'(l);
      hb_wr_entry[l].literal  = key_bytes[l];
      hb_wr_entry[l].nhist    = nhist[l];
      hb_wr_entry[l].hindex   = hindex[l];
    end
    ev_filtered = 1'b0;
    for (int l = 0; l < NSTR; l++)
      if (hb_wr_en[l] && nfilt[l] != '0) ev_filtered = 1'b1;
  end

  history_buffer #(.DEPTH(HB_DEPTH), .LANES(NSTR), .WAYS(NWAY), .NCMP(NSC)) u_hb (
    .clk, .rst_n, .flush (clear),
    .mode (cmode), .dyn_skip (dsk), .cur,
    .wr_en (hb_wr_en), .wr_entry (hb_wr_entry), .full (hb_full),
    .dm_hist_addr, .dm_tgt_addr,
    .iss_lane_valid, .iss_lane_use, .iss_cindex, .iss_literal,
    .iss_sc_valid, .iss_sc_lane, .iss_sc_hindex,
    .ev_tf_extra_skip, .ev_tf_borrow, .ev_cf_split, .ev_full (ev_hb_full), .hb_count ()
  );

  for (genvar k = 0; k < NSC; k++) begin : g_sc
    string_comparator #(.RW(MAX_LEN)) u_sc (
      .valid     (iss_sc_valid[k]),
      .cindex    (iss_cindex[iss_sc_lane[k]]),
      .hindex    (iss_sc_hindex[k]),
      .chunk_len (clen),
      .tgt       (dm_rd_data[1 + iss_sc_lane[k]]),
      .hst       (dm_rd_data[1 + NSTR + k]),
      .res       (sc_res[k])
    );
  end

  match_selector #(.LANES(NSTR), .NCMP(NSC)) u_ms (
    .clk, .rst_n, .flush (clear), .cur,
    .lane_valid (iss_lane_valid), .lane_use (iss_lane_use),
    .cindex (iss_cindex), .literal (iss_literal),
    .sc_valid (iss_sc_valid), .sc_lane (iss_sc_lane), .sc_res,
    .tok_valid (ms_tok_valid), .tok (ms_tok),
    .cur_next, .ev_lazy (ms_lazy)
  );

  assign ev_jump = isb_jump;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_valid <= '0;
      tok       <= '0;
      ev_lazy   <= 1'b0;
    end else begin
      tok_valid <= run ? ms_tok_valid : '0;
      tok       <= ms_tok;
      ev_lazy   <= run && ms_lazy;
    end
  end

endmodule
