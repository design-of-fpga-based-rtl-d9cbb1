// history_buffer (HB): controls the comparison work according to the
// operation mode. It holds the filtered comparison tasks of every target in
// the hFIFO (history_fifo) and lets the DM address selector (dm_addr_selector)
// pick, every cycle, the histories that go to the comparators.
//
// Write side: up to LANES entries per cycle from the history filter; `full`
// stalls the stages in front of the HB.
// Read side: the DMAS decision drives the DM read addresses combinationally
// (history windows for the comparators, target windows for the lanes); the
// same decision is registered into the issue outputs (iss_*), which therefore
// line up with the DM's registered read data one cycle later.
//
// Timing: an entry written in cycle t can be issued in cycle t+1; its issue
// record and the DM windows are present in cycle t+2.
//
// Structure and behaviour follow the design description; the registered
// issue stage is this design's choice. The SYNCASYNCNET lint warning on rst_n
// comes from the hFIFO assertions' `disable iff` and creates no logic.
module history_buffer
  import lz77_pkg::*;
#(
  parameter int unsigned DEPTH = HB_DEPTH,
  parameter int unsigned LANES = NSTR,
  parameter int unsigned WAYS  = NWAY,
  parameter int unsigned NCMP  = NSC,
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       flush,
  input  mode_e                      mode,
  input  logic                       dyn_skip,
  input  clen_t                      cur,
  // from the history filter
  input  logic [LANES-1:0]           wr_en,
  input  hentry_t [LANES-1:0]        wr_entry,
  output logic                       full,
  // DM read addresses (combinational)
  output pos_t [NCMP-1:0]            dm_hist_addr,
  output pos_t [LANES-1:0]           dm_tgt_addr,
  // issue record (registered)
  output logic [LANES-1:0]           iss_lane_valid,
  output logic [LANES-1:0]           iss_lane_use,
  output pos_t [LANES-1:0]           iss_cindex,
  output logic [LANES-1:0][7:0]      iss_literal,
  output logic [NCMP-1:0]            iss_sc_valid,
  output logic [NCMP-1:0][LW-1:0]    iss_sc_lane,
  output pos_t [NCMP-1:0]            iss_sc_hindex,
  // events
  output logic                       ev_tf_extra_skip,
  output logic                       ev_tf_borrow,
  output logic                       ev_cf_split,
  output logic                       ev_full,
  output logic [$clog2(DEPTH+1)-1:0] hb_count
);

  localparam int unsigned PW = $clog2(LANES + 1);

  hentry_t [LANES-1:0]     rd_entry;
  logic [LANES-1:0]        rd_valid;
  logic [PW-1:0]           pop_cnt;
  logic [LANES-1:0]        lane_issue, lane_use;
  logic [NCMP-1:0]         sc_valid;
  logic [NCMP-1:0][LW-1:0] sc_lane;
  pos_t [NCMP-1:0]         sc_hindex;
  logic [$clog2(DEPTH+1)-1:0] count;   // occupancy, reported as hb_count

  history_fifo #(.DEPTH(DEPTH), .LANES(LANES)) u_hfifo (
    .clk, .rst_n, .flush,
    .wr_en, .wr_entry,
    .pop_cnt (flush ? '0 : pop_cnt),
    .rd_entry, .rd_valid, .count, .full
  );

  dm_addr_selector #(.LANES(LANES), .WAYS(WAYS), .NCMP(NCMP)) u_dmas (
    .mode, .dyn_skip, .cur,
    .rd_entry, .rd_valid,
    .pop_cnt, .lane_issue, .lane_use,
    .sc_valid, .sc_lane, .sc_hindex,
    .tf_extra_skip (ev_tf_extra_skip),
    .tf_borrow     (ev_tf_borrow),
    .cf_split      (ev_cf_split)
  );

  assign dm_hist_addr = sc_hindex;
  always_comb begin
    for (int l = 0; l < LANES; l++) dm_tgt_addr[l] = rd_entry[l].cindex;
  end
  assign ev_full  = full;
  assign hb_count = count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      iss_lane_valid <= '0;
      iss_lane_use   <= '0;
      iss_cindex     <= '0;
      iss_literal    <= '0;
      iss_sc_valid   <= '0;
      iss_sc_lane    <= '0;
      iss_sc_hindex  <= '0;
    end else begin
      iss_lane_valid <= flush ? '0 : lane_issue;
      iss_lane_use   <= flush ? '0 : (lane_issue & lane_use);
      iss_sc_valid   <= flush ? '0 : sc_valid;
      iss_sc_lane    <= sc_lane;
      iss_sc_hindex  <= sc_hindex;
      for (int l = 0; l < LANES; l++) begin
        iss_cindex[l]  <= rd_entry[l].cindex;
        iss_literal[l] <= rd_entry[l].literal;
      end
    end
  end

endmodule
