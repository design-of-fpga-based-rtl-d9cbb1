// dm_addr_selector (DMAS): second step of dynamic skip. Looks at the entries
// at the hFIFO read pointers (RP_1 .. RP_LANES, in target order) and decides
// which of their histories go to the NSC string comparators this cycle and
// how many entries leave the FIFO.
//
// An entry needs nHist comparators, or none if it is not valid or already
// lies inside a string replaced by an earlier LD pair (cindex < cur).
//
//  TF mode (throughput first): every visible entry leaves the FIFO each cycle.
//    Each target is given NSC/LANES comparators; with dynamic skip the share
//    a target does not need goes, in target order, to targets that need more
//    (nH = 1 and 4 on four comparators gives 1 + 3). Histories beyond a
//    target's allotment, the most distant ones, are skipped. Without dynamic
//    skip the share is fixed at NSC/LANES.
//  CF mode (compression-ratio first): no history is skipped and all histories
//    of one target are compared in the same cycle. Entries are taken in order
//    while their histories fit into the comparators; the others stay for the
//    next cycle (nH = 4 and 4 on four comparators: only RP_1 leaves; nH = 2
//    and 2: both leave).
//
// Comparator k is given to the target whose range of comparators covers k;
// a target's histories are assigned nearest first. Purely combinational.
//
// The mode rules and the examples follow the design description; handing an
// idle target's share to the following targets in order generalises the
// two-target case it describes.
module dm_addr_selector
  import lz77_pkg::*;
#(
  parameter int unsigned LANES = NSTR,
  parameter int unsigned WAYS  = NWAY,
  parameter int unsigned NCMP  = NSC,
  localparam int unsigned PW   = $clog2(LANES + 1),
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  mode_e                        mode,
  input  logic                         dyn_skip,
  input  clen_t                        cur,
  input  hentry_t [LANES-1:0]          rd_entry,
  input  logic [LANES-1:0]             rd_valid,
  output logic [PW-1:0]                pop_cnt,
  output logic [LANES-1:0]             lane_issue,   // entry leaves the FIFO now
  output logic [LANES-1:0]             lane_use,     // its result is to be used
  output logic [NCMP-1:0]              sc_valid,
  output logic [NCMP-1:0][LW-1:0]      sc_lane,
  output pos_t [NCMP-1:0]              sc_hindex,
  output logic                         tf_extra_skip, // TF dropped needed histories
  output logic                         tf_borrow,     // TF lane exceeded its base share
  output logic                         cf_split       // CF left an entry for later
);

  localparam int unsigned SHARE = NCMP / LANES;

  int unsigned need  [LANES];
  int unsigned alloc [LANES];

  always_comb begin
    int unsigned spare, used, k, more;
    logic stop;
    spare = 0;
    used  = 0;
    more  = 0;
    stop  = 1'b0;

    for (int l = 0; l < LANES; l++) begin
      lane_use[l] = rd_valid[l] && rd_entry[l].is_valid &&
                    ({1'b0, rd_entry[l].cindex} >= cur);
      need[l]     = lane_use[l] ? int'(rd_entry[l].nhist) : 0;
      alloc[l]    = 0;
    end

    lane_issue    = '0;
    tf_extra_skip = 1'b0;
    tf_borrow     = 1'b0;
    cf_split      = 1'b0;

    if (mode == MODE_TF) begin
      used = 0;
      for (int l = 0; l < LANES; l++) begin
        alloc[l] = (need[l] < SHARE) ? need[l] : SHARE;
        used    += alloc[l];
        lane_issue[l] = rd_valid[l];
      end
      if (dyn_skip) begin
        spare = NCMP - used;
        for (int l = 0; l < LANES; l++) begin
          more = need[l] - alloc[l];
          if (more > spare) more = spare;
          if (more != 0) tf_borrow = 1'b1;
          alloc[l] += more;
          spare    -= more;
        end
      end
      for (int l = 0; l < LANES; l++)
        if (alloc[l] < need[l]) tf_extra_skip = 1'b1;
    end else begin
      used = 0;
      stop = 1'b0;
      for (int l = 0; l < LANES; l++) begin
        if (rd_valid[l] && !stop) begin
          if (used + need[l] <= NCMP) begin
            alloc[l]      = need[l];
            used         += need[l];
            lane_issue[l] = 1'b1;
          end else begin
            stop     = 1'b1;
            cf_split = 1'b1;
          end
        end
      end
    end

    pop_cnt = '0;
    for (int l = 0; l < LANES; l++) pop_cnt += PW'(lane_issue[l]);

    // comparator assignment
    sc_valid  = '0;
    sc_lane   = '0;
    sc_hindex = '0;
    k = 0;
    for (int l = 0; l < LANES; l++) begin
      for (int h = 0; h < WAYS; h++) begin
        if (lane_issue[l] && h < alloc[l] && k < NCMP) begin
          sc_valid[k]  = 1'b1;
          sc_lane[k]   = LW'(l);
          sc_hindex[k] = rd_entry[l].hindex[h];
          k++;
        end
      end
    end
  end

endmodule
