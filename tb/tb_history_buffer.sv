// tb_history_buffer: pushes filtered entries (random nHist, consecutive
// positions) into the history buffer and follows what it issues. Every entry
// must be issued exactly once and in order; the issue record must appear one
// cycle after the DM addresses it drives; in CF mode every history of an
// issued entry is compared and at most four per cycle, in TF mode no target
// gets fewer than min(nHist, 2) comparators; `full` must stop the writer and
// the CF split must occur.
module tb_history_buffer;
  import lz77_pkg::*;
  localparam int unsigned LANES = 2;
  localparam int unsigned N     = 4000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic flush = 1'b0;
  mode_e mode = MODE_CF;
  logic dyn_skip = 1'b1;
  clen_t cur = '0;
  logic [LANES-1:0] wr_en = '0;
  hentry_t [LANES-1:0] wr_entry = '0;
  logic full;
  pos_t [NSC-1:0] dm_hist_addr;
  pos_t [LANES-1:0] dm_tgt_addr;
  logic [LANES-1:0] iss_lane_valid, iss_lane_use;
  pos_t [LANES-1:0] iss_cindex;
  logic [LANES-1:0][7:0] iss_literal;
  logic [NSC-1:0] iss_sc_valid;
  logic [NSC-1:0][0:0] iss_sc_lane;
  pos_t [NSC-1:0] iss_sc_hindex;
  logic ev_tf_extra_skip, ev_tf_borrow, ev_cf_split, ev_full;
  logic [5:0] hb_count;

  history_buffer dut (.*);

  int nh [N];
  int checks = 0, failures = 0, next_exp = 0, nfull = 0, nsplit = 0;
  pos_t [NSC-1:0] prev_addr;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  // monitor the issue record
  always @(posedge clk) begin
    if (rst_n) begin
      if (ev_full) nfull++;
      if (ev_cf_split) nsplit++;
      prev_addr <= dm_hist_addr;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      int cnt [LANES];
      for (int l = 0; l < LANES; l++) cnt[l] = 0;
      for (int k = 0; k < NSC; k++) if (iss_sc_valid[k]) begin
        cnt[iss_sc_lane[k]]++;
        chk(iss_sc_hindex[k] == prev_addr[k], "issue record follows DM address");
      end
      for (int l = 0; l < LANES; l++) if (iss_lane_valid[l]) begin
        int q;
        q = int'(iss_cindex[l]);
        chk(q == next_exp, $sformatf("entry %0d issued, expected %0d", q, next_exp));
        chk(iss_literal[l] == 8'(q), "literal carried");
        if (mode == MODE_CF) chk(cnt[l] == nh[q], "CF compares every history");
        else chk(cnt[l] >= (nh[q] < 2 ? nh[q] : 2) && cnt[l] <= nh[q], "TF share");
        next_exp = q + 1;
      end
    end
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    for (int i = 0; i < N; i++) nh[i] = int'($urandom_range(0, 4));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      mode = pass == 0 ? MODE_CF : MODE_TF;
      p = 0;
      next_exp = 0;
      flush = 1'b1;
      @(negedge clk);
      flush = 1'b0;
      while (p < N / 2) begin
        wr_en = '0;
        if (!full && $urandom_range(0, 3) != 0) begin
          for (int l = 0; l < LANES; l++) begin
            wr_en[l] = 1'b1;
            wr_entry[l].is_valid = 1'b1;
            wr_entry[l].cindex   = pos_t'(p + l);
            wr_entry[l].literal  = 8'(p + l);
            wr_entry[l].nhist    = nhist_t'(nh[p + l]);
            for (int h = 0; h < NWAY; h++) wr_entry[l].hindex[h] = pos_t'(10 * (p + l) + h);
          end
          p += LANES;
        end
        @(negedge clk);
      end
      wr_en = '0;
      repeat (40) @(negedge clk);
      chk(next_exp == N / 2, $sformatf("all entries issued (%0d)", next_exp));
    end
    chk(nfull > 0, "full seen");
    chk(nsplit > 0, "CF split seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
