// tb_history_filter: random lookups and updates on a small set of buckets
// against a tag model kept in the testbench. For each lane the surviving
// histories must be exactly the valid ones whose stored tag equals the
// target's tag (all valid ones with filtering off), packed to the front in
// way order, with nHist and the number removed counted correctly. Updates
// must shift the bucket's tags like the DMU shifts its positions.
module tb_history_filter;
  import lz77_pkg::*;
  localparam int unsigned LANES = 2;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic filter_en;
  logic [LANES+1:0][7:0] key_bytes;
  logic [LANES-1:0][HASH_W-1:0] lane_hash;
  logic [LANES-1:0] lane_upd;
  pos_t [LANES-1:0][NWAY-1:0] hist, hindex;
  logic [LANES-1:0][NWAY-1:0] hist_valid;
  logic [LANES-1:0][NH_W-1:0] nhist, nfiltered;

  history_filter dut (.*);

  tag_t tags [16][$];
  int checks = 0, failures = 0, nrem = 0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int hb [LANES];
      @(negedge clk);
      filter_en = 1'($urandom_range(0, 3) != 0);
      // a small alphabet so that tags repeat
      for (int i = 0; i < LANES + 2; i++) key_bytes[i] = 8'({$urandom_range(0, 3), 5'd0} | 8'($urandom_range(0, 31)));
      hb[0] = int'($urandom_range(0, 15));
      hb[1] = (hb[0] + int'($urandom_range(1, 15))) % 16;
      for (int l = 0; l < LANES; l++) begin
        lane_hash[l] = HASH_W'(hb[l] * 37);
        lane_upd[l]  = 1'($urandom_range(0, 1));
        for (int w = 0; w < NWAY; w++) begin
          hist[l][w]       = pos_t'($urandom);
          hist_valid[l][w] = (w < tags[hb[l]].size()) && ($urandom_range(0, 4) != 0);
        end
      end
      #1;
      for (int l = 0; l < LANES; l++) begin
        tag_t tt;
        int n, nf;
        tt = lz_tag(key_bytes[l], key_bytes[l+1], key_bytes[l+2]);
        n = 0; nf = 0;
        for (int w = 0; w < NWAY; w++) begin
          if (hist_valid[l][w]) begin
            if (!filter_en || tags[hb[l]][w] == tt) begin
              chk(hindex[l][n] == hist[l][w], "packed history");
              n++;
            end else nf++;
          end
        end
        chk(int'(nhist[l]) == n, $sformatf("nhist %0d vs %0d", nhist[l], n));
        chk(int'(nfiltered[l]) == nf, "filtered count");
        nrem += nf;
      end
      @(posedge clk);
      for (int l = 0; l < LANES; l++) begin
        if (lane_upd[l]) begin
          tags[hb[l]].push_front(lz_tag(key_bytes[l], key_bytes[l+1], key_bytes[l+2]));
          if (tags[hb[l]].size() > NWAY) void'(tags[hb[l]].pop_back());
        end
      end
    end
    chk(nrem > 0, "some histories were filtered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
