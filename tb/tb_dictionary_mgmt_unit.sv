// tb_dictionary_mgmt_unit: walks two positions per cycle through a random
// chunk drawn from a small alphabet (so buckets fill and repeat) and compares
// the DMU with a reference hash table kept in the testbench: for every target
// served, the reported histories must be the bucket's most recent positions,
// newest first, valid only within 16383 bytes; two targets in the same bank
// must be served in consecutive cycles (bank conflict) and targets in
// different banks together; nothing is served while `hold` is high; `clear`
// empties the table.
module tb_dictionary_mgmt_unit;
  import lz77_pkg::*;
  localparam int unsigned LANES = 2;
  localparam int unsigned LEN   = 24000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear = 1'b0, hold = 1'b0, moved = 1'b0;
  logic [LANES-1:0] lane_valid = '0, lane_hashable = '0;
  pos_t pos = '0;
  logic [LANES+1:0][7:0] key_bytes = '0;
  logic [LANES-1:0] lane_proc, lane_upd;
  logic [LANES-1:0][HASH_W-1:0] lane_hash;
  pos_t [LANES-1:0][NWAY-1:0] hist;
  logic [LANES-1:0][NWAY-1:0] hist_valid;
  logic advance, bank_conflict;

  dictionary_mgmt_unit dut (.*);

  byte unsigned data [LEN + 4];
  int bucket [HASH_ENTRIES][$];
  int checks = 0, failures = 0, nconf = 0, nhit = 0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  function automatic int h3(int p);
    return int'(lz_hash(data[p], data[p+1], data[p+2]));
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    bit done0, adv;
    logic [LANES-1:0] lp;
    for (int i = 0; i < LEN + 4; i++) data[i] = byte'($urandom_range(97, 104));
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    p = 0;
    done0 = 1'b0;
    while (p < LEN) begin
      bit e0, e1, same;
      pos = pos_t'(p);
      for (int i = 0; i < LANES + 2; i++) key_bytes[i] = data[p + i];
      for (int l = 0; l < LANES; l++) begin
        lane_valid[l]    = 1'b1;
        lane_hashable[l] = (p + l + 2 < LEN);
      end
      hold  = ($urandom_range(0, 9) == 0);
      moved = 1'b0;
      #1;
      // expected service pattern
      e0 = !hold && !done0;
      same = (h3(p) % NBANK) == (h3(p + 1) % NBANK) && lane_hashable[1] && lane_hashable[0];
      e1 = !hold && (done0 || !same);
      chk(lane_proc == {e1, e0}, $sformatf("service pattern at %0d: %b vs %b", p, lane_proc, {e1, e0}));
      if (!hold && !done0 && same) nconf++;
      chk(bank_conflict == (!hold && !done0 && same), "bank_conflict flag");
      for (int l = 0; l < LANES; l++) begin
        if (lane_proc[l] && lane_hashable[l]) begin
          int h;
          h = h3(p + l);
          chk(int'(lane_hash[l]) == h, "hash");
          for (int w = 0; w < NWAY; w++) begin
            bit ev;
            ev = (w < bucket[h].size()) && (p + l - bucket[h][w] <= 16383);
            chk(hist_valid[l][w] == ev, $sformatf("hist_valid p=%0d l=%0d w=%0d", p, l, w));
            if (ev) begin
              chk(int'(hist[l][w]) == bucket[h][w], "history position");
              nhit++;
            end
          end
        end
      end
      lp  = lane_proc;
      adv = advance;
      @(posedge clk);
      #1;
      for (int l = 0; l < LANES; l++) begin
        if (lp[l] && lane_hashable[l]) begin
          bucket[h3(p + l)].push_front(p + l);
          if (bucket[h3(p + l)].size() > NWAY) void'(bucket[h3(p + l)].pop_back());
        end
      end
      if (adv) begin
        p += LANES;
        done0 = 1'b0;
      end else if (lp[0]) done0 = 1'b1;
      @(negedge clk);
    end
    // clear invalidates everything
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    pos = pos_t'(100);
    for (int i = 0; i < LANES + 2; i++) key_bytes[i] = data[100 + i];
    lane_hashable = '1; hold = 1'b0;
    #1 chk(hist_valid == '0, "table empty after clear");
    chk(nconf > 0, "bank conflicts occurred");
    chk(nhit > 1000, "histories were found");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
