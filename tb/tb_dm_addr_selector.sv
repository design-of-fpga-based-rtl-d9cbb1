// tb_dm_addr_selector: checks the mode-dependent assignment of histories to
// the four comparators. First the three worked examples of the design (TF
// with nH = 1 and 4 -> 1 + 3 comparisons, both entries leave; CF with 4 and 4
// -> only the first entry; CF with 2 and 2 -> both), then random entries
// against a reference computed differently: the TF reference enumerates every
// split of the comparators and takes the first in lane order that follows
// the share rule, the CF reference walks the entries.
module tb_dm_addr_selector;
  import lz77_pkg::*;
  localparam int unsigned LANES = 2;
  localparam int unsigned NCMP  = 4;

  mode_e               mode;
  logic                dyn_skip;
  clen_t               cur;
  hentry_t [LANES-1:0] rd_entry;
  logic [LANES-1:0]    rd_valid;
  logic [1:0]          pop_cnt;
  logic [LANES-1:0]    lane_issue, lane_use;
  logic [NCMP-1:0]     sc_valid;
  logic [NCMP-1:0][0:0] sc_lane;
  pos_t [NCMP-1:0]     sc_hindex;
  logic tf_extra_skip, tf_borrow, cf_split;

  dm_addr_selector #(.LANES(LANES), .WAYS(NWAY), .NCMP(NCMP)) dut (.*);

  int checks = 0, failures = 0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", s); end
  endtask

  function automatic void set_entry(int l, int nh, bit v);
    rd_entry[l].is_valid = 1'b1;
    rd_entry[l].cindex   = pos_t'(100 + l);
    rd_entry[l].literal  = 8'(l);
    rd_entry[l].nhist    = nhist_t'(nh);
    for (int h = 0; h < NWAY; h++) rd_entry[l].hindex[h] = pos_t'(1000 * (l + 1) + h);
    rd_valid[l] = v;
  endfunction

  // count comparators given to each lane and check nearest-first order
  task automatic observe(output int a0, output int a1);
    a0 = 0; a1 = 0;
    for (int k = 0; k < NCMP; k++) begin
      if (sc_valid[k]) begin
        if (sc_lane[k] == 0) begin
          chk(sc_hindex[k] == rd_entry[0].hindex[a0], "lane 0 history order");
          a0++;
        end else begin
          chk(sc_hindex[k] == rd_entry[1].hindex[a1], "lane 1 history order");
          a1++;
        end
      end
    end
  endtask

  initial begin
    int a0, a1;
    cur = '0;
    dyn_skip = 1'b1;
    // Fig. A: TF, nH 1 and 4
    mode = MODE_TF; set_entry(0, 1, 1); set_entry(1, 4, 1); #1;
    observe(a0, a1);
    chk(a0 == 1 && a1 == 3 && pop_cnt == 2, "TF example 1+3");
    // Fig. B: CF, 4 and 4
    mode = MODE_CF; set_entry(0, 4, 1); set_entry(1, 4, 1); #1;
    observe(a0, a1);
    chk(a0 == 4 && a1 == 0 && pop_cnt == 1 && cf_split, "CF example 4/4");
    // Fig. C: CF, 2 and 2
    set_entry(0, 2, 1); set_entry(1, 2, 1); #1;
    observe(a0, a1);
    chk(a0 == 2 && a1 == 2 && pop_cnt == 2 && !cf_split, "CF example 2/2");
    // entry below cur needs no comparator
    cur = clen_t'(101); set_entry(0, 4, 1); set_entry(1, 4, 1); #1;
    observe(a0, a1);
    chk(a0 == 0 && a1 == 4 && pop_cnt == 2 && lane_use == 2'b10, "stale entry skipped");
    cur = '0;

    for (int t = 0; t < 3000; t++) begin
      int n0, n1, e0, e1, x0, x1, xp;
      mode     = mode_e'($urandom_range(0, 1));
      dyn_skip = 1'($urandom_range(0, 1));
      n0 = int'($urandom_range(0, 4)); n1 = int'($urandom_range(0, 4));
      set_entry(0, n0, 1'($urandom_range(0, 7) != 0));
      set_entry(1, n1, rd_valid[0] ? 1'($urandom_range(0, 3) != 0) : 1'b0);
      #1;
      observe(a0, a1);
      e0 = rd_valid[0] ? n0 : 0;
      e1 = rd_valid[1] ? n1 : 0;
      if (mode == MODE_TF) begin
        if (!dyn_skip) begin
          x0 = e0 < 2 ? e0 : 2; x1 = e1 < 2 ? e1 : 2;
        end else begin
          // largest total, then favour lane 0, subject to each lane getting
          // min(need, 2) at least
          int best;
          best = -1; x0 = 0; x1 = 0;
          for (int i = 0; i <= e0; i++)
            for (int j = 0; j <= e1; j++)
              if (i + j <= NCMP && i >= (e0 < 2 ? e0 : 2) && j >= (e1 < 2 ? e1 : 2))
                if (i + j > best || (i + j == best && i > x0)) begin
                  best = i + j; x0 = i; x1 = j;
                end
        end
        xp = int'(rd_valid[0]) + int'(rd_valid[1]);
      end else begin
        x0 = 0; x1 = 0; xp = 0;
        if (rd_valid[0]) begin
          x0 = e0; xp = 1;
          if (rd_valid[1] && e0 + e1 <= NCMP) begin x1 = e1; xp = 2; end
        end
      end
      chk(a0 == x0 && a1 == x1 && int'(pop_cnt) == xp,
          $sformatf("mode %s ds %0d nh %0d/%0d v %b: got %0d/%0d pop %0d, exp %0d/%0d pop %0d",
                    mode.name(), dyn_skip, n0, n1, rd_valid, a0, a1, pop_cnt, x0, x1, xp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
