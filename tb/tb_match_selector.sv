// tb_match_selector: feeds the match selector an ordered stream of
// per-position comparator results, one or two positions per cycle, with the
// registered cur fed back as the engine controller does. A reference model
// written in the testbench applies longest-match selection and lazy matching
// position by position; the tokens from the block must equal it, and the
// lazy case (a pending match beaten by a longer one) must occur.
module tb_match_selector;
  import lz77_pkg::*;
  localparam int unsigned LANES = 2;
  localparam int unsigned NCMP  = 4;
  localparam int unsigned N     = 3000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic flush = 1'b0;
  clen_t cur = '0, cur_next;
  logic [LANES-1:0] lane_valid = '0, lane_use = '0;
  pos_t [LANES-1:0] cindex = '0;
  logic [LANES-1:0][7:0] literal = '0;
  logic [NCMP-1:0] sc_valid = '0;
  logic [NCMP-1:0][0:0] sc_lane = '0;
  cmp_res_t [NCMP-1:0] sc_res = '0;
  logic [LANES-1:0] tok_valid;
  token_t [LANES-1:0] tok;
  logic ev_lazy;

  match_selector #(.LANES(LANES), .NCMP(NCMP)) dut (.*);

  // per-position stimulus: best length, its distance, and a decoy result
  int blen [N];
  int bdst [N];
  token_t exp_q [$];
  int checks = 0, failures = 0, nlazy = 0;

  always_ff @(posedge clk) if (rst_n) cur <= cur_next;

  always @(posedge clk) begin
    if (ev_lazy) nlazy++;
    for (int k = 0; k < LANES; k++) if (tok_valid[k]) begin
      token_t e;
      checks++;
      if (exp_q.size() == 0) begin failures++; $display("FAIL: extra token"); end
      else begin
        e = exp_q.pop_front();
        if (tok[k] != e) begin
          failures++;
          if (failures < 10) $display("FAIL: token %p expected %p", tok[k], e);
        end
      end
    end
  end

  // reference: zlib-style lazy matching over the whole position stream
  task automatic build_reference();
    int p, pend, ppos;
    token_t t;
    p = 0; pend = 0; ppos = 0;
    while (p < N) begin
      if (pend) begin
        if (blen[p] > blen[ppos]) begin
          t = '0; t.literal = 8'(ppos); exp_q.push_back(t);
          ppos = p; p++;
        end else begin
          t = '0; t.is_pair = 1'b1; t.literal = 8'(ppos);
          t.len_code = 8'(blen[ppos] - 3); t.ld_dist = 14'(bdst[ppos]);
          exp_q.push_back(t);
          p = ppos + blen[ppos];
          pend = 0;
        end
      end else if (blen[p] >= 3) begin
        pend = 1; ppos = p; p++;
      end else begin
        t = '0; t.literal = 8'(p); exp_q.push_back(t);
        p++;
      end
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p;
    for (int i = 0; i < N; i++) begin
      int r;
      r = int'($urandom_range(0, 9));
      blen[i] = (r < 5) ? int'($urandom_range(0, 2)) : (r < 9 ? int'($urandom_range(3, 12)) : int'($urandom_range(13, 258)));
      if (i + blen[i] > N) blen[i] = 0;
      if (i == N - 1 && blen[i] >= 3) blen[i] = 0;
      bdst[i] = int'($urandom_range(1, 16383));
    end
    build_reference();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    p = 0;
    while (p < N) begin
      int nl;
      nl = int'($urandom_range(1, 2));
      lane_valid = '0; lane_use = '0; sc_valid = '0;
      for (int l = 0; l < nl && p + l < N; l++) begin
        int q;
        q = p + l;
        lane_valid[l] = 1'b1;
        lane_use[l]   = (q >= int'(cur));
        cindex[l]     = pos_t'(q);
        literal[l]    = 8'(q);
        // comparator 2l holds a shorter decoy, 2l+1 the best result
        sc_valid[2*l]   = 1'b1; sc_lane[2*l]   = 1'(l);
        sc_valid[2*l+1] = 1'b1; sc_lane[2*l+1] = 1'(l);
        sc_res[2*l].len       = mlen_t'(blen[q] > 3 ? blen[q] - 1 : 0);
        sc_res[2*l].valid     = (blen[q] > 3);
        sc_res[2*l].ld_dist   = 14'(bdst[q] ^ 1);
        sc_res[2*l+1].len     = mlen_t'(blen[q]);
        sc_res[2*l+1].valid   = (blen[q] >= 3);
        sc_res[2*l+1].ld_dist = 14'(bdst[q]);
      end
      p += nl;
      @(negedge clk);
    end
    lane_valid = '0; sc_valid = '0;
    repeat (3) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL: %0d tokens missing", exp_q.size()); end
    checks++;
    if (nlazy == 0) begin failures++; $display("FAIL: no lazy match"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
