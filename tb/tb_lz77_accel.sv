// tb_lz77_accel: end-to-end test of the LZ77 engine at its default sizes.
//
// A pseudo-random, text-like chunk (words from a small vocabulary, random
// bytes and long runs of one byte) is generated in the testbench, written into
// the data memory and compressed several times: TF and CF mode with dynamic
// skip, and both modes without it, back to back so that the mode changes from
// one chunk to the next. Every token stream is decoded in the testbench and
// must reproduce the chunk exactly; every LD pair must have a length of 3..258
// and a distance of 1..16383 that points inside the already decoded data.
//
// Checked against the design's stated behaviour: TF needs no more cycles than
// CF, the engine never takes in more than two new positions per cycle except
// by skipping replaced strings, dynamic skip does not slow CF down, and every
// pipeline mechanism (bank conflict, hFIFO full, TF extra skip, TF share
// borrowing, CF multi-cycle split, tag filtering, lazy match, front-end jump,
// mode switch) occurs at least once.
module tb_lz77_accel;
  import lz77_pkg::*;

  localparam int unsigned CHUNK1 = 4000;       // short first chunk
  localparam int unsigned CHUNK2 = DM_BYTES;   // one full 32 KB chunk

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        dm_wr_en = 1'b0;
  pos_t        dm_wr_addr = '0;
  logic [7:0]  dm_wr_data = '0;
  logic        start = 1'b0;
  mode_e       mode = MODE_CF;
  logic        dyn_skip = 1'b1;
  clen_t       chunk_len = '0;
  logic        busy, done;
  logic [31:0] cycles;
  logic [NSTR-1:0]   tok_valid;
  token_t [NSTR-1:0] tok;
  logic ev_bank_conflict, ev_hb_full, ev_tf_extra_skip, ev_tf_borrow;
  logic ev_cf_split, ev_lazy, ev_jump, ev_filtered;

  lz77_accel dut (.*);

  int checks = 0, failures = 0;
  byte unsigned data [DM_BYTES];
  byte unsigned dec  [DM_BYTES];
  int  dec_n;
  int  n_lit, n_pair;
  bit  collecting = 1'b0;

  // event counters
  int c_bank, c_full, c_tfskip, c_borrow, c_split, c_lazy, c_jump, c_filt, c_switch;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- token collection and decoding ----------------
  always @(posedge clk) begin
    if (collecting) begin
      for (int k = 0; k < NSTR; k++) begin
        if (tok_valid[k]) begin
          if (!tok[k].is_pair) begin
            if (dec_n < DM_BYTES) dec[dec_n] = tok[k].literal;
            dec_n++;
            n_lit++;
          end else begin
            int len, d;
            len = int'(tok[k].len_code) + MIN_LEN;
            d   = int'(tok[k].ld_dist);
            n_pair++;
            if (!(len >= 3 && len <= 258 && d >= 1 && d <= 16383 && d <= dec_n)) begin
              failures++;
              $display("FAIL: bad LD pair len=%0d dist=%0d at %0d", len, d, dec_n);
            end else begin
              for (int i = 0; i < len; i++) begin
                if (dec_n < DM_BYTES) dec[dec_n] = dec[dec_n - d];
                dec_n++;
              end
            end
          end
        end
      end
      if (ev_bank_conflict) c_bank++;
      if (ev_hb_full)       c_full++;
      if (ev_tf_extra_skip) c_tfskip++;
      if (ev_tf_borrow)     c_borrow++;
      if (ev_cf_split)      c_split++;
      if (ev_lazy)          c_lazy++;
      if (ev_jump)          c_jump++;
      if (ev_filtered)      c_filt++;
    end
  end

  // ---------------- data generation ----------------
  function automatic void gen_data(input int seed);
    string words [16] = '{"the ", "brown ", "fox ", "jumps ", "over ", "lazy ",
                          "dog ", "compress ", "ratio ", "through", "put ", "hash ",
                          "table ", "string ", "match ", "window "};
    int p;
    void'($urandom(seed));
    p = 0;
    while (p < DM_BYTES) begin
      int r;
      r = int'($urandom_range(0, 99));
      if (r < 80) begin
        string w;
        w = words[$urandom_range(0, 15)];
        for (int i = 0; i < w.len() && p < DM_BYTES; i++) data[p++] = w[i];
      end else if (r < 95) begin
        data[p++] = byte'($urandom_range(0, 255));
      end else begin
        int n;
        byte unsigned b;
        n = int'($urandom_range(20, 300));
        b = byte'($urandom_range(33, 126));
        for (int i = 0; i < n && p < DM_BYTES; i++) data[p++] = b;
      end
    end
  endfunction

  task automatic load_dm();
    for (int i = 0; i < DM_BYTES; i++) begin
      @(negedge clk);
      dm_wr_en   = 1'b1;
      dm_wr_addr = pos_t'(i);
      dm_wr_data = data[i];
    end
    @(negedge clk);
    dm_wr_en = 1'b0;
  endtask

  // compress the first `len` bytes; returns cycles and compressed bits
  task automatic run_chunk(input int len, input mode_e m, input bit ds,
                           output int cyc, output int bits);
    dec_n  = 0;
    n_lit  = 0;
    n_pair = 0;
    @(negedge clk);
    start     = 1'b1;
    mode      = m;
    dyn_skip  = ds;
    chunk_len = clen_t'(len);
    collecting = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    collecting = 1'b0;
    cyc  = int'(cycles);
    bits = n_lit * 9 + n_pair * 23;
    check(dec_n == len, $sformatf("decoded length %0d, expected %0d", dec_n, len));
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < len && i < dec_n; i++) if (dec[i] != data[i]) bad++;
      check(bad == 0, $sformatf("%0d decoded bytes differ", bad));
    end
    check(n_pair > 0, "no LD pair produced");
    $display("  len=%0d mode=%s dyn_skip=%0d: cycles=%0d  %0.3f B/cycle  CR=%0.3f  lit=%0d pairs=%0d",
             len, m.name(), ds, cyc, real'(len) / real'(cyc),
             real'(len) * 8.0 / real'(bits), n_lit, n_pair);
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc_tf, cyc_cf, cyc_tf0, cyc_cf0, bits_tf, bits_cf, b0, b1;
    gen_data(7);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load_dm();

    // short chunk first, then the full chunk in every configuration
    run_chunk(CHUNK1, MODE_TF, 1'b1, cyc_tf, bits_tf);
    run_chunk(CHUNK1, MODE_CF, 1'b1, cyc_cf, bits_cf);
    c_switch++;
    check(cyc_tf <= cyc_cf, "TF slower than CF on the short chunk");

    run_chunk(CHUNK2, MODE_TF, 1'b1, cyc_tf, bits_tf);
    c_switch++;
    run_chunk(CHUNK2, MODE_CF, 1'b1, cyc_cf, bits_cf);
    c_switch++;
    run_chunk(CHUNK2, MODE_TF, 1'b0, cyc_tf0, b0);
    run_chunk(CHUNK2, MODE_CF, 1'b0, cyc_cf0, b1);
    c_switch++;

    check(cyc_tf <= cyc_cf, "TF slower than CF");
    check(cyc_cf <= cyc_cf0, "dynamic skip made CF slower");
    check(bits_cf <= bits_tf, "CF compressed worse than TF");
    // at most NSTR new positions per cycle unless replaced strings are skipped
    check(c_jump > 0 || cyc_tf * NSTR >= CHUNK2, "throughput above NSTR bytes/cycle without skipping");

    $display("  events: bank=%0d full=%0d tf_skip=%0d borrow=%0d cf_split=%0d lazy=%0d jump=%0d filtered=%0d switch=%0d",
             c_bank, c_full, c_tfskip, c_borrow, c_split, c_lazy, c_jump, c_filt, c_switch);
    check(c_bank   > 0, "no bank conflict seen");
    check(c_full   > 0, "hFIFO never full");
    check(c_tfskip > 0, "TF never skipped a comparison");
    check(c_borrow > 0, "TF never lent a share");
    check(c_split  > 0, "CF never split a unit operation");
    check(c_lazy   > 0, "no lazy match");
    check(c_jump   > 0, "front end never jumped");
    check(c_filt   > 0, "history filter never removed a history");
    check(c_switch > 0, "no mode switch");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
