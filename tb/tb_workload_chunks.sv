// tb_workload_chunks: chunk-based compression of a text-like file larger than
// one chunk, in the four configurations that the design is evaluated in:
// TF and CF mode, each with and without dynamic skip.
//
// The file (FILE_BYTES) is generated in the testbench from a vocabulary of
// random words with punctuation, numbers and occasional random bytes, which
// gives a compression ratio in the range of ordinary text. It is cut into
// 32 KB chunks; each chunk is loaded into the data memory once and then
// compressed in all four configurations. Every token stream is decoded and
// compared with the chunk. Per configuration the testbench reports bytes per
// cycle and the compression ratio (original bits / (9 bits per literal +
// 23 bits per LD pair: flag, 8-bit length, 14-bit distance)).
//
// Checked relations: TF is at least as fast as CF, dynamic skip does not make
// CF slower, and CF compresses at least as well as TF.
module tb_workload_chunks;
  import lz77_pkg::*;

  localparam int unsigned FILE_BYTES = 3 * DM_BYTES;
  localparam int unsigned NCHUNK     = (FILE_BYTES + DM_BYTES - 1) / DM_BYTES;

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
  byte unsigned file [FILE_BYTES];
  byte unsigned dec  [DM_BYTES];
  int  dec_n, n_lit, n_pair, base;
  bit  collecting = 1'b0;

  // per configuration {TF+skip, CF+skip, TF, CF}: cycles and bits
  longint tot_cyc [4];
  longint tot_bits [4];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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
            if (d < 1 || d > dec_n) begin
              failures++;
              $display("FAIL: distance %0d at %0d", d, dec_n);
            end else begin
              for (int i = 0; i < len; i++) begin
                if (dec_n < DM_BYTES) dec[dec_n] = dec[dec_n - d];
                dec_n++;
              end
            end
          end
        end
      end
    end
  end

  function automatic void gen_file();
    string vocab [64];
    int p;
    void'($urandom(2024));
    for (int w = 0; w < 64; w++) begin
      int n;
      n = int'($urandom_range(2, 9));
      vocab[w] = "";
      for (int i = 0; i < n; i++) vocab[w] = {vocab[w], string'(byte'($urandom_range(97, 122)))};
    end
    p = 0;
    while (p < FILE_BYTES) begin
      int r;
      string s;
      r = int'($urandom_range(0, 99));
      // skewed word choice: low indices are frequent
      if (r < 70)      s = {vocab[$urandom_range(0, $urandom_range(0, 63))], " "};
      else if (r < 80) s = {vocab[$urandom_range(0, 63)], ", "};
      else if (r < 88) s = $sformatf("%0d ", $urandom_range(0, 9999));
      else if (r < 94) s = ".\n";
      else             s = string'(byte'($urandom_range(33, 126)));
      for (int i = 0; i < s.len() && p < FILE_BYTES; i++) file[p++] = s[i];
    end
  endfunction

  task automatic load_chunk(input int b, input int len);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      dm_wr_en   = 1'b1;
      dm_wr_addr = pos_t'(i);
      dm_wr_data = file[b + i];
    end
    @(negedge clk);
    dm_wr_en = 1'b0;
  endtask

  task automatic run_chunk(input int len, input int cfg);
    dec_n = 0; n_lit = 0; n_pair = 0;
    @(negedge clk);
    start     = 1'b1;
    mode      = (cfg % 2 == 0) ? MODE_TF : MODE_CF;
    dyn_skip  = (cfg < 2);
    chunk_len = clen_t'(len);
    collecting = 1'b1;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    @(negedge clk);
    collecting = 1'b0;
    check(dec_n == len, $sformatf("decoded %0d of %0d bytes", dec_n, len));
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < len && i < dec_n; i++) if (dec[i] != file[base + i]) bad++;
      check(bad == 0, $sformatf("%0d decoded bytes differ", bad));
    end
    tot_cyc[cfg]  += longint'(cycles);
    tot_bits[cfg] += longint'(n_lit * 9 + n_pair * 23);
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    string names [4] = '{"TF, dynamic skip", "CF, dynamic skip", "TF, no dynamic skip", "CF, no dynamic skip"};
    real bpc [4], cr [4];
    gen_file();
    for (int c = 0; c < 4; c++) begin tot_cyc[c] = 0; tot_bits[c] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int ch = 0; ch < NCHUNK; ch++) begin
      int len;
      base = ch * DM_BYTES;
      len  = (FILE_BYTES - base < DM_BYTES) ? FILE_BYTES - base : DM_BYTES;
      load_chunk(base, len);
      for (int cfg = 0; cfg < 4; cfg++) run_chunk(len, cfg);
    end
    for (int c = 0; c < 4; c++) begin
      bpc[c] = real'(FILE_BYTES) / real'(tot_cyc[c]);
      cr[c]  = real'(FILE_BYTES) * 8.0 / real'(tot_bits[c]);
      $display("  %-22s %0.3f bytes/cycle  CR %0.3f", names[c], bpc[c], cr[c]);
    end
    check(tot_cyc[0] <= tot_cyc[1], "TF slower than CF");
    check(tot_cyc[1] <= tot_cyc[3], "dynamic skip slowed CF down");
    check(tot_bits[1] <= tot_bits[0], "CF compressed worse than TF");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
