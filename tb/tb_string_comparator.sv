// tb_string_comparator: checks the match length and distance of one string
// comparator. Target windows are random; history windows copy a random
// number of leading bytes and then differ. The expected length is the planted
// prefix, capped at MAX_LEN and at the end of the chunk; a result is an LD
// pair candidate only from three bytes on.
module tb_string_comparator;
  import lz77_pkg::*;
  localparam int unsigned RW = MAX_LEN;

  logic               valid;
  pos_t               cindex, hindex;
  clen_t              chunk_len;
  logic [RW-1:0][7:0] tgt, hst;
  cmp_res_t           res;

  string_comparator #(.RW(RW)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int pre, lim, exp;
      pre = (t % 3 == 0) ? int'($urandom_range(0, 8)) : int'($urandom_range(0, RW));
      for (int i = 0; i < RW; i++) begin
        tgt[i] = 8'($urandom);
        hst[i] = (i < pre) ? tgt[i] : ~tgt[i];
      end
      cindex    = pos_t'($urandom_range(1000, 30000));
      hindex    = cindex - pos_t'($urandom_range(1, 999));
      chunk_len = (t % 4 == 0) ? clen_t'(int'(cindex) + int'($urandom_range(1, 300)))
                               : clen_t'(DM_BYTES);
      valid     = (t % 9 != 5);
      #1;
      lim = int'(chunk_len) - int'(cindex);
      exp = pre;
      if (exp > lim) exp = lim;
      if (exp > 258) exp = 258;
      checks++;
      if (int'(res.len) != exp) begin
        failures++;
        if (failures < 10) $display("FAIL: len %0d expected %0d", res.len, exp);
      end
      checks++;
      if (res.valid != (valid && exp >= 3)) begin
        failures++;
        if (failures < 10) $display("FAIL: valid %0d for len %0d", res.valid, exp);
      end
      checks++;
      if (int'(res.ld_dist) != int'(cindex) - int'(hindex)) begin
        failures++;
        if (failures < 10) $display("FAIL: dist %0d", res.ld_dist);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
