// tb_engine_controller: checks the start/mode/done handshake. A start
// captures mode, dynamic-skip enable and chunk length and pulses clear; busy
// stays high until cur_next reaches the chunk length, then done pulses for
// one cycle; cur follows cur_next; a start while busy is ignored; the cycle
// counter equals the number of busy cycles; the next chunk may use the other
// mode.
module tb_engine_controller;
  import lz77_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  start = 1'b0;
  mode_e mode_in = MODE_CF;
  logic  dyn_skip_in = 1'b1;
  clen_t chunk_len_in = '0;
  clen_t cur_next = '0;
  logic  clear, busy, done, dyn_skip;
  mode_e mode;
  clen_t chunk_len, cur;
  logic [31:0] cycles;

  engine_controller dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", s); end
  endtask

  task automatic run(input mode_e m, input bit ds, input int len, input int step);
    int n, c;
    @(negedge clk);
    start = 1'b1; mode_in = m; dyn_skip_in = ds; chunk_len_in = clen_t'(len);
    cur_next = '0;
    #1 chk(clear, "clear with start");
    @(negedge clk);
    start = 1'b0;
    chk(busy && mode == m && dyn_skip == ds && int'(chunk_len) == len, "captured request");
    n = 0; c = 0;
    while (!done) begin
      // a second start while busy must be ignored
      start = (n == 2);
      mode_in = (m == MODE_TF) ? MODE_CF : MODE_TF;
      c += step;
      cur_next = clen_t'(c > len ? len : c);
      #1 if (start) chk(!clear, "start ignored while busy");
      @(negedge clk);
      start = 1'b0;
      n++;
      if (!done) chk(int'(cur) == c, "cur follows cur_next");
      chk(mode == m, "mode held while busy");
    end
    chk(!busy, "busy falls with done");
    chk(int'(cycles) == n, $sformatf("cycle count %0d vs %0d", cycles, n));
    chk(n == (len + step - 1) / step, "done when cur reaches chunk length");
    @(negedge clk);
    chk(!done, "done is one pulse");
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(MODE_TF, 1'b1, 100, 2);
    run(MODE_CF, 1'b0, 57, 3);
    run(MODE_TF, 1'b0, 10, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
