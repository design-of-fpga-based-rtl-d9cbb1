// tb_input_stream_buffer: drives the ISB with a behavioural data-memory read
// port (registered window read) over a random chunk. Checks that the ISB
// presents positions 0, 2, 4, ... while `advance` is high and holds them when
// it is low, that the key bytes are the chunk bytes at pos..pos+3, that it
// jumps to `cur` when the output has passed it, and that lane_valid and
// lane_hashable fall at the end of the chunk.
module tb_input_stream_buffer;
  import lz77_pkg::*;
  localparam int unsigned LANES = 2;
  localparam int unsigned RW    = 8;
  localparam int unsigned LEN   = 301;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, run = 1'b0, advance = 1'b0;
  clen_t chunk_len = clen_t'(LEN), cur = '0;
  pos_t dm_addr, pos;
  logic [RW-1:0][7:0] dm_data;
  logic [LANES-1:0] lane_valid, lane_hashable;
  logic [LANES+1:0][7:0] key_bytes;
  logic moved, jumped;

  input_stream_buffer #(.LANES(LANES), .RW(RW)) dut (.*);

  byte unsigned mem [DM_BYTES];
  always_ff @(posedge clk)
    for (int i = 0; i < RW; i++) dm_data[i] <= mem[(int'(dm_addr) + i) % DM_BYTES];

  int checks = 0, failures = 0;
  int exp_pos = 0;
  int njump = 0;

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < DM_BYTES; i++) mem[i] = byte'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    start = 1'b1; run = 1'b1;
    @(negedge clk);
    start = 1'b0;
    exp_pos = 0;
    while (exp_pos < LEN) begin
      advance = 1'($urandom_range(0, 3) != 0);
      if ($urandom_range(0, 40) == 0) cur = clen_t'(exp_pos + int'($urandom_range(3, 40)));
      #1;
      chk(int'(pos) == exp_pos, $sformatf("pos %0d expected %0d", pos, exp_pos));
      for (int i = 0; i < LANES + 2; i++)
        chk(key_bytes[i] == mem[(exp_pos + i) % DM_BYTES], "key byte");
      for (int l = 0; l < LANES; l++) begin
        chk(lane_valid[l] == (exp_pos + l < LEN && !(int'(cur) > exp_pos)), "lane_valid");
        chk(lane_hashable[l] == (exp_pos + l + 2 < LEN), "lane_hashable");
      end
      if (int'(cur) > exp_pos) begin
        exp_pos = int'(cur);
        njump++;
        chk(jumped, "jumped flag");
      end else if (advance) exp_pos += LANES;
      @(negedge clk);
    end
    #1 chk(lane_valid == '0, "no lanes after the chunk");
    chk(njump > 0, "a jump happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
