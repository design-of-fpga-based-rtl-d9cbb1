// tb_history_fifo: random pushes of zero to two entries and pops of zero to
// two entries against a queue model. Checks the two visible head entries and
// their valid bits, the occupancy, the full flag (raised when fewer than two
// slots are free) and flush.
module tb_history_fifo;
  import lz77_pkg::*;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned LANES = 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                flush = 1'b0;
  logic [LANES-1:0]    wr_en = '0;
  hentry_t [LANES-1:0] wr_entry = '0;
  logic [1:0]          pop_cnt = '0;
  hentry_t [LANES-1:0] rd_entry;
  logic [LANES-1:0]    rd_valid;
  logic [3:0]          count;
  logic                full;

  history_fifo #(.DEPTH(DEPTH), .LANES(LANES)) dut (.*);

  hentry_t q [$];
  int checks = 0, failures = 0;

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
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int np, npop;
      @(negedge clk);
      // compare visible state with the model
      chk(int'(count) == q.size(), $sformatf("count %0d vs %0d", count, q.size()));
      chk(full == (DEPTH - q.size() < LANES), "full flag");
      for (int l = 0; l < LANES; l++) begin
        chk(rd_valid[l] == (q.size() > l), "rd_valid");
        if (q.size() > l) chk(rd_entry[l] == q[l], $sformatf("head entry %0d", l));
      end
      // choose this cycle's operations
      npop = int'($urandom_range(0, 2));
      if (npop > q.size()) npop = q.size();
      np = full ? 0 : int'($urandom_range(0, 2));
      wr_en = '0;
      for (int l = 0; l < LANES; l++) begin
        wr_entry[l] = hentry_t'({$urandom, $urandom, $urandom});
      end
      // writes fill lanes in order but may start at lane 1
      if (np == 1 && $urandom_range(0, 1)) wr_en = 2'b10;
      else if (np == 1) wr_en = 2'b01;
      else if (np == 2) wr_en = 2'b11;
      pop_cnt = 2'(npop);
      flush = (t % 997 == 996);
      @(posedge clk);
      #1;
      if (flush) q = {};
      else begin
        for (int i = 0; i < npop; i++) void'(q.pop_front());
        for (int l = 0; l < LANES; l++) if (wr_en[l]) q.push_back(wr_entry[l]);
      end
      wr_en = '0; pop_cnt = '0; flush = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
