// tb_data_memory: checks the chunk memory's byte-window read ports.
// Random bytes are written through the host port, then every port reads
// windows at random addresses (including ones that wrap at the end of the
// memory); each window must equal the written bytes one cycle after the
// address, and a port whose rd_en is low must keep its previous window.
module tb_data_memory;
  localparam int unsigned DEPTH = 256;
  localparam int unsigned NPORT = 3;
  localparam int unsigned RW    = 8;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic                          wr_en = 1'b0;
  logic [AW-1:0]                 wr_addr = '0;
  logic [7:0]                    wr_data = '0;
  logic [NPORT-1:0]              rd_en = '0;
  logic [NPORT-1:0][AW-1:0]      rd_addr = '0;
  logic [NPORT-1:0][RW-1:0][7:0] rd_data;

  data_memory #(.DEPTH(DEPTH), .NPORT(NPORT), .RW(RW)) dut (.*);

  byte unsigned model [DEPTH];
  int checks = 0, failures = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NPORT-1:0][AW-1:0] a;
    logic [NPORT-1:0][RW-1:0][7:0] prev;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      model[i] = byte'($urandom);
      wr_en = 1'b1; wr_addr = AW'(i); wr_data = model[i];
    end
    @(negedge clk);
    wr_en = 1'b0;
    for (int t = 0; t < 300; t++) begin
      prev = rd_data;
      for (int p = 0; p < NPORT; p++) begin
        a[p] = (t % 7 == 0) ? AW'(DEPTH - 3) : AW'($urandom_range(0, DEPTH - 1));
        rd_addr[p] = a[p];
        rd_en[p]   = (t % 5 != 3);
      end
      @(negedge clk);
      for (int p = 0; p < NPORT; p++) begin
        for (int i = 0; i < RW; i++) begin
          byte unsigned exp;
          exp = rd_en[p] ? model[(int'(a[p]) + i) % DEPTH] : prev[p][i];
          checks++;
          if (rd_data[p][i] != exp) begin
            failures++;
            if (failures < 10) $display("FAIL: port %0d addr %0d byte %0d: %h != %h", p, a[p], i, rd_data[p][i], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
