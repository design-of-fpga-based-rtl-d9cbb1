// data_memory (DM): holds the chunk being compressed.
//
// The host writes the chunk one byte per cycle through the write port while
// the engine is idle. During compression the engine reads it through NPORT
// independent read ports; each port returns a window of RW consecutive bytes
// starting at an arbitrary byte address (addresses wrap at the end of the
// memory, and the bytes past the chunk are never used as match data). Reads
// are synchronous: the window for the address presented in cycle t appears
// on rd_data in cycle t+1. rd_en holds a port's output when low, so a stalled
// pipeline stage keeps its data.
//
// That the DM holds one whole chunk (32 KB) follows the design description;
// the number of ports and the byte-window read are this design's choice (on
// an FPGA such a memory is built from replicated, banked block RAMs).
module data_memory #(
  parameter int unsigned DEPTH = lz77_pkg::DM_BYTES,
  parameter int unsigned NPORT = 1 + lz77_pkg::NSTR + lz77_pkg::NSC,
  parameter int unsigned RW    = lz77_pkg::MAX_LEN,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic                           clk,
  // host write port
  input  logic                           wr_en,
  input  logic [AW-1:0]                  wr_addr,
  input  logic [7:0]                     wr_data,
  // read ports
  input  logic [NPORT-1:0]               rd_en,
  input  logic [NPORT-1:0][AW-1:0]       rd_addr,
  output logic [NPORT-1:0][RW-1:0][7:0]  rd_data
);

  logic [7:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    for (int p = 0; p < NPORT; p++) begin
      if (rd_en[p]) begin
        for (int i = 0; i < RW; i++) begin
          rd_data[p][i] <= mem[AW'(rd_addr[p] + AW'(i))];
        end
      end
    end
  end

endmodule
