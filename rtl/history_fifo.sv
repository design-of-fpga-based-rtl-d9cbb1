// history_fifo (hFIFO): the storage half of the history buffer.
//
// A circular buffer of DEPTH entries with LANES write pointers and LANES read
// pointers: in one cycle up to LANES entries (one per target string) are
// written, in lane order, and up to LANES entries are removed from the head.
// The entries at the LANES read pointers (RP_1 = head, RP_2 = head+1, ...) are
// always visible on rd_entry, with rd_valid telling which of them exist.
//
// `full` is raised when fewer than LANES slots are free, so that a whole unit
// operation can always be written once `full` is low; the pipeline in front
// of the history buffer stalls while it is high.
//
// Timing: a written entry is visible at the head in the next cycle. Pops act
// on the entries shown in the current cycle. `flush` empties the FIFO.
//
// The entry contents and the pointer organisation follow the design
// description; the full threshold is this design's choice.
// Two assertions guard against pushing into a full FIFO and popping entries
// that do not exist. Their `disable iff` on rst_n makes the linter report the
// reset as used both synchronously and asynchronously (SYNCASYNCNET); the
// assertions create no logic, so the warning stands.
module history_fifo
  import lz77_pkg::*;
#(
  parameter int unsigned DEPTH = HB_DEPTH,
  parameter int unsigned LANES = NSTR,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1),
  localparam int unsigned PW   = $clog2(LANES + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    flush,
  input  logic [LANES-1:0]        wr_en,
  input  hentry_t [LANES-1:0]     wr_entry,
  input  logic [PW-1:0]           pop_cnt,
  output hentry_t [LANES-1:0]     rd_entry,
  output logic [LANES-1:0]        rd_valid,
  output logic [CW-1:0]           count,
  output logic                    full
);

  hentry_t mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [CW-1:0] cnt;
  logic [PW-1:0] push_cnt;

  always_comb begin
    push_cnt = '0;
    for (int l = 0; l < LANES; l++) push_cnt += PW'(wr_en[l]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else if (flush) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      wp  <= wp + AW'(push_cnt);
      rp  <= rp + AW'(pop_cnt);
      cnt <= cnt + CW'(push_cnt) - CW'(pop_cnt);
    end
  end

  always_ff @(posedge clk) begin
    if (!flush) begin
      logic [AW-1:0] a;
      a = wp;
      for (int l = 0; l < LANES; l++) begin
        if (wr_en[l]) begin
          mem[a] <= wr_entry[l];
          a = a + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int l = 0; l < LANES; l++) begin
      rd_entry[l] = mem[AW'(rp + AW'(l))];
      rd_valid[l] = (cnt > CW'(l));
    end
  end

  assign count = cnt;
  assign full  = (CW'(DEPTH) - cnt) < CW'(LANES);

  // handshake rules
  a_no_push_when_full: assert property (@(posedge clk) disable iff (!rst_n || flush)
    push_cnt == 0 || !full) else $error("hFIFO written while full");
  a_no_over_pop: assert property (@(posedge clk) disable iff (!rst_n || flush)
    CW'(pop_cnt) <= cnt) else $error("hFIFO popped beyond its content");

endmodule
