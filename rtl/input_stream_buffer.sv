// input_stream_buffer (ISB): front of the pipeline. Walks through the chunk
// NSTR positions per cycle and presents, for each of the NSTR target
// strings of the current unit operation, its start position, a lane-valid
// bit and the bytes needed for hashing (NSTR+2 bytes starting at pos).
//
// The bytes are prefetched from the data memory through one read port: the
// address given to the DM is the position the ISB will hold in the next
// cycle, so the DM's registered output always lines up with `pos`.
//
// pos advances by NSTR when `advance` is high (the dictionary stage accepted
// the current targets). When the engine controller reports that the output
// has already covered positions beyond pos (`cur`, after a long LD pair), the
// ISB jumps straight to `cur`: the bytes inside a replaced string are never
// searched, which is how the engine exceeds NSTR bytes per cycle on long
// matches. `moved` is high in any cycle in which pos changes, `jumped` when it
// changes by such a jump.
//
// Timing: targets for pos are valid in the cycle in which pos is held; one
// cycle after `start`, position 0 is presented.
module input_stream_buffer
  import lz77_pkg::*;
#(
  parameter int unsigned LANES = NSTR,
  parameter int unsigned RW    = MAX_LEN,
  localparam int unsigned KW   = LANES + 2      // bytes needed for hashing
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,       // begin a new chunk at position 0
  input  logic                     run,         // engine busy
  input  clen_t                    chunk_len,
  input  logic                     advance,     // current targets accepted
  input  clen_t                    cur,         // first position not yet output
  // DM read port
  output pos_t                     dm_addr,
  input  logic [RW-1:0][7:0]       dm_data,
  // targets
  output pos_t                     pos,
  output logic [LANES-1:0]         lane_valid,
  output logic [LANES-1:0]         lane_hashable,  // three bytes inside the chunk
  output logic [KW-1:0][7:0]       key_bytes,
  output logic                     moved,
  output logic                     jumped       // moved to cur, skipping positions
);

  // one bit wider than a position so that stepping past the end of a full
  // 32 KB chunk does not wrap back to 0
  clen_t pos_q, pos_d;
  clen_t pos_ext;

  assign pos_ext = pos_q;

  always_comb begin
    pos_d = pos_q;
    if (start)                                pos_d = '0;
    else if (run && cur > pos_ext)            pos_d = cur;
    else if (run && advance && pos_ext < chunk_len) pos_d = pos_q + clen_t'(LANES);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pos_q <= '0;
    else        pos_q <= pos_d;
  end

  assign dm_addr = pos_t'(pos_d);
  assign pos     = pos_t'(pos_q);
  assign moved   = (pos_d != pos_q);
  assign jumped  = !start && run && (cur > pos_ext);

  always_comb begin
    for (int i = 0; i < KW; i++) key_bytes[i] = dm_data[i];
    for (int l = 0; l < LANES; l++) begin
      lane_valid[l]    = run && (pos_ext + clen_t'(l) < chunk_len) && !(cur > pos_ext);
      lane_hashable[l] = (pos_ext + clen_t'(l) + clen_t'(2) < chunk_len);
    end
  end

endmodule
