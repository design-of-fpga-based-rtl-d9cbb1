// engine_controller: the control interface of the LZ77 engine.
//
// The host raises `start` for one cycle together with the operation mode
// (TF or CF), the dynamic-skip enable and the chunk length; all three are
// captured with the request, so the mode can change from one chunk to the
// next with no switching cost. While the engine runs, `busy` is high; when
// every byte of the chunk is represented in the output, `done` pulses for one
// cycle and `busy` falls. A start while busy is ignored.
//
// The controller owns `cur`, the first position of the chunk not yet
// represented in the output. It takes cur_next from the match selector every
// cycle and broadcasts cur to the other stages: a unit operation whose target
// lies below cur is inside an emitted LD pair and is treated as invalid
// there (this is how the valid bits of the following unit operations are
// cleared), and the input stream buffer jumps ahead when cur passes it.
// `clear` pulses with an accepted start and empties the pipeline, the hFIFO
// and the dictionary. `cycles` counts the busy cycles of the last chunk.
//
// The start/mode/done handshake follows the design description; the signal
// names and single-cycle pulses are this design's choices.
module engine_controller
  import lz77_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  mode_e       mode_in,
  input  logic        dyn_skip_in,
  input  clen_t       chunk_len_in,
  input  clen_t       cur_next,
  output logic        clear,
  output logic        busy,
  output logic        done,
  output mode_e       mode,
  output logic        dyn_skip,
  output clen_t       chunk_len,
  output clen_t       cur,
  output logic [31:0] cycles
);

  logic accept;
  assign accept = start && !busy;
  assign clear  = accept;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      done      <= 1'b0;
      mode      <= MODE_CF;
      dyn_skip  <= 1'b1;
      chunk_len <= '0;
      cur       <= '0;
      cycles    <= '0;
    end else begin
      done <= 1'b0;
      if (accept) begin
        busy      <= 1'b1;
        mode      <= mode_in;
        dyn_skip  <= dyn_skip_in;
        chunk_len <= chunk_len_in;
        cur       <= '0;
        cycles    <= '0;
      end else if (busy) begin
        cycles <= cycles + 1'b1;
        cur    <= cur_next;
        if (cur_next >= chunk_len) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
