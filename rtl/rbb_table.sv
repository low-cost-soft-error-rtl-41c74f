// rbb_table: storage of the region boundary buffer (RBB).
//
// A circular buffer of DEPTH entries, each the tuple (boundary PC, GSQ tail
// pointer, RegionTime) of a region that has ended but is not yet verified.
// Entries are pushed at the tail when a region boundary commits and popped
// from the head when the head region is verified; a flush empties the buffer
// when an error is detected. The head entry and the entry right behind it are
// readable combinationally, so the controller can hand the timers over to the
// next region in the same cycle the head retires.
//
// The entry type is a parameter so that the buffer follows the GSQ depth and
// the WCDL chosen by the region boundary buffer.
//
// Timing: push, pop and flush take effect at the next clock edge. Push and pop
// may happen in the same cycle; flush overrides both. Pushing when full or
// popping when empty is a usage error and is flagged by an assertion.
// The entry layout follows the document (43 bits at the default sizes); the
// circular-buffer organisation and the "next entry" read port are this
// design's choices.
module rbb_table
  import turnstile_pkg::*;
#(
  parameter int unsigned DEPTH   = RBB_DEPTH_DEF,
  parameter type         entry_t = rbb_entry_t
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  entry_t push_entry,
  input  logic       pop,
  input  logic       flush,
  output entry_t head_entry,
  output entry_t next_entry,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic       full,
  output logic       empty
);

  localparam int unsigned IDX_W = $clog2(DEPTH);
  localparam int unsigned CNT_W = $clog2(DEPTH + 1);

  entry_t           mem [DEPTH];
  logic [IDX_W-1:0]     head_q, tail_q;
  logic [CNT_W-1:0]     cnt_q;

  function automatic logic [IDX_W-1:0] incr(input logic [IDX_W-1:0] p);
    return (p == IDX_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign count      = cnt_q;
  assign full       = (cnt_q == CNT_W'(DEPTH));
  assign empty      = (cnt_q == '0);
  assign head_entry = mem[head_q];
  assign next_entry = mem[incr(head_q)];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else if (flush) begin
      head_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
    end else begin
      if (push) tail_q <= incr(tail_q);
      if (pop)  head_q <= incr(head_q);
      cnt_q <= cnt_q + CNT_W'(push) - CNT_W'(pop);
    end
  end

  // Entry storage needs no reset: an entry is only read once it was written.
  always_ff @(posedge clk) begin
    if (push && !flush) mem[tail_q] <= push_entry;
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !pop && !flush))
    else $error("rbb_table: push into a full buffer");
  assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty && !flush))
    else $error("rbb_table: pop from an empty buffer");

endmodule
