// gsq: gated store queue.
//
// Committed stores are not written to the L1 data cache until the region that
// made them is verified. The queue is a circular FIFO of DEPTH stores with one
// "verified" bit per entry. Three pointers split it: head (oldest store),
// gate (first unverified store) and tail (next free slot).
//
//   store commit     : the store is written at the tail, unverified.
//   verify (ver_ptr) : the region boundary buffer reports that the region
//                      ending at GSQ pointer ver_ptr is verified; every entry
//                      from gate up to (not including) ver_ptr gets its
//                      verified bit, and gate moves to ver_ptr.
//   drain            : while the head entry is verified it is offered on the
//                      write port; it leaves the queue when the cache accepts.
//   squash           : all unverified entries are discarded (tail <= gate).
//   forwarding       : a load address is searched against every entry; the
//                      youngest entry with the same word address is returned.
//
// Timing: all updates take effect at the next clock edge; the write port and
// the forwarding result are combinational from the registered state. A store
// offered while the queue is full waits (st_ready low); a store offered in
// a squash cycle is dropped, since it would be squashed anyway. tail_next is
// the tail after this cycle's store, the pointer a region boundary committing
// in the same cycle (younger than the store) must record.
//
// The per-entry verified bit, verification by RBB pointer, draining on a free
// cache port and squashing of unverified entries follow the document. Pointers
// are log2(DEPTH) bits as in the document's RBB entry size, so a single region
// must not hold all DEPTH stores; its compiler caps a region at DEPTH/2. The
// forwarding search granularity (whole 32-bit words, byte enables returned to
// the core for merging) and the handshakes are this design's choices.
module gsq
  import turnstile_pkg::*;
#(
  parameter int unsigned DEPTH = GSQ_DEPTH_DEF
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // store commit from the ROB
  input  logic                 st_valid,
  output logic                 st_ready,
  input  store_t               st,
  output logic [$clog2(DEPTH)-1:0] tail_ptr,
  output logic [$clog2(DEPTH)-1:0] tail_next,
  // from the region boundary buffer
  input  logic                 ver_valid,
  input  logic [$clog2(DEPTH)-1:0] ver_ptr,
  input  logic                 squash,
  // write-back port to the L1 data cache
  output logic                 wr_valid,
  input  logic                 wr_ready,
  output store_t               wr,
  // store-to-load forwarding search
  input  logic [ADDR_W-1:0]    ld_addr,
  output logic                 fwd_hit,
  output store_t               fwd,
  // occupancy
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic [$clog2(DEPTH+1)-1:0] ucount,
  output logic                 empty,
  output logic                 full
);

  localparam int unsigned CNT_W = $clog2(DEPTH + 1);
  localparam int unsigned IDX_W = $clog2(DEPTH);

  store_t             q_mem [DEPTH];
  logic [DEPTH-1:0]   vbit_q;
  logic [IDX_W-1:0]   head_q, gate_q, tail_q;
  logic [CNT_W-1:0]   cnt_q, ucnt_q;

  function automatic logic [IDX_W-1:0] incr(input logic [IDX_W-1:0] p);
    return (p == IDX_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // distance from a to b going forward around the ring
  function automatic logic [IDX_W-1:0] ring_dist(input logic [IDX_W-1:0] a, input logic [IDX_W-1:0] b);
    return (b >= a) ? (b - a) : IDX_W'(DEPTH) - a + b;
  endfunction

  logic push, drain;
  logic [IDX_W-1:0] nver;

  assign full     = (cnt_q == CNT_W'(DEPTH));
  assign empty    = (cnt_q == '0);
  assign st_ready = !full;
  assign push     = st_valid && !full && !squash;
  assign wr_valid = !empty && vbit_q[head_q];
  assign wr       = q_mem[head_q];
  assign drain    = wr_valid && wr_ready;
  assign nver     = ver_valid ? ring_dist(gate_q, ver_ptr) : '0;
  assign tail_ptr = tail_q;
  assign tail_next = push ? incr(tail_q) : tail_q;
  assign count    = cnt_q;
  assign ucount   = ucnt_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      head_q <= '0;
      gate_q <= '0;
      tail_q <= '0;
      cnt_q  <= '0;
      ucnt_q <= '0;
      vbit_q <= '0;
    end else begin
      if (drain) begin
        head_q         <= incr(head_q);
        vbit_q[head_q] <= 1'b0;
      end
      if (squash) begin
        tail_q <= gate_q;
        ucnt_q <= '0;
        cnt_q  <= cnt_q - ucnt_q - CNT_W'(drain);
      end else begin
        if (push) tail_q <= incr(tail_q);
        if (ver_valid) begin
          gate_q <= ver_ptr;
          for (int unsigned i = 0; i < DEPTH; i++) begin
            if (ring_dist(gate_q, IDX_W'(i)) < nver) vbit_q[i] <= 1'b1;
          end
        end
        cnt_q  <= cnt_q + CNT_W'(push) - CNT_W'(drain);
        ucnt_q <= ucnt_q + CNT_W'(push) - CNT_W'(nver);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (push) q_mem[tail_q] <= st;
  end

  // Forwarding: walk from oldest to youngest; the last match wins.
  always_comb begin
    fwd_hit = 1'b0;
    fwd     = '0;
    for (int unsigned k = 0; k < DEPTH; k++) begin
      automatic logic [IDX_W-1:0] slot = IDX_W'((int'(head_q) + k) % DEPTH);
      if (CNT_W'(k) < cnt_q && q_mem[slot].addr[ADDR_W-1:2] == ld_addr[ADDR_W-1:2]) begin
        fwd_hit = 1'b1;
        fwd     = q_mem[slot];
      end
    end
  end

  // The write port holds its store until the cache accepts it.
  assert property (@(posedge clk) disable iff (!rst_n || squash)
                   wr_valid && !wr_ready |=> wr_valid && $stable(wr))
    else $error("gsq: write-back request changed before acceptance");
  // The RBB never verifies more stores than are unverified.
  assert property (@(posedge clk) disable iff (!rst_n) ver_valid |-> CNT_W'(nver) <= ucnt_q)
    else $error("gsq: verify pointer beyond the unverified stores");

endmodule
