// rbb: region boundary buffer with its control logic, the ToWait watchdog
// timer, the HasWaited counter and the recovery PC (RP) register.
//
// A region is verified once WCDL cycles have passed after its closing
// boundary without an error alarm. Rather than time-stamping every entry, only
// the head entry is timed: ToWait counts down the cycles the head region must
// still wait, and HasWaited holds the sum of the RegionTimes of the entries
// behind the head. Since the next region is verified exactly RegionTime cycles
// after the previous one, the timer can be reloaded from the next entry when
// the head retires.
//
//   boundary commits : RT = WCDL - HasWaited - ToWait   (the region's length,
//                      capped at WCDL); push (PC, GSQ tail, RT);
//                      HasWaited <= WCDL - ToWait
//   ToWait == 0 with a head entry : head verified; RP <= head.pc; the GSQ is
//                      told to mark entries before head.gsq_ptr verified;
//                      ToWait <= next.RT; HasWaited <= HasWaited - next.RT
//   error detected   : RBB emptied, timers cleared, GSQ told to squash its
//                      unverified entries (same cycle).
//
// A boundary pushed into an empty buffer becomes the head at once (ToWait is
// loaded with its RT = WCDL). Both events may fall in the same cycle; the
// boundary is applied first, then the retirement. An error in the same cycle
// as ToWait reaching zero wins: the head is not verified.
//
// Timing: the to_wait output equals the ToWait value of the document's
// timeline at that cycle; a reload of value V at cycle t shows as V-1 at t+1,
// so a region whose boundary commits at cycle b into an empty buffer is
// verified (ver_valid) in cycle b + WCDL. bnd_ready is low when the buffer is
// full; the ROB must then hold the boundary. The update rules, the RP register
// and the squash path follow the document; the full-buffer stall, the
// same-cycle ordering and the error priority are this design's choices.
module rbb
  import turnstile_pkg::*;
#(
  parameter int unsigned     WCDL      = WCDL_DEF,
  parameter int unsigned     DEPTH     = RBB_DEPTH_DEF,
  parameter int unsigned     GSQ_DEPTH = GSQ_DEPTH_DEF,
  parameter logic [PC_W-1:0] RESET_PC  = 32'h0000_1000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // region boundary commit from the ROB
  input  logic                  bnd_valid,
  output logic                  bnd_ready,
  input  logic [PC_W-1:0]       bnd_pc,
  input  logic [$clog2(GSQ_DEPTH)-1:0]gsq_tail,
  // acoustic sensor alarm
  input  logic                  err_detect,
  // to the gated store queue
  output logic                  ver_valid,
  output logic [$clog2(GSQ_DEPTH)-1:0]ver_ptr,
  output logic                  gsq_squash,
  // recovery point and status
  output logic [PC_W-1:0]       rp,
  output logic [$clog2(WCDL+1)-1:0] to_wait,
  output logic [$clog2(WCDL+1)-1:0] has_waited,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  // A RegionTime never exceeds the WCDL: log2(WCDL) bits, as in the
  // document's entry size (5 bits for 30 cycles).
  localparam int unsigned TW = $clog2(WCDL + 1);
  localparam int unsigned PW = $clog2(GSQ_DEPTH);
  localparam logic [TW-1:0] DL = TW'(WCDL);

  typedef struct packed {
    logic [PC_W-1:0] pc;
    logic [PW-1:0]   gsq_ptr;
    logic [TW-1:0]   rt;
  } entry_t;

  logic [TW-1:0] to_wait_q, has_waited_q;
  logic [PC_W-1:0] rp_q;

  entry_t     head_e, next_e, new_e;
  logic       tbl_full, tbl_empty, push, pop;
  logic [$clog2(DEPTH+1)-1:0] tbl_cnt;

  rbb_table #(.DEPTH(DEPTH), .entry_t(entry_t)) u_table (
    .clk, .rst_n,
    .push, .push_entry(new_e), .pop, .flush(err_detect),
    .head_entry(head_e), .next_entry(next_e),
    .count(tbl_cnt), .full(tbl_full), .empty(tbl_empty)
  );

  assign bnd_ready  = !tbl_full;
  assign push       = bnd_valid && !tbl_full && !err_detect;
  assign pop        = !tbl_empty && (to_wait_q == '0) && !err_detect;
  assign ver_valid  = pop;
  assign ver_ptr    = head_e.gsq_ptr;
  assign gsq_squash = err_detect;

  // RegionTime of the region that ends at this boundary.
  logic [TW-1:0] rt_new, hw_after_push, rt_next;
  logic            have_next;

  always_comb begin
    rt_new        = DL - has_waited_q - to_wait_q;
    new_e.pc      = bnd_pc;
    new_e.gsq_ptr = gsq_tail;
    new_e.rt      = rt_new;
    hw_after_push = push ? (DL - to_wait_q) : has_waited_q;
    // Region that becomes the head when the current head retires.
    have_next = (tbl_cnt >= 2) || push;
    rt_next   = (tbl_cnt >= 2) ? next_e.rt : rt_new;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      to_wait_q    <= '0;
      has_waited_q <= '0;
      rp_q         <= RESET_PC;
    end else if (err_detect) begin
      to_wait_q    <= '0;
      has_waited_q <= '0;
    end else if (pop) begin
      rp_q <= head_e.pc;
      if (have_next) begin
        to_wait_q    <= rt_next - 1'b1;
        has_waited_q <= hw_after_push - rt_next;
      end else begin
        to_wait_q    <= '0;
        has_waited_q <= '0;
      end
    end else if (push && tbl_empty) begin
      // the new region is the head straight away
      to_wait_q    <= rt_new - 1'b1;
      has_waited_q <= hw_after_push - rt_new;
    end else begin
      if (to_wait_q != '0) to_wait_q <= to_wait_q - 1'b1;
      has_waited_q <= hw_after_push;
    end
  end

  assign rp         = rp_q;
  assign to_wait    = to_wait_q;
  assign has_waited = has_waited_q;
  assign count      = tbl_cnt;

  // A region lasts at least one cycle and is never timed beyond the WCDL.
  assert property (@(posedge clk) disable iff (!rst_n) push |-> (rt_new >= 1 && rt_new <= DL))
    else $error("rbb: RegionTime out of range");
  // HasWaited is zero whenever nothing waits behind the head.
  assert property (@(posedge clk) disable iff (!rst_n) (tbl_cnt <= 1) |-> has_waited_q == '0)
    else $error("rbb: HasWaited not zero with at most one entry");

endmodule
