// turnstile_top: Turnstile soft-error recovery support of one out-of-order
// core.
//
// The compiler cuts the program into regions, each closed by a region
// boundary instruction, and adds stores that checkpoint live registers to
// reserved memory slots. This block sits beside the core's reorder buffer:
//
//   - every committed store goes into the gated store queue (gsq), unverified;
//   - every committed boundary gets an entry in the region boundary buffer
//     (rbb), which times the detection latency (WCDL) after the boundary;
//   - when a region has survived WCDL cycles without an alarm, the rbb copies
//     its boundary PC into the recovery PC and lets the gsq release the
//     region's stores to the L1 data cache;
//   - on an alarm from the acoustic sensors the rbb empties, the gsq drops
//     its unverified stores in the same cycle, and recovery_ctrl reloads the
//     checkpointed registers and redirects fetch to the recovery PC.
//
// Commit interface: per cycle at most one store (st_*) and one boundary
// (bnd_*); a store and a boundary in the same cycle are taken to be in that
// program order (store older). bnd_ready is low when the rbb is full, when a
// same-cycle store cannot enter the gsq, and during recovery; st_ready is low
// when the gsq is full and during recovery. The core must hold commit while a
// ready is low and flush its pipeline while pipe_flush is high.
//
// The blocks and their connections follow the document's hardware overview;
// the commit handshakes, the single store/boundary per cycle and the restore
// load port are this design's choices.
module turnstile_top
  import turnstile_pkg::*;
#(
  parameter int unsigned     WCDL          = WCDL_DEF,
  parameter int unsigned     GSQ_DEPTH     = GSQ_DEPTH_DEF,
  parameter int unsigned     RBB_DEPTH     = RBB_DEPTH_DEF,
  parameter int unsigned     NUM_CKPT_REGS = 15,
  parameter logic [PC_W-1:0] RESET_PC      = 32'h0000_1000
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // acoustic sensor array alarm
  input  logic                  err_detect,
  // store commit
  input  logic                  st_valid,
  output logic                  st_ready,
  input  store_t                st,
  // region boundary commit
  input  logic                  bnd_valid,
  output logic                  bnd_ready,
  input  logic [PC_W-1:0]       bnd_pc,
  // store-to-load forwarding
  input  logic [ADDR_W-1:0]     ld_addr,
  output logic                  fwd_hit,
  output store_t                fwd,
  // L1 data cache write port
  output logic                  wr_valid,
  input  logic                  wr_ready,
  output store_t                wr,
  // recovery
  output logic                  pipe_flush,
  input  logic [ADDR_W-1:0]     ckpt_base,
  output logic                  rl_req_valid,
  input  logic                  rl_req_ready,
  output logic [ADDR_W-1:0]     rl_req_addr,
  input  logic                  rl_rsp_valid,
  input  logic [DATA_W-1:0]     rl_rsp_data,
  output logic                  rf_we,
  output logic [$clog2(NUM_CKPT_REGS+1)-1:0] rf_waddr,
  output logic [DATA_W-1:0]     rf_wdata,
  output logic                  redirect_valid,
  output logic [PC_W-1:0]       redirect_pc,
  // status
  output logic [PC_W-1:0]       rp,
  output logic [$clog2(WCDL+1)-1:0] to_wait,
  output logic [$clog2(WCDL+1)-1:0] has_waited,
  output logic                  ver_valid,
  output logic [$clog2(RBB_DEPTH+1)-1:0] rbb_count,
  output logic [$clog2(GSQ_DEPTH+1)-1:0] gsq_count,
  output logic [$clog2(GSQ_DEPTH+1)-1:0] gsq_ucount
);

  logic                 busy;
  logic                 gsq_st_valid, gsq_st_ready, gsq_empty;
  logic [$clog2(GSQ_DEPTH)-1:0] gsq_tail_next, ver_ptr;
  logic                 gsq_squash, rbb_bnd_valid, rbb_bnd_ready;

  assign gsq_st_valid  = st_valid && !busy;
  assign st_ready      = gsq_st_ready && !busy;
  assign rbb_bnd_valid = bnd_valid && !busy && (!st_valid || gsq_st_ready);
  assign bnd_ready     = rbb_bnd_ready && !busy && (!st_valid || gsq_st_ready);
  assign pipe_flush    = busy;

  rbb #(.WCDL(WCDL), .DEPTH(RBB_DEPTH), .GSQ_DEPTH(GSQ_DEPTH), .RESET_PC(RESET_PC)) u_rbb (
    .clk, .rst_n,
    .bnd_valid(rbb_bnd_valid), .bnd_ready(rbb_bnd_ready), .bnd_pc,
    .gsq_tail(gsq_tail_next),
    .err_detect,
    .ver_valid, .ver_ptr, .gsq_squash,
    .rp, .to_wait, .has_waited, .count(rbb_count)
  );

  gsq #(.DEPTH(GSQ_DEPTH)) u_gsq (
    .clk, .rst_n,
    .st_valid(gsq_st_valid), .st_ready(gsq_st_ready), .st,
    .tail_ptr(), .tail_next(gsq_tail_next),
    .ver_valid, .ver_ptr, .squash(gsq_squash),
    .wr_valid, .wr_ready, .wr,
    .ld_addr, .fwd_hit, .fwd,
    .count(gsq_count), .ucount(gsq_ucount), .empty(gsq_empty), .full()
  );

  recovery_ctrl #(.NUM_CKPT_REGS(NUM_CKPT_REGS)) u_rec (
    .clk, .rst_n,
    .err_detect, .rp, .gsq_empty, .ckpt_base,
    .busy,
    .rl_req_valid, .rl_req_ready, .rl_req_addr, .rl_rsp_valid, .rl_rsp_data,
    .rf_we, .rf_waddr, .rf_wdata,
    .redirect_valid, .redirect_pc
  );

endmodule
