// recovery_ctrl: recovery sequencer run when the acoustic sensors raise an
// alarm.
//
// In the cycle of the alarm the region boundary buffer empties itself and the
// gated store queue discards its unverified stores, so memory is left exactly
// as it was at the most recently verified region boundary. This block then
// carries out the rest of the recovery:
//
//   DRAIN    hold the pipeline until the verified stores still in the gated
//            store queue (which include register checkpoints) reach the L1,
//   RESTORE  reload registers 0 .. NUM_CKPT_REGS-1 from their checkpoint
//            slots at ckpt_base + 4*r, one load at a time, writing each value
//            to the register file,
//   REDIRECT send fetch to the recovery PC held by the RBB,
//
// then returns to IDLE. busy is high from the alarm until the redirect and
// tells the core to flush and hold commit. An alarm while busy restarts the
// sequence at DRAIN (an alarm during recovery leaves the regions unverified
// again); a load still outstanding at that point is waited for and its data
// dropped.
//
// Interface timing: rl_req_valid/rl_req_ready is a valid/ready request; the
// response arrives on rl_rsp_valid any number of cycles later, at most one
// load is in flight. redirect_valid is a one-cycle pulse.
//
// The three recovery steps and their order follow the document. Draining
// verified stores before the reloads, restoring a fixed set of registers from
// a slot array at ckpt_base, and the restart on a new alarm are this design's
// choices.
module recovery_ctrl
  import turnstile_pkg::*;
#(
  parameter int unsigned NUM_CKPT_REGS = 15
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      err_detect,
  input  logic [PC_W-1:0]           rp,
  input  logic                      gsq_empty,
  input  logic [ADDR_W-1:0]         ckpt_base,
  output logic                      busy,
  // restore loads
  output logic                      rl_req_valid,
  input  logic                      rl_req_ready,
  output logic [ADDR_W-1:0]         rl_req_addr,
  input  logic                      rl_rsp_valid,
  input  logic [DATA_W-1:0]         rl_rsp_data,
  // register file write port
  output logic                      rf_we,
  output logic [$clog2(NUM_CKPT_REGS+1)-1:0] rf_waddr,
  output logic [DATA_W-1:0]         rf_wdata,
  // fetch redirect
  output logic                      redirect_valid,
  output logic [PC_W-1:0]           redirect_pc
);

  localparam int unsigned REG_W = $clog2(NUM_CKPT_REGS + 1);

  typedef enum logic [2:0] {
    S_IDLE, S_DRAIN, S_REQ, S_WAIT, S_REDIRECT
  } state_e;

  state_e           state_q, state_d;
  logic [REG_W-1:0] reg_q, reg_d;
  logic             stale_q, stale_d;   // a dropped load is still in flight
  logic             inflight;

  assign inflight = (state_q == S_WAIT) || stale_q;

  always_comb begin
    state_d = state_q;
    reg_d   = reg_q;
    stale_d = stale_q;
    if (stale_q && rl_rsp_valid) stale_d = 1'b0;
    unique case (state_q)
      S_IDLE:     ;
      S_DRAIN:    if (gsq_empty && !stale_q) begin
                    state_d = S_REQ;
                    reg_d   = '0;
                  end
      S_REQ:      if (rl_req_ready) state_d = S_WAIT;
      S_WAIT:     if (rl_rsp_valid) begin
                    if (reg_q == REG_W'(NUM_CKPT_REGS - 1)) state_d = S_REDIRECT;
                    else begin
                      state_d = S_REQ;
                      reg_d   = reg_q + 1'b1;
                    end
                  end
      S_REDIRECT: state_d = S_IDLE;
      default:    state_d = S_IDLE;
    endcase
    if (err_detect) begin
      state_d = S_DRAIN;
      reg_d   = '0;
      // a load still awaiting its response is dropped
      if ((state_q == S_WAIT && !rl_rsp_valid) || (stale_q && !rl_rsp_valid))
        stale_d = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      reg_q   <= '0;
      stale_q <= 1'b0;
    end else begin
      state_q <= state_d;
      reg_q   <= reg_d;
      stale_q <= stale_d;
    end
  end

  assign busy           = (state_q != S_IDLE) || err_detect;
  assign rl_req_valid   = (state_q == S_REQ) && !err_detect;
  assign rl_req_addr    = ckpt_base + (ADDR_W'(reg_q) << 2);
  assign rf_we          = (state_q == S_WAIT) && rl_rsp_valid && !err_detect;
  assign rf_waddr       = reg_q;
  assign rf_wdata       = rl_rsp_data;
  assign redirect_valid = (state_q == S_REDIRECT) && !err_detect;
  assign redirect_pc    = rp;

  assert property (@(posedge clk) disable iff (!rst_n) rl_rsp_valid |-> inflight)
    else $error("recovery_ctrl: load response without a request");

endmodule
