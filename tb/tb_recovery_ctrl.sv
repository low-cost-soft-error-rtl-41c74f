// tb_recovery_ctrl: self-checking testbench of the recovery sequencer.
//
// A small memory model answers restore loads after a random delay. For each
// alarm the testbench checks that no load is issued while the gated store
// queue still holds verified stores, that the loads read slots
// ckpt_base + 4*r for r = 0..14 in order, that every register write carries
// the slot's value to the right register, that fetch is redirected once to the
// recovery PC after the last register, and that busy covers the whole
// sequence. Some alarms are raised in the middle of a recovery: the sequence
// must restart from register 0 and drop the response of the abandoned load.
module tb_recovery_ctrl;
  import turnstile_pkg::*;

  localparam int NREG = 15;

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  logic                 err_detect, gsq_empty, busy;
  logic [PC_W-1:0]      rp, redirect_pc;
  logic [ADDR_W-1:0]    ckpt_base, rl_req_addr;
  logic                 rl_req_valid, rl_req_ready, rl_rsp_valid, rf_we, redirect_valid;
  logic [DATA_W-1:0]    rl_rsp_data, rf_wdata;
  logic [3:0]           rf_waddr;

  recovery_ctrl dut (.*);

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [DATA_W-1:0] slot_val(input logic [ADDR_W-1:0] a);
    return DATA_W'(a * 32'h9E37_79B9 ^ 32'h5A5A_0F0F);
  endfunction

  // memory model: one outstanding load, response after 1..4 cycles
  int                lat;
  logic [ADDR_W-1:0] pend_addr;
  bit                pend;

  initial begin
    int n_rec = 0, n_restart = 0, n_writes = 0, drain_wait;
    int next_reg, rec_cycles;
    bit in_rec;
    rst_n = 1'b0;
    err_detect = 0; gsq_empty = 1; rp = '0; ckpt_base = 32'h0007_F000;
    rl_req_ready = 0; rl_rsp_valid = 0; rl_rsp_data = '0;
    pend = 0; lat = 0; in_rec = 0; next_reg = 0; drain_wait = 0; rec_cycles = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (cyc = 0; cyc < 30000; cyc++) begin
      // stimulus
      err_detect = (!in_rec && $urandom_range(0, 99) == 0) ||
                   (in_rec && $urandom_range(0, 299) == 0);
      if (err_detect) begin
        rp         = $urandom;
        drain_wait = $urandom_range(0, 6);
        ckpt_base  = ADDR_W'($urandom) & ~ADDR_W'(3);
      end
      gsq_empty    = (drain_wait == 0);
      rl_req_ready = ($urandom_range(0, 1) == 0);
      rl_rsp_valid = pend && (lat == 0);
      rl_rsp_data  = slot_val(pend_addr);
      #1;
      // checks
      if (in_rec || err_detect) check(busy, "busy during recovery");
      else check(!busy, "not busy outside recovery");
      if (rl_req_valid) begin
        check(in_rec && gsq_empty && drain_wait == 0, "restore load only after the store queue drained");
        check(rl_req_addr == ckpt_base + ADDR_W'(4 * next_reg), "restore load address");
      end
      if (rf_we) begin
        check(32'(rf_waddr) == next_reg - 1 || (32'(rf_waddr) == next_reg), "register index");
        check(rf_wdata == slot_val(ckpt_base + ADDR_W'(4 * rf_waddr)), "restored value");
        n_writes++;
      end
      if (redirect_valid) begin
        check(in_rec && next_reg == NREG, "redirect after the last register");
        check(redirect_pc == rp, "redirect to the recovery PC");
      end
      // bookkeeping
      if (pend) begin
        if (lat == 0) pend = 0; else lat--;
      end
      if (rl_req_valid && rl_req_ready) begin
        check(!pend, "one load in flight");
        pend = 1; lat = $urandom_range(0, 3); pend_addr = rl_req_addr;
      end
      if (rf_we) next_reg = 32'(rf_waddr) + 1;
      if (redirect_valid) begin
        in_rec = 0; n_rec++;
        check(rec_cycles >= NREG, "recovery takes at least one cycle per register");
      end
      if (in_rec) rec_cycles++;
      if (err_detect) begin
        if (in_rec) n_restart++;
        in_rec = 1; next_reg = 0; rec_cycles = 0;
      end else if (drain_wait > 0) drain_wait--;
      @(posedge clk);
      #1;
    end
    check(n_rec > 50 && n_restart > 5 && n_writes > 500, "coverage of recoveries and restarts");
    $display("recovery_ctrl: recoveries=%0d restarts=%0d register writes=%0d", n_rec, n_restart, n_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
