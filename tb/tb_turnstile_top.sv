// tb_turnstile_top: end-to-end testbench of the Turnstile hardware at its
// default sizes (WCDL 30, 40-entry gated store queue, 14-entry region
// boundary buffer, 15 checkpointed registers).
//
// turnstile_core_model runs a 400-region program with random particle strikes
// against the design and checks containment (no corrupted or unverified store
// reaches memory), the exact WCDL verification latency, register restore,
// the redirect to the recovery PC and the final memory image; it also checks
// that every mechanism of the design was exercised. See that module for the
// details.
module tb_turnstile_top;
  import turnstile_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n, err_detect;
  logic              st_valid, st_ready, bnd_valid, bnd_ready;
  store_t            st, fwd, wr;
  logic [PC_W-1:0]   bnd_pc, redirect_pc, rp;
  logic [ADDR_W-1:0] ld_addr, ckpt_base, rl_req_addr;
  logic              fwd_hit, wr_valid, wr_ready, pipe_flush;
  logic              rl_req_valid, rl_req_ready, rl_rsp_valid, rf_we, redirect_valid, ver_valid;
  logic [DATA_W-1:0] rl_rsp_data, rf_wdata;
  logic [3:0]        rf_waddr, rbb_count;
  logic [4:0]        to_wait, has_waited;
  logic [5:0]        gsq_count, gsq_ucount;
  logic              done_o;
  int                checks, failures;

  turnstile_top dut (.*);

  turnstile_core_model model (.*);

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    wait (done_o);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
