// tb_turnstile_configs: the end-to-end check of tb_turnstile_top repeated for
// the other hardware configurations the design was evaluated with:
//   WCDL  5, 10 and 100 cycles with a 40-entry gated store queue,
//   WCDL 10 with 80- and 160-entry gated store queues.
// Each configuration gets its own turnstile_top instance and core model
// running a 250-region program (regions of GSQ_DEPTH/2 stores fill the queue
// at every size). The region boundary buffer keeps its 14 entries.
module tb_turnstile_configs;
  import turnstile_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NCFG = 5;
  localparam int CFG_WCDL [NCFG] = '{5, 10, 100, 10, 10};
  localparam int CFG_GSQ  [NCFG] = '{40, 40, 40, 80, 160};

  logic done   [NCFG];
  int   chk    [NCFG];
  int   fail   [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned WL = CFG_WCDL[c];
    localparam int unsigned GD = CFG_GSQ[c];
    localparam int unsigned RD = RBB_DEPTH_DEF;

    logic              rst_n, err_detect;
    logic              st_valid, st_ready, bnd_valid, bnd_ready;
    store_t            st, fwd, wr;
    logic [PC_W-1:0]   bnd_pc, redirect_pc, rp;
    logic [ADDR_W-1:0] ld_addr, ckpt_base, rl_req_addr;
    logic              fwd_hit, wr_valid, wr_ready, pipe_flush;
    logic              rl_req_valid, rl_req_ready, rl_rsp_valid, rf_we, redirect_valid, ver_valid;
    logic [DATA_W-1:0] rl_rsp_data, rf_wdata;
    logic [3:0]        rf_waddr;
    logic [$clog2(RD+1)-1:0] rbb_count;
    logic [$clog2(WL+1)-1:0] to_wait, has_waited;
    logic [$clog2(GD+1)-1:0] gsq_count, gsq_ucount;
    logic              done_o;
    int                checks, failures;

    turnstile_top #(.WCDL(WL), .GSQ_DEPTH(GD), .RBB_DEPTH(RD)) dut (.*);

    turnstile_core_model #(.WCDL(WL), .GSQ_DEPTH(GD), .RBB_DEPTH(RD),
                           .NREGIONS(250), .MAX_CYCLES(150000)) model (.*);

    assign done[c] = done_o;
    assign chk[c]  = checks;
    assign fail[c] = failures;
  end

  function automatic bit all_done();
    foreach (done[c]) if (!done[c]) return 0;
    return 1;
  endfunction

  function automatic void report(input int extra);
    int checks, failures;
    checks = 0; failures = extra;
    foreach (chk[c]) begin
      checks   += chk[c];
      failures += fail[c];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    repeat (160000) @(posedge clk);
    $display("FAIL: watchdog expired");
    report(1);
    $finish;
  end

  initial begin
    while (!all_done()) @(posedge clk);
    report(0);
    $finish;
  end

endmodule
