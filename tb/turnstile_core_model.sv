// turnstile_core_model: core, memory and sensor model that runs a synthetic
// region-partitioned program on the Turnstile hardware and checks it end to
// end. It is connected to a turnstile_top instance by its ports and sized by
// the same parameters.
//
// Region k of the NREGIONS-region program commits a fixed list of stores,
// some of them register checkpoints to the slot array at CKPT_BASE, then its
// boundary instruction at PC RESET_PC + 4*(k+1). Every store value encodes
// (region, op index), so a re-executed region writes exactly the same values.
// Particle strikes are injected at random; from a strike until the next
// redirect every store the core commits carries corrupted data, and the
// sensor model raises the alarm 1..WCDL cycles after the strike. An L1 memory
// model accepts write-backs with random back-pressure and answers the restore
// loads.
//
// Checks:
//   - every write reaching memory is an uncorrupted store of a region whose
//     boundary had already been verified;
//   - each region is verified exactly WCDL cycles after its boundary commits;
//   - after each alarm, the registers restored equal the last checkpoints of
//     the most recently verified region and fetch resumes at its boundary;
//   - the forwarding search returns the youngest unverified store;
//   - at the end, memory equals an error-free run of the program.
// Each mechanism (boundary, verification, drain, store queue full, RBB full,
// same-cycle store+boundary, same-cycle boundary+verification, squash of
// unverified stores, register restore, redirect, alarm during recovery,
// forwarding hit, busy cache port) is counted and must occur; the RBB can
// only fill when WCDL exceeds its depth, and must not fill otherwise. When the run
// ends done_o rises; checks and failures hold the totals.
module turnstile_core_model
  import turnstile_pkg::*;
#(
  parameter int unsigned WCDL       = WCDL_DEF,
  parameter int unsigned GSQ_DEPTH  = GSQ_DEPTH_DEF,
  parameter int unsigned RBB_DEPTH  = RBB_DEPTH_DEF,
  parameter int          NREGIONS   = 400,
  parameter int          MAX_CYCLES = 190000
) (
  input  logic              clk,
  output logic              rst_n,
  output logic              err_detect,
  output logic              st_valid,
  input  logic              st_ready,
  output store_t            st,
  output logic              bnd_valid,
  input  logic              bnd_ready,
  output logic [PC_W-1:0]   bnd_pc,
  output logic [ADDR_W-1:0] ld_addr,
  input  logic              fwd_hit,
  input  store_t            fwd,
  input  logic              wr_valid,
  output logic              wr_ready,
  input  store_t            wr,
  input  logic              pipe_flush,
  output logic [ADDR_W-1:0] ckpt_base,
  input  logic              rl_req_valid,
  output logic              rl_req_ready,
  input  logic [ADDR_W-1:0] rl_req_addr,
  output logic              rl_rsp_valid,
  output logic [DATA_W-1:0] rl_rsp_data,
  input  logic              rf_we,
  input  logic [3:0]        rf_waddr,
  input  logic [DATA_W-1:0] rf_wdata,
  input  logic              redirect_valid,
  input  logic [PC_W-1:0]   redirect_pc,
  input  logic              ver_valid,
  input  logic [$clog2(RBB_DEPTH+1)-1:0] rbb_count,
  input  logic [$clog2(GSQ_DEPTH+1)-1:0] gsq_count,
  input  logic [$clog2(GSQ_DEPTH+1)-1:0] gsq_ucount,
  output logic              done_o,
  output int                checks,
  output int                failures
);

  localparam int          NREG      = 15;
  localparam logic [31:0] PC_BASE   = 32'h0000_1000;
  localparam logic [31:0] DATA_BASE = 32'h0002_0000;
  localparam logic [31:0] CKPT_BASE = 32'h0007_F000;
  localparam logic [31:0] CORRUPT   = 32'hDEAD_BEEF;

  int   cyc;
  logic strike;

  initial begin
    checks   = 0;
    failures = 0;
    done_o   = 1'b0;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d (WCDL=%0d GSQ=%0d): %s", cyc, WCDL, GSQ_DEPTH, what);
    end
  endtask

  acoustic_sensor_model #(.WCDL(WCDL)) u_sensor (.clk, .rst_n, .strike, .err_detect);

  // ---------------- the synthetic program ----------------
  function automatic int hash(input int x);
    int h;
    h = x * 32'h2545_F491;
    return (h ^ (h >>> 13)) & 32'h7fff_ffff;
  endfunction

  // regions 100..139 have no stores (boundaries back to back: the RBB fills);
  // regions 200..229 have DEPTH/2 stores each (the store queue fills)
  function automatic int nops(input int k);
    if (k >= 100 && k < 140) return 0;
    if (k >= 200 && k < 230) return GSQ_DEPTH / 2;
    return hash(k) % 9;
  endfunction
  function automatic int gap(input int k);
    if ((k >= 100 && k < 140) || (k >= 200 && k < 230)) return 0;
    return hash(k + 7777) % 3;
  endfunction
  function automatic bit is_ckpt(input int k, input int j);
    return ((k + j) % 3) == 0;
  endfunction
  function automatic int ckpt_reg(input int k, input int j);
    return (k * 5 + j) % NREG;
  endfunction
  function automatic store_t op_store(input int k, input int j);
    store_t s;
    s.addr = is_ckpt(k, j) ? CKPT_BASE + 4 * ckpt_reg(k, j)
                           : DATA_BASE + 4 * ((k * 7 + j * 3) % 64);
    s.data = {16'(k), 8'(j), 8'(k * 7 + j * 13)};
    s.be   = 4'hF;
    return s;
  endfunction
  // value of checkpoint slot r once regions 0..upto have completed
  function automatic logic [31:0] golden_ckpt(input int r, input int upto);
    logic [31:0] v;
    v = '0;
    for (int k = 0; k <= upto; k++)
      for (int j = 0; j < nops(k); j++)
        if (is_ckpt(k, j) && ckpt_reg(k, j) == r) v = op_store(k, j).data;
    return v;
  endfunction

  // ---------------- memory (L1) model ----------------
  logic [31:0] mem[logic [31:0]];
  bit          rl_pend;
  int          rl_lat;
  logic [31:0] rl_addr;

  function automatic logic [31:0] rd(input logic [31:0] a);
    return mem.exists(a) ? mem[a] : 32'h0;
  endfunction

  // ---------------- stimulus and checking ----------------
  initial begin
    int cur_k, cur_j, gap_cnt, verified_upto, rl_count;
    bit corrupt, done, last_valid, in_rec, strike_ok;
    store_t last_st, offer;
    int bnd_k[$];
    int bnd_t[$];
    int n_bnd = 0, n_ver = 0, n_drain = 0, n_gsq_full = 0, n_rbb_full = 0, n_st_bnd = 0;
    int n_bnd_ver = 0, n_squash = 0, n_restore = 0, n_redirect = 0, n_err_rec = 0;
    int n_fwd = 0, n_busy = 0, n_err = 0, n_strike = 0;

    rst_n = 1'b0;
    strike = 0; st_valid = 0; st = '0; bnd_valid = 0; bnd_pc = '0; ld_addr = '0;
    wr_ready = 0; rl_req_ready = 0; rl_rsp_valid = 0; rl_rsp_data = '0;
    ckpt_base = CKPT_BASE;
    cur_k = 0; cur_j = 0; gap_cnt = 0; verified_upto = -1; corrupt = 0; done = 0;
    last_valid = 0; in_rec = 0; rl_pend = 0; rl_lat = 0; rl_addr = '0; rl_count = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (cyc = 0; cyc < MAX_CYCLES && !done; cyc++) begin
      // ---- drive the core side ----
      strike_ok = (cur_k < NREGIONS);
      strike    = strike_ok && (($urandom_range(0, 399) == 0) ||
                                (pipe_flush && $urandom_range(0, 39) == 0));
      if (strike) corrupt = 1;
      st_valid = 0; bnd_valid = 0;
      if (!pipe_flush && cur_k < NREGIONS) begin
        if (gap_cnt == 0) begin
          if (cur_j < nops(cur_k)) begin
            offer    = op_store(cur_k, cur_j);
            st_valid = 1;
            st       = offer;
            if (corrupt) st.data = st.data ^ CORRUPT;
            // the last store and the boundary may commit together
            if (cur_j == nops(cur_k) - 1 && hash(cur_k + 99) % 2 == 0) bnd_valid = 1;
          end else bnd_valid = 1;
        end
      end
      bnd_pc   = PC_BASE + 4 * (cur_k + 1);
      ld_addr  = last_st.addr;
      // memory side
      wr_ready     = (cur_k >= 200 && cur_k < 230) ? ($urandom_range(0, 3) == 0)
                                                    : ($urandom_range(0, 99) < 70);
      rl_req_ready = ($urandom_range(0, 1) == 0);
      rl_rsp_valid = rl_pend && rl_lat == 0;
      rl_rsp_data  = rd(rl_addr);
      #1;

      // ---- checks on this cycle ----
      if (wr_valid && wr_ready) begin
        int k, j;
        k = int'(wr.data[31:16]); j = int'(wr.data[15:8]);
        check(k < NREGIONS && j < nops(k) && wr == op_store(k, j),
              $sformatf("write-back is an uncorrupted program store (%h @ %h)", wr.data, wr.addr));
        check(k <= verified_upto, "write-back only after its region is verified");
        mem[wr.addr] = wr.data;
        n_drain++;
      end
      if (wr_valid && !wr_ready) n_busy++;
      if (ver_valid) begin
        check(bnd_k.size() > 0, "verification of a pending region");
        if (bnd_k.size() > 0) begin
          check(cyc - bnd_t[0] == WCDL, $sformatf("region %0d verified %0d cycles after its boundary",
                                                   bnd_k[0], cyc - bnd_t[0]));
          verified_upto = bnd_k[0];
          void'(bnd_k.pop_front()); void'(bnd_t.pop_front());
        end
        n_ver++;
        if (bnd_valid && bnd_ready) n_bnd_ver++;
      end
      if (last_valid && gsq_ucount != 0) begin
        check(fwd_hit && fwd == last_st, "forwarding returns the youngest store");
        n_fwd++;
      end
      if (st_valid && !st_ready && !pipe_flush) n_gsq_full++;
      if (bnd_valid && !bnd_ready && !pipe_flush && 32'(rbb_count) == RBB_DEPTH) n_rbb_full++;
      if (rf_we) begin
        check(32'(rf_waddr) < NREG && rf_wdata == golden_ckpt(32'(rf_waddr), verified_upto),
              $sformatf("register r%0d restored from the last verified checkpoint", rf_waddr));
        n_restore++;
      end
      if (redirect_valid) begin
        check(redirect_pc == PC_BASE + 4 * (verified_upto + 1), "redirect to the last verified boundary");
        check(n_restore - rl_count == NREG, "all checkpointed registers restored before the redirect");
        n_redirect++;
      end
      if (err_detect) begin
        n_err++;
        if (in_rec) n_err_rec++;
        if (gsq_ucount != 0) n_squash++;
        check(pipe_flush, "pipeline flushed on an alarm");
      end

      // ---- advance the core model ----
      if (err_detect) begin
        bnd_k.delete(); bnd_t.delete();
        last_valid = 0;
        in_rec = 1;
        rl_count = n_restore;
      end else begin
        if (st_valid && st_ready) begin
          cur_j++;
          last_st = st; last_valid = 1;
          if (!(bnd_valid && bnd_ready)) gap_cnt = gap(cur_k);
        end
        if (bnd_valid && bnd_ready) begin
          if (st_valid) n_st_bnd++;
          bnd_k.push_back(cur_k); bnd_t.push_back(cyc);
          n_bnd++;
          cur_k++; cur_j = 0; gap_cnt = gap(cur_k);
        end else if (!st_valid && gap_cnt > 0 && !pipe_flush) gap_cnt--;
      end
      if (redirect_valid) begin
        cur_k = int'((redirect_pc - PC_BASE) / 4);
        cur_j = 0; gap_cnt = 0; corrupt = 0; in_rec = 0;
      end
      if (strike) n_strike++;
      // restore-load port of the memory model
      if (rl_pend) begin
        if (rl_lat == 0) rl_pend = 0; else rl_lat--;
      end
      if (rl_req_valid && rl_req_ready) begin
        rl_pend = 1; rl_lat = $urandom_range(0, 2); rl_addr = rl_req_addr;
      end
      // finished: program done, nothing left to verify or drain
      if (cur_k == NREGIONS && !pipe_flush && !err_detect && rbb_count == 0 && gsq_count == 0
          && !strike && !ver_valid)
        done = 1;
      @(posedge clk);
      #1;
    end

    check(done, "program completed");
    // memory must equal an error-free run
    begin
      logic [31:0] gold[logic [31:0]];
      int nmis;
      nmis = 0;
      for (int k = 0; k < NREGIONS; k++)
        for (int j = 0; j < nops(k); j++) gold[op_store(k, j).addr] = op_store(k, j).data;
      foreach (gold[a]) begin
        check(rd(a) == gold[a], $sformatf("final memory word %h", a));
      end
      foreach (mem[a]) check(gold.exists(a), "no write outside the program's addresses");
    end
    $display("config WCDL=%0d GSQ=%0d RBB=%0d:", WCDL, GSQ_DEPTH, RBB_DEPTH);
    $display("top: boundaries=%0d verified=%0d drained=%0d gsq_full=%0d rbb_full=%0d store+boundary=%0d",
             n_bnd, n_ver, n_drain, n_gsq_full, n_rbb_full, n_st_bnd);
    $display("top: boundary+verify=%0d strikes=%0d alarms=%0d squash_unverified=%0d restores=%0d redirects=%0d",
             n_bnd_ver, n_strike, n_err, n_squash, n_restore, n_redirect);
    $display("top: alarm_during_recovery=%0d forwarding=%0d cache_busy=%0d cycles=%0d",
             n_err_rec, n_fwd, n_busy, cyc);
    check(n_bnd > 0,       "mechanism: region boundary");
    check(n_ver > 0,       "mechanism: region verification");
    check(n_drain > 0,     "mechanism: drain to L1");
    check(n_gsq_full > 0,  "mechanism: store queue full stall");
    // boundaries are at least a cycle apart, so at most WCDL regions wait at
    // once: the buffer can only fill when WCDL exceeds its depth
    if (WCDL > RBB_DEPTH) check(n_rbb_full > 0, "mechanism: RBB full stall");
    else check(n_rbb_full == 0, "RBB never full when WCDL <= its depth");
    check(n_st_bnd > 0,    "mechanism: store and boundary in one cycle");
    check(n_bnd_ver > 0,   "mechanism: boundary and verification in one cycle");
    check(n_squash > 0,    "mechanism: squash of unverified stores");
    check(n_restore > 0,   "mechanism: register restore");
    check(n_redirect > 0,  "mechanism: redirect to the recovery PC");
    check(n_err_rec > 0,   "mechanism: alarm during recovery");
    check(n_fwd > 0,       "mechanism: store-to-load forwarding");
    check(n_busy > 0,      "mechanism: busy cache port");
    done_o = 1'b1;
  end

endmodule
