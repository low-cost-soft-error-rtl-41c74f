// tb_gsq: self-checking testbench of the gated store queue (40 entries).
//
// The testbench plays the region boundary buffer: it records the queue's tail
// pointer at random region boundaries (at most 20 stores per region, as the
// region former guarantees), later verifies those regions oldest first, and
// sometimes raises a squash. A reference queue of (store, verified) pairs
// predicts every output: a store may appear on the cache write port only once
// verified and only in commit order, squashed stores never appear, and the
// forwarding search must return the youngest store to the same word. The
// cache port is randomly busy, and verification is paused for stretches so
// the queue fills and commit stalls.
module tb_gsq;
  import turnstile_pkg::*;

  localparam int DEPTH = GSQ_DEPTH_DEF;

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

  logic                 st_valid, st_ready, ver_valid, squash, wr_valid, wr_ready;
  logic                 fwd_hit, empty, full;
  store_t               st, wr, fwd;
  logic [GSQ_PTR_W-1:0] tail_ptr, tail_next, ver_ptr;
  logic [ADDR_W-1:0]    ld_addr;
  logic [5:0]           count, ucount;

  gsq dut (.*);

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    store_t s;
    bit     v;
  } ent_t;
  ent_t                 model[$];
  logic [GSQ_PTR_W-1:0] bptr[$];     // boundaries not yet verified
  int                   bcnt[$];     // stores in each of those regions
  int                   open_cnt;    // stores in the region still open

  function automatic logic [ADDR_W-1:0] rand_addr();
    return ADDR_W'(32'h8000 + 4 * $urandom_range(0, 15)) | ADDR_W'($urandom_range(0, 3));
  endfunction

  initial begin
    int n_full = 0, n_drain = 0, n_squash = 0, n_fwd = 0, n_ver = 0, n_dropped = 0;
    rst_n = 1'b0;
    st_valid = 0; st = '0; ver_valid = 0; ver_ptr = '0; squash = 0; wr_ready = 0;
    ld_addr = '0;
    open_cnt = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (cyc = 0; cyc < 20000; cyc++) begin
      bit pause, bnd, exp_hit;
      int nv;
      store_t exp_fwd;
      pause    = ((cyc / 700) % 3 == 2);           // stop verifying: the queue fills
      squash   = ($urandom_range(0, 499) == 0);
      st_valid = ($urandom_range(0, 99) < 60) && (open_cnt < DEPTH / 2);
      st.addr  = rand_addr();
      st.data  = $urandom;
      st.be    = 4'($urandom_range(1, 15));
      wr_ready = ($urandom_range(0, 99) < 70);
      ld_addr  = rand_addr();
      ver_valid = !pause && !squash && bptr.size() > 0 && ($urandom_range(0, 3) == 0);
      ver_ptr   = (bptr.size() > 0) ? bptr[0] : '0;
      #1;
      // ---- compare outputs with the model ----
      check(count == 6'(model.size()), "count");
      nv = 0;
      foreach (model[i]) if (!model[i].v) nv++;
      check(ucount == 6'(nv), "unverified count");
      check(full == (model.size() == DEPTH) && st_ready == !full, "full / st_ready");
      check(empty == (model.size() == 0), "empty");
      check(wr_valid == (model.size() > 0 && model[0].v), "write-back only for a verified head");
      if (wr_valid) check(wr == model[0].s, "write-back store in commit order");
      exp_hit = 0; exp_fwd = '0;
      foreach (model[i])
        if (model[i].s.addr[ADDR_W-1:2] == ld_addr[ADDR_W-1:2]) begin
          exp_hit = 1; exp_fwd = model[i].s;
        end
      check(fwd_hit == exp_hit, "forwarding hit");
      if (exp_hit) begin
        check(fwd == exp_fwd, "forwarding returns the youngest match");
        n_fwd++;
      end
      if (st_valid && !st_ready) n_full++;
      // ---- advance the model ----
      if (wr_valid && wr_ready) begin
        void'(model.pop_front());
        n_drain++;
      end
      if (squash) begin
        while (model.size() > 0 && !model[$].v) void'(model.pop_back());
        if (st_valid && st_ready) n_dropped++;
        bptr.delete(); bcnt.delete(); open_cnt = 0;
        n_squash++;
      end else begin
        if (ver_valid) begin
          int k;
          k = 0;
          foreach (model[i]) if (!model[i].v && k < bcnt[0]) begin
            model[i].v = 1; k++;
          end
          void'(bptr.pop_front()); void'(bcnt.pop_front());
          n_ver++;
        end
        if (st_valid && st_ready) begin
          model.push_back('{st, 1'b0});
          open_cnt++;
        end
        // close the open region now and then, or when it reaches DEPTH/2 stores
        bnd = (open_cnt > 0) && (open_cnt == DEPTH / 2 || $urandom_range(0, 7) == 0);
        if (bnd) begin
          bptr.push_back(tail_next);
          bcnt.push_back(open_cnt);
          open_cnt = 0;
        end
      end
      @(posedge clk);
      #1;
    end
    check(n_full > 20 && n_drain > 1000 && n_squash > 10 && n_fwd > 1000 && n_ver > 200,
          "coverage of stall, drain, squash, forwarding and verification");
    $display("gsq: full stalls=%0d drained=%0d squashes=%0d forwards=%0d verifications=%0d",
             n_full, n_drain, n_squash, n_fwd, n_ver);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
