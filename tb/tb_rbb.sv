// tb_rbb: self-checking testbench of the region boundary buffer.
//
// Part 1 replays the worked timeline of the design description with a
// detection latency of 10 cycles and a 4-entry buffer: boundaries r1..r4 at
// cycles 0, 5, 8 and 13, an alarm at cycle 21. It checks ToWait and HasWaited
// at every marked time point, the RegionTimes 10, 5, 3, 5 stored in the
// entries, the verification of r1, r2, r3 at cycles 10, 15 and 18, and that
// recovery uses r3.
// Part 2 runs the default-size buffer (WCDL 30, 14 entries) on random
// boundaries and alarms against a time-stamp reference: a region whose
// boundary commits at cycle b must be verified in cycle b + WCDL exactly,
// with its own PC and GSQ pointer, unless an alarm comes first.
module tb_rbb;
  import turnstile_pkg::*;

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

  // ---------------- part 1: the worked example (WCDL = 10) ----------------
  logic                 f_bnd_valid, f_bnd_ready, f_err, f_ver_valid, f_squash;
  logic [PC_W-1:0]      f_bnd_pc, f_rp;
  logic [GSQ_PTR_W-1:0] f_tail, f_ver_ptr;
  logic [3:0]           f_tw, f_hw;   // a 10-cycle WCDL needs 4 timer bits
  logic [2:0]           f_cnt;

  rbb #(.WCDL(10), .DEPTH(4), .RESET_PC(32'h100)) u_fig (
    .clk, .rst_n,
    .bnd_valid(f_bnd_valid), .bnd_ready(f_bnd_ready), .bnd_pc(f_bnd_pc),
    .gsq_tail(f_tail), .err_detect(f_err),
    .ver_valid(f_ver_valid), .ver_ptr(f_ver_ptr), .gsq_squash(f_squash),
    .rp(f_rp), .to_wait(f_tw), .has_waited(f_hw), .count(f_cnt)
  );

  // ---------------- part 2: default sizes, random ----------------
  localparam int DL = WCDL_DEF;
  logic                 r_bnd_valid, r_bnd_ready, r_err, r_ver_valid, r_squash;
  logic [PC_W-1:0]      r_bnd_pc, r_rp;
  logic [GSQ_PTR_W-1:0] r_tail, r_ver_ptr;
  logic [RT_W-1:0]      r_tw, r_hw;
  logic [3:0]           r_cnt;

  rbb u_rnd (
    .clk, .rst_n,
    .bnd_valid(r_bnd_valid), .bnd_ready(r_bnd_ready), .bnd_pc(r_bnd_pc),
    .gsq_tail(r_tail), .err_detect(r_err),
    .ver_valid(r_ver_valid), .ver_ptr(r_ver_ptr), .gsq_squash(r_squash),
    .rp(r_rp), .to_wait(r_tw), .has_waited(r_hw), .count(r_cnt)
  );

  // watchdog
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // figure values: r_k has PC 'hA0+k and GSQ pointer k
  function automatic logic [PC_W-1:0] rpc(input int k);
    return PC_W'(32'hA0 + k);
  endfunction

  typedef struct {
    logic [PC_W-1:0]      pc;
    logic [GSQ_PTR_W-1:0] ptr;
    int                   t;
  } ref_e;
  ref_e refq[$];

  initial begin
    int expect_rt [4] = '{10, 5, 3, 5};
    int bnd_time  [4] = '{0, 5, 8, 13};
    int ver_cnt   = 0;
    logic [PC_W-1:0] exp_rp;
    int last_bnd;
    int n_pops = 0, n_errs = 0, n_full = 0, n_same = 0;

    rst_n = 1'b0;
    f_bnd_valid = 0; f_bnd_pc = '0; f_tail = '0; f_err = 0;
    r_bnd_valid = 0; r_bnd_pc = '0; r_tail = '0; r_err = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // ---- part 1 ----
    for (cyc = 0; cyc <= 24; cyc++) begin
      f_bnd_valid = 0; f_err = 0;
      for (int k = 0; k < 4; k++)
        if (cyc == bnd_time[k]) begin
          f_bnd_valid = 1; f_bnd_pc = rpc(k + 1); f_tail = GSQ_PTR_W'(k + 1);
        end
      if (cyc == 21) f_err = 1;
      #1;
      // values during this cycle (before the updates of this cycle)
      case (cyc)
        0:  begin check(f_tw == 0 && f_hw == 0, "t0 ToWait/HasWaited 0/0"); end
        5:  begin check(f_tw == 5 && f_hw == 0, "t1 ToWait 5 HasWaited 0"); end
        8:  begin check(f_tw == 2 && f_hw == 5, "t2 ToWait 2 HasWaited 5"); end
        10: begin check(f_tw == 0 && f_hw == 8, "t3 ToWait 0 HasWaited 8"); end
        11: begin check(f_tw == 4 && f_hw == 3, "t4 ToWait 4 HasWaited 3"); end
        13: begin check(f_tw == 2 && f_hw == 3, "t5 ToWait 2 HasWaited 3"); end
        15: begin check(f_tw == 0 && f_hw == 8, "t6 ToWait 0 HasWaited 8"); end
        18: begin check(f_tw == 0 && f_hw == 5, "t7 ToWait 0 HasWaited 5"); end
        21: begin check(f_tw == 2 && f_hw == 0, "t8 ToWait 2 HasWaited 0");
                  check(f_rp == rpc(3), "t8 recovery PC is r3");
                  check(f_squash, "t8 squash raised");
                  check(f_cnt == 1, "t8 only r4 unverified"); end
        23: begin check(f_tw == 0 && f_hw == 0, "t9 ToWait 0 HasWaited 0"); end
        default: ;
      endcase
      // the RegionTime written for each boundary
      for (int k = 0; k < 4; k++)
        if (cyc == bnd_time[k]) check(u_fig.new_e.rt == 4'(expect_rt[k]),
                                      $sformatf("RegionTime of r%0d", k + 1));
      // verification points
      if (cyc == 10 || cyc == 15 || cyc == 18) begin
        ver_cnt++;
        check(f_ver_valid && f_ver_ptr == GSQ_PTR_W'(ver_cnt),
              $sformatf("r%0d verified at %0d", ver_cnt, cyc));
      end else check(!f_ver_valid, "no verification at this cycle");
      @(posedge clk);
      #1;
      // values right after the update of this cycle
      case (cyc)
        0:  check(f_tw == 9 && f_hw == 0, "after t0: ToWait 10 loaded");
        5:  check(f_hw == 5, "after t1: HasWaited 5");
        8:  check(f_hw == 8, "after t2: HasWaited 8");
        10: check(f_rp == rpc(1) && f_tw == 4 && f_hw == 3, "after t3: RP r1, ToWait 5, HasWaited 3");
        13: check(f_hw == 8, "after t5: HasWaited 8");
        15: check(f_rp == rpc(2) && f_tw == 2 && f_hw == 5, "after t6: RP r2, ToWait 3, HasWaited 5");
        18: check(f_rp == rpc(3) && f_tw == 4 && f_hw == 0, "after t7: RP r3, ToWait 5, HasWaited 0");
        21: check(f_cnt == 0 && f_rp == rpc(3), "after t8: RBB empty, RP kept");
        default: ;
      endcase
    end

    // ---- part 2 ----
    exp_rp   = 32'h0000_1000;
    last_bnd = -1000;
    for (cyc = 0; cyc < 12000; cyc++) begin
      int mode;
      mode = (cyc / 1500) % 4;   // phases of sparse, dense and burst boundaries
      r_bnd_valid = 0; r_err = 0;
      case (mode)
        0: r_bnd_valid = ($urandom_range(0, 19) == 0);
        1: r_bnd_valid = ($urandom_range(0, 3) == 0);
        2: r_bnd_valid = 1'b1;
        default: r_bnd_valid = ($urandom_range(0, 1) == 0);
      endcase
      r_bnd_pc = $urandom;
      r_tail   = GSQ_PTR_W'($urandom_range(0, GSQ_DEPTH_DEF - 1));
      r_err    = ($urandom_range(0, 299) == 0);
      #1;
      check(r_bnd_ready == (refq.size() < RBB_DEPTH_DEF), "bnd_ready matches occupancy");
      check(r_cnt == 4'(refq.size()), "entry count");
      if (r_bnd_valid && !r_bnd_ready) n_full++;
      // expected verification this cycle
      if (refq.size() > 0 && refq[0].t + DL == cyc && !r_err) begin
        check(r_ver_valid && r_ver_ptr == refq[0].ptr,
              $sformatf("region ending at %0d verified %0d cycles later", refq[0].t, DL));
        exp_rp = refq[0].pc;
        void'(refq.pop_front());
        n_pops++;
        if (r_bnd_valid && r_bnd_ready) n_same++;
      end else check(!r_ver_valid, "no early or late verification");
      if (r_err) begin
        check(r_squash, "squash on alarm");
        refq.delete();
        last_bnd = -1000;   // after an alarm the next region is timed from scratch
        n_errs++;
      end else if (r_bnd_valid && r_bnd_ready) begin
        int rt;
        rt = (cyc - last_bnd < DL) ? cyc - last_bnd : DL;
        check(u_rnd.new_e.rt == RT_W'(rt), "RegionTime is the region length capped at WCDL");
        refq.push_back('{r_bnd_pc, r_tail, cyc});
        last_bnd = cyc;
      end
      @(posedge clk);
      #1;
      check(r_rp == exp_rp, "recovery PC is the last verified boundary");
    end
    check(n_pops > 100 && n_errs > 5 && n_full > 10 && n_same > 10,
          $sformatf("coverage pops=%0d errs=%0d full=%0d same-cycle=%0d", n_pops, n_errs, n_full, n_same));
    $display("rbb: pops=%0d alarms=%0d full stalls=%0d boundary+verify same cycle=%0d",
             n_pops, n_errs, n_full, n_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
