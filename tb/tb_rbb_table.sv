// tb_rbb_table: self-checking testbench of the region boundary buffer storage.
//
// Drives random pushes, pops and flushes into a 14-entry table and compares
// the head entry, the entry behind it, the count and the full/empty flags with
// a SystemVerilog queue holding the same entries. Push and pop in the same
// cycle, pushes when full (with a pop) and flushes all occur.
module tb_rbb_table;
  import turnstile_pkg::*;

  localparam int DEPTH = RBB_DEPTH_DEF;

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

  logic       push, pop, flush, full, empty;
  rbb_entry_t push_entry, head_entry, next_entry;
  logic [3:0] count;

  rbb_table dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rbb_entry_t model[$];

  initial begin
    int n_full = 0, n_both = 0, n_flush = 0;
    rst_n = 1'b0;
    push = 0; pop = 0; flush = 0; push_entry = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (cyc = 0; cyc < 6000; cyc++) begin
      int bias;
      bias = ((cyc / 500) % 2 == 0) ? 70 : 30;   // alternate filling and emptying
      push  = ($urandom_range(0, 99) < bias);
      pop   = ($urandom_range(0, 99) < 100 - bias) && (model.size() > 0);
      if (model.size() == DEPTH && !pop) push = 0;
      flush = ($urandom_range(0, 399) == 0);
      push_entry = rbb_entry_t'({$urandom, $urandom});
      #1;
      check(count == 4'(model.size()), "count");
      check(full == (model.size() == DEPTH), "full flag");
      check(empty == (model.size() == 0), "empty flag");
      if (model.size() > 0) check(head_entry == model[0], "head entry");
      if (model.size() > 1) check(next_entry == model[1], "entry behind the head");
      if (full) n_full++;
      if (push && pop) n_both++;
      if (flush) begin
        model.delete();
        n_flush++;
      end else begin
        if (pop)  void'(model.pop_front());
        if (push) model.push_back(push_entry);
      end
      @(posedge clk);
      #1;
    end
    check(n_full > 20 && n_both > 100 && n_flush > 3, "coverage of full, push+pop and flush");
    $display("rbb_table: full=%0d push+pop=%0d flush=%0d", n_full, n_both, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
