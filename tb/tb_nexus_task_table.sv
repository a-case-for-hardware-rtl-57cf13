// tb_nexus_task_table: random test of the task table against a reference
// model of dependency counts. Every cycle it may allocate an entry (checking
// that the lowest free id is offered and that a new task starts with count
// one, the handler's guard), add dependencies, remove one (a kick-off or the
// guard release), mark a task handled, running or finishing, or free it.
// It checks that a task is pushed into the ready queue, with its descriptor
// pointer, exactly in the cycle its count reaches zero, that a decrement is
// refused while the ready queue is full, and the count of entries in use.
module tb_nexus_task_table;
  import nexus_pkg::*;
  localparam int NT = 8, DWD = 4, TW = 3, PW = $clog2(NT * DWD);
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic alloc_avail, alloc_en, inc_en, dec_en, dec_ready, handled_en, run_en, fin_en, free_en;
  logic [TW-1:0] alloc_id, inc_id, dec_id, handled_id, run_id, fin_id, free_id;
  logic [1:0] inc_amt;
  logic rq_valid, rq_ready;
  logic [TW+PW-1:0] rq_data;
  logic [TW:0] used_count;
  nexus_task_table #(.NUM_TASKS(NT), .DESC_WORDS(DWD)) dut (.*);

  bit used [NT];
  int cnt [NT];
  int n_ready = 0, n_refused = 0, n_full = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    {alloc_en, inc_en, dec_en, handled_en, run_en, fin_en, free_en} = '0;
    {inc_id, dec_id, handled_id, run_id, fin_id, free_id} = '0;
    inc_amt = 0; rq_ready = 1;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int c = 0; c < 5000; c++) begin
      int lowest, nused, d, i, f;
      lowest = -1; nused = 0;
      for (int k = NT - 1; k >= 0; k--) if (!used[k]) lowest = k;
      foreach (used[k]) nused += int'(used[k]);
      #1;
      check(alloc_avail == (lowest >= 0), "alloc_avail");
      if (lowest >= 0) check(alloc_id == TW'(lowest), "lowest free id offered");
      check(used_count == (TW+1)'(nused), "used count");
      if (lowest < 0) n_full++;
      // choose operations for this cycle
      alloc_en = lowest >= 0 && $urandom_range(0, 3) == 0;
      // decrement: pick a used entry with a positive count
      d = -1;
      for (int t = 0; t < 4; t++) begin
        i = $urandom_range(0, NT - 1);
        if (used[i] && cnt[i] > 0 && !(alloc_en && i == lowest)) d = i;
      end
      dec_en = d >= 0 && $urandom_range(0, 1) == 0;
      dec_id = TW'(d < 0 ? 0 : d);
      // increment on a used entry with a positive count, staying within the
      // largest count a task can have (two per operand plus the guard)
      i = $urandom_range(0, NT - 1);
      inc_en = used[i] && cnt[i] > 0 && cnt[i] < 6 && !(alloc_en && i == lowest) && $urandom_range(0, 2) == 0;
      inc_id = TW'(i);
      inc_amt = 2'($urandom_range(1, 2));
      // free an entry whose count is zero
      f = $urandom_range(0, NT - 1);
      free_en = used[f] && cnt[f] == 0 && !(dec_en && dec_id == TW'(f)) && !(inc_en && inc_id == TW'(f))
                && $urandom_range(0, 2) == 0;
      free_id = TW'(f);
      handled_en = 0; run_en = 0; fin_en = 0;
      rq_ready = $urandom_range(0, 5) != 0;
      #1;
      check(dec_ready == rq_ready, "decrement refused while ready queue full");
      if (dec_en && !rq_ready) n_refused++;
      begin
        bit expect_push;
        int after;
        after = (dec_en && rq_ready) ? cnt[d] - 1 + ((inc_en && inc_id == dec_id) ? int'(inc_amt) : 0) : -1;
        expect_push = dec_en && rq_ready && after == 0;
        check(rq_valid == expect_push, "ready push when count reaches zero");
        if (expect_push) begin
          check(rq_data == {TW'(d), PW'(d * DWD)}, "ready queue entry {id, descriptor pointer}");
          n_ready++;
        end
      end
      @(posedge clk);
      // update the model
      if (dec_en && rq_ready) cnt[d]--;
      if (inc_en) cnt[inc_id] += int'(inc_amt);
      if (alloc_en) begin used[lowest] = 1; cnt[lowest] = 1; end
      if (free_en) used[f] = 0;
    end
    check(n_ready > 100 && n_refused > 0 && n_full > 0, "all cases reached");
    $display("ready pushes %0d, refused decrements %0d, cycles full %0d", n_ready, n_refused, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
