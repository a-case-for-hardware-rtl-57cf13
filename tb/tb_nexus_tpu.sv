// tb_nexus_tpu: test of the Task Pool Unit with small tables.
// The testbench plays the control core and the worker cores. It writes a
// random program of tasks (1 to 3 operands over a few shared addresses,
// random directions) as descriptors into a main-memory model (random grant,
// fixed read latency), offers each descriptor's pointer and size to the in
// buffer in program order, pops ready tasks, runs them for a random time
// in random order and returns their ids through the finish buffer.
// The predecessors of every task are worked out here from program order
// (last writer of each operand; for a written operand also the readers
// since that writer). Checked: a task leaves the ready queue only after all
// its predecessors finished, every task runs once, the task storage holds
// the descriptor words exactly as in memory (read through the core port),
// the descriptor pointer of a ready task, the status register while full
// and once idle, and that each of the unit's mechanisms occurred.
module tb_nexus_tpu;
  import nexus_pkg::*;
  localparam int NT = 16, DW = 4, TW = 4, SW = 6, NPROG = 400, NADDR = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ib_valid, ib_ready, mem_req, mem_gnt, mem_rvalid;
  word_t ib_ptr, mem_addr, mem_rdata, ts_data, status;
  logic [7:0] ib_size;
  logic rq_valid, rq_ready, fb_valid, fb_ready;
  logic [TW-1:0] rq_id, fb_id;
  logic [SW-1:0] rq_desc, ts_addr;
  logic ev_raw, ev_war, ev_waw, ev_marker, ev_dep_stall, ev_tt_full, ev_rq_full;

  nexus_tpu #(.NUM_TASKS(NT), .DESC_WORDS(DW), .IB_DEPTH(4), .RQ_DEPTH(4), .FB_DEPTH(4),
              .P_ENTRIES(16), .C_ENTRIES(16), .WAYS(4), .KO_LEN(3)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // program and descriptors: task n at byte address 0x1000_0000 + 16*n
  localparam word_t BASE = 32'h1000_0000;
  int    p_nops [NPROG];
  word_t p_word [NPROG][DW];
  int    preds  [NPROG][$];
  bit    fin [NPROG], ran [NPROG];

  function automatic void gen();
    int lw [NADDR];
    int rd [NADDR][$];
    foreach (lw[a]) lw[a] = -1;
    for (int n = 0; n < NPROG; n++) begin
      bit [NADDR-1:0] used = '0;
      int aa [3];
      mode_e mm [3];
      p_nops[n] = $urandom_range(1, DW - 1);
      p_word[n][0] = {8'(p_nops[n]), 24'(n)};
      for (int k = 1; k < DW; k++) p_word[n][k] = '0;
      for (int k = 0; k < p_nops[n]; k++) begin
        int a;
        do a = $urandom_range(0, NADDR - 1); while (used[a]);
        used[a] = 1;
        aa[k] = a;
        mm[k] = mode_e'($urandom_range(1, 3));
        p_word[n][k + 1] = (32'h4000_0000 + 32'(a) * 32'h0001_0400) | 32'(mm[k]);
        if (lw[a] >= 0) preds[n].push_back(lw[a]);
        if (is_write(mm[k])) foreach (rd[a][r]) preds[n].push_back(rd[a][r]);
      end
      for (int k = 0; k < p_nops[n]; k++) begin
        if (is_write(mm[k])) begin lw[aa[k]] = n; rd[aa[k]] = {}; end
        else rd[aa[k]].push_back(n);
      end
    end
  endfunction

  function automatic word_t mem_word(input word_t a);
    int n = int'((a - BASE) >> 4);
    int k = int'(a[3:2]);
    return (n >= 0 && n < NPROG) ? p_word[n][k] : 32'hDEAD_BEEF;
  endfunction

  // memory model: two-cycle latency, in order
  word_t pa [$];
  int    pt [$];
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (rst_n && mem_req && mem_gnt) begin
    pa.push_back(mem_addr); pt.push_back(cyc + 2);
  end
  always @(negedge clk) begin
    mem_gnt    = $urandom_range(0, 3) != 0;
    mem_rvalid = 1'b0; mem_rdata = '0;
    if (pt.size() > 0 && pt[0] <= cyc) begin
      mem_rvalid = 1'b1; mem_rdata = mem_word(pa[0]);
      void'(pa.pop_front()); void'(pt.pop_front());
    end
  end

  // control core: descriptors in program order
  int next_in = 0;
  always @(negedge clk) begin
    ib_valid = rst_n && next_in < NPROG;
    ib_ptr   = BASE + 32'(16 * next_in);
    ib_size  = 8'(1 + p_nops[next_in < NPROG ? next_in : 0]);
  end
  always @(posedge clk) if (rst_n && ib_valid && ib_ready) next_in++;

  // worker cores: pop, verify the stored descriptor, run, finish
  int id_of [NPROG];           // id the unit gave each task
  int run_q [$], end_t [$], fin_q [$];
  int verify_q [$];            // task whose words are read back next
  int verify_k = 0;
  int done = 0, max_running = 0;
  always @(negedge clk) begin
    // the cores take work in slow and fast phases
    rq_ready = rst_n && $urandom_range(0, ((cyc / 400) % 2 == 1) ? 15 : 1) == 0;
    // the port reads the header of a task being popped, else a word of a
    // task to verify
    ts_addr  = '0;
    if (rq_valid && rq_ready) ts_addr = rq_desc;
    else if (verify_q.size() > 0) ts_addr = SW'(id_of[verify_q[0]] * DW + verify_k);
    fb_valid = fin_q.size() > 0;
    fb_id    = fin_q.size() > 0 ? TW'(id_of[fin_q[0]]) : '0;
  end

  always @(posedge clk) if (rst_n) begin
    // task storage read back, one word per cycle
    if (!(rq_valid && rq_ready) && verify_q.size() > 0) begin
      check(ts_data == p_word[verify_q[0]][verify_k], "task storage word");
      verify_k++;
      if (verify_k > p_nops[verify_q[0]]) begin verify_k = 0; void'(verify_q.pop_front()); end
    end
    if (rq_valid && rq_ready) begin
      // the function field of the header carries the program index
      automatic int t = int'(ts_data[23:0]);
      check(t < NPROG, "ready task is a program task");
      if (t < NPROG) begin
        id_of[t] = int'(rq_id);
        check(!ran[t], "task runs once");
        check(rq_desc == SW'(int'(rq_id) * DW), "descriptor pointer");
        foreach (preds[t][p]) check(fin[preds[t][p]], $sformatf("task %0d before pred %0d", t, preds[t][p]));
        ran[t] = 1;
        run_q.push_back(t); end_t.push_back(cyc + $urandom_range(1, 30));
        verify_q.push_back(t);
      end
    end
    for (int i = 0; i < run_q.size(); i++) if (end_t[i] <= cyc) begin
      fin[run_q[i]] = 1; fin_q.push_back(run_q[i]);
      run_q.delete(i); end_t.delete(i);
      break;
    end
    if (run_q.size() > max_running) max_running = run_q.size();
    if (fb_valid && fb_ready) begin
      void'(fin_q.pop_front()); done++;
    end
  end

  int c_raw = 0, c_war = 0, c_waw = 0, c_marker = 0, c_stall = 0, c_tt = 0, c_rq = 0, c_full = 0;
  always @(posedge clk) if (rst_n) begin
    c_raw += int'(ev_raw); c_war += int'(ev_war); c_waw += int'(ev_waw);
    c_marker += int'(ev_marker); c_stall += int'(ev_dep_stall);
    c_tt += int'(ev_tt_full); c_rq += int'(ev_rq_full);
    // status lags by a cycle; when it reports a full table it must count all
    if (status[25]) begin
      c_full++;
      check(status[23:16] == 8'(NT), "status: full table holds NT tasks");
    end
  end

  initial begin
    gen();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == NPROG);
    repeat (40) @(posedge clk);
    for (int n = 0; n < NPROG; n++) check(ran[n], "every task ran");
    check(status[23:16] == 0 && status[28] == 1'b1 && status[7:0] == 0, "status idle");
    $display("events: raw=%0d war=%0d waw=%0d marker=%0d stall=%0d tt_full=%0d rq_full=%0d",
             c_raw, c_war, c_waw, c_marker, c_stall, c_tt, c_rq);
    check(c_raw > 0, "RAW dependency seen");
    check(c_war > 0, "WAR dependency seen");
    check(c_waw > 0, "WAW marker inserted");
    check(c_marker > 0, "walk stopped at marker");
    check(c_stall > 0, "table stall seen");
    check(c_tt > 0, "task table full seen");
    check(c_rq > 0, "ready queue full seen");
    check(c_full > 0, "status shows task table full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
