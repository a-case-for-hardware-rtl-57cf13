// tb_nexus_system: end-to-end test of the Nexus task manager at its default
// size (16 worker cores, 1024-entry task table).
//
// The testbench plays the control core, main memory, the cores' DMA engines
// and the cores themselves. It writes task descriptors into a memory model
// and submits them in program order through the in buffer, for four task
// graphs:
//   CD  each block task reads its left and top-right neighbour and updates
//       itself (a wavefront, like H.264 macroblock decoding)
//   SD  each block task reads its left neighbour and updates itself
//   ND  independent block tasks
//   MIX random tasks over a few addresses, giving read-after-write,
//       write-after-read and write-after-write hazards
// The function field of every descriptor carries the task's sequence number,
// so the core model knows which task it runs. From program order the
// testbench derives, on its own, every task's predecessors (last writer of
// each operand; for a written operand also the readers since that writer)
// and checks at every task start that all of them have finished, and at the
// end that every task ran exactly once. At every start it also checks that
// the DMA gets issued into the task's local-store buffer were exactly its
// input operands, in descriptor order. It also checks the status register
// ("pool empty") between graphs, that the dependency resolution keeps up with
// the rate the document asks for, that a core gets its next task within
// 1 us of finishing one while independent tasks are waiting, and counts how often each mechanism
// (read-after-write subscription, write-after-read subscription,
// write-after-write marker, marker reached, stall on the tables, full task
// table, full ready queue, full in buffer, double buffering) occurred;
// a mechanism that never occurred counts as a failure.
module tb_nexus_system;
  import nexus_pkg::*;

  localparam int NSPE  = 16;
  localparam int TW    = 10;   // task id width of the default 1024-entry task table
  localparam int GRID  = 64;    // blocks per side for CD, SD and ND (4096 tasks)
  localparam int NMIX  = 200;
  localparam int MAXT  = 3 * GRID * GRID + NMIX;
  localparam int DESC_BASE = 32'h0001_0000;
  localparam int MAT_BASE  = 32'h0100_0000;
  localparam int EXEC_CYC  = 40;   // SD and ND use 10x longer tasks
  localparam real CLK_GHZ  = 3.2;  // assumed clock for the rate check
  int exec_cyc = EXEC_CYC;
  localparam int DMA_LAT   = 6;
  localparam int MEM_LAT   = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------------------------------------------------------- DUT
  logic             ib_valid, ib_ready;
  word_t            ib_ptr;
  logic [7:0]       ib_size;
  word_t            status;
  logic             mem_req, mem_gnt, mem_rvalid;
  word_t            mem_addr, mem_rdata;
  logic             dma_valid [NSPE];
  logic             dma_ready [NSPE];
  logic             dma_get   [NSPE];
  word_t            dma_ea    [NSPE];
  logic [17:0]      dma_ls    [NSPE];
  logic [31:0]      dma_size  [NSPE];
  logic             dma_done  [NSPE];
  logic             exec_start [NSPE];
  logic [23:0]      exec_func  [NSPE];
  logic [TW-1:0]    exec_id    [NSPE];
  logic             exec_buf   [NSPE];
  logic             exec_done  [NSPE];
  logic ev_raw, ev_war, ev_waw, ev_marker, ev_dep_stall, ev_tt_full, ev_rq_full;

  nexus_system dut (.*);

  // ------------------------------------------------------- task program
  int    t_nops [MAXT];
  word_t t_op   [MAXT][4];
  int    preds  [MAXT][$];
  bit    started [MAXT], done [MAXT];
  int    ntasks = 0;
  word_t dmem [int];

  // bookkeeping for the reference dependencies
  int last_writer [word_t];
  int readers [word_t][$];

  function automatic void add_task(input int nops, input word_t a [4], input mode_e m [4]);
    int n = ntasks;
    t_nops[n] = nops;
    dmem[(DESC_BASE >> 2) + n * 8] = {8'(nops), 24'(n)};
    for (int k = 0; k < nops; k++) begin
      t_op[n][k] = a[k] | 32'(m[k]);
      dmem[(DESC_BASE >> 2) + n * 8 + 1 + k] = t_op[n][k];
      if (last_writer.exists(a[k])) preds[n].push_back(last_writer[a[k]]);
      if (is_write(m[k])) begin
        if (readers.exists(a[k])) foreach (readers[a[k]][r]) preds[n].push_back(readers[a[k]][r]);
      end
    end
    for (int k = 0; k < nops; k++) begin
      if (is_write(m[k])) begin
        last_writer[a[k]] = n;
        readers[a[k]] = {};
      end else begin
        readers[a[k]].push_back(n);
      end
    end
    ntasks++;
  endfunction

  function automatic word_t blk(input int i, input int j);
    return MAT_BASE + 32'((i * 64 + j) * 1024);
  endfunction

  function automatic void gen_grid(input int kind);  // 0 CD, 1 SD, 2 ND
    word_t a [4];
    mode_e m [4];
    int    n;
    for (int i = 0; i < GRID; i++)
      for (int j = 0; j < GRID; j++) begin
        n = 0;
        if (kind <= 1 && j > 0) begin a[n] = blk(i, j - 1); m[n] = MODE_IN; n++; end
        if (kind == 0 && i > 0 && j + 1 < GRID) begin a[n] = blk(i - 1, j + 1); m[n] = MODE_IN; n++; end
        a[n] = blk(i, j); m[n] = MODE_INOUT; n++;
        add_task(n, a, m);
      end
  endfunction

  function automatic void gen_mix();
    word_t a [4];
    mode_e m [4];
    int    n, pick;
    bit [7:0] used;
    for (int t = 0; t < NMIX; t++) begin
      n = 1 + int'($urandom_range(0, 2));
      used = '0;
      for (int k = 0; k < n; k++) begin
        do pick = int'($urandom_range(0, 5)); while (used[pick]);
        used[pick] = 1'b1;
        a[k] = MAT_BASE + 32'h0080_0000 + 32'(pick * 1024);
        m[k] = mode_e'($urandom_range(1, 3));
      end
      add_task(n, a, m);
    end
  endfunction

  // ------------------------------------------------------- memory model
  typedef struct { longint due; word_t data; } rsp_t;
  rsp_t mq [$];
  logic gnt_rand;
  always @(posedge clk) gnt_rand <= $urandom_range(0, 3) != 0;
  assign mem_gnt = mem_req && gnt_rand;
  always @(posedge clk) begin
    if (mem_req && mem_gnt) mq.push_back('{cycle + MEM_LAT, dmem.exists(int'(mem_addr >> 2)) ? dmem[int'(mem_addr >> 2)] : 32'h0});
  end
  always_comb begin
    mem_rvalid = mq.size() != 0 && mq[0].due <= cycle;
    mem_rdata  = mem_rvalid ? mq[0].data : '0;
  end
  always @(posedge clk) if (mem_rvalid) void'(mq.pop_front());

  // ------------------------------------------------ DMA and core models
  int  n_dbuf = 0, n_exec = 0, n_ib_full = 0;
  // task retrieval latency, measured while ND keeps the ready queue filled
  bit     nd_phase = 1'b0;
  longint nd_t0 = 0, max_gap = 0;
  int  c_raw = 0, c_war = 0, c_waw = 0, c_marker = 0, c_stall = 0, c_tt_full = 0, c_rq_full = 0;

  for (genvar s = 0; s < NSPE; s++) begin : g_core
    logic [DMA_LAT-1:0] sr;
    int  busy_left;
    int  running;
    word_t got [2][$];   // main-memory addresses fetched into each buffer
    longint last_done;
    assign dma_ready[s] = 1'b1;
    assign dma_done[s]  = sr[DMA_LAT-1];
    always @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        sr <= '0;
        busy_left <= 0;
        running <= -1;
        exec_done[s] <= 1'b0;
        last_done = -1;
      end else begin
        sr <= {sr[DMA_LAT-2:0], dma_valid[s] && dma_ready[s]};
        exec_done[s] <= 1'b0;
        if (dma_valid[s] && dma_get[s] && running >= 0) n_dbuf++;
        if (dma_valid[s] && dma_ready[s] && dma_get[s])
          got[int'(dma_ls[s]) >= 7 * 1024].push_back(dma_ea[s]);
        if (busy_left > 0) begin
          busy_left <= busy_left - 1;
          if (busy_left == 1) begin
            exec_done[s] <= 1'b1;
            done[running] = 1'b1;
            last_done = cycle;
            running <= -1;
          end
        end
        if (exec_start[s]) begin
          automatic int n = int'(exec_func[s]);
          checks++;
          if (n >= ntasks || started[n] || running >= 0) begin
            failures++;
            $display("FAIL: core %0d bad start of task %0d", s, n);
          end else begin
            started[n] = 1'b1;
            begin
              automatic word_t want [$];
              for (int k = 0; k < t_nops[n]; k++)
                if (t_op[n][k][0]) want.push_back({t_op[n][k][31:2], 2'b00});
              checks++;
              if (got[exec_buf[s]] != want) begin
                failures++;
                $display("FAIL: core %0d task %0d inputs fetched do not match its operands", s, n);
              end
            end
            got[exec_buf[s]] = {};
            foreach (preds[n][p]) begin
              checks++;
              if (!done[preds[n][p]]) begin
                failures++;
                $display("FAIL: task %0d started before its predecessor %0d finished", n, preds[n][p]);
              end
            end
          end
          // time from the end of the previous task to the next start
          if (nd_phase && last_done >= nd_t0 && cycle - last_done > max_gap)
            max_gap = cycle - last_done;
          n_exec++;
          running <= n;
          busy_left <= exec_cyc + int'($urandom_range(0, exec_cyc));
        end
      end
    end
  end

  always @(posedge clk) begin
    if (rst_n) begin
      c_raw     += int'(ev_raw);
      c_war     += int'(ev_war);
      c_waw     += int'(ev_waw);
      c_marker  += int'(ev_marker);
      c_stall   += int'(ev_dep_stall);
      c_tt_full += int'(ev_tt_full);
      c_rq_full += int'(ev_rq_full);
      n_ib_full += int'(ib_valid && !ib_ready);
    end
  end

  // ------------------------------------------------------ control core
  longint sub_cycles;
  task automatic submit(input int first, input int last);
    longint ts = cycle;
    // driven after the falling edge, taken at a rising edge with ib_ready
    for (int n = first; n < last; n++) begin
      @(negedge clk);
      ib_valid = 1'b1;
      ib_ptr   = DESC_BASE + 32'(n * 32);
      ib_size  = 8'(1 + t_nops[n]);
      #1;
      while (!ib_ready) begin @(negedge clk); #1; end
      @(posedge clk);
    end
    @(negedge clk);
    ib_valid = 1'b0;
    sub_cycles = cycle - ts;
  endtask

  task automatic wait_empty(input string name, input int first, input int last, input longint t0);
    int ok;
    // status is registered; give it time to reflect the last submission
    repeat (4) @(posedge clk);
    while (!status[28]) @(posedge clk);
    ok = 1;
    for (int n = first; n < last; n++) if (!done[n]) ok = 0;
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s: pool reported empty before all tasks finished", name);
    end
    // Requirement: building the dependency graph must take at most 1.3 us
    // per task to keep 16 cores busy; the TPU takes in one task per
    // sub_cycles/(last-first) cycles (this includes stalls on full tables).
    checks++;
    if (real'(sub_cycles) / real'(last - first) / CLK_GHZ > 1300.0) begin
      failures++;
      $display("FAIL: %s: %0.1f ns per task entered", name, real'(sub_cycles) / real'(last - first) / CLK_GHZ);
    end
    $display("%s: %0d tasks in %0d cycles (%0.1f cycles per task)", name, last - first,
             cycle - t0, real'(cycle - t0) / real'(last - first));
  endtask

  initial begin
    longint t0;
    int first;
    ib_valid = 1'b0; ib_ptr = '0; ib_size = '0;
    gen_grid(0);
    gen_grid(1);
    gen_grid(2);
    gen_mix();
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < 4; w++) begin
      first = w * GRID * GRID;
      t0 = cycle;
      exec_cyc = (w == 1 || w == 2) ? 10 * EXEC_CYC : EXEC_CYC;
      nd_phase = (w == 2);
      nd_t0    = cycle;
      submit(first, (w == 3) ? ntasks : first + GRID * GRID);
      wait_empty(w == 0 ? "CD" : w == 1 ? "SD" : w == 2 ? "ND" : "MIX", first,
                 (w == 3) ? ntasks : first + GRID * GRID, t0);
    end
    // Requirement: a core obtains its next task within 1 us
    $display("ND: longest gap between a task's end and the next start on a core: %0d cycles", max_gap);
    checks++;
    if (real'(max_gap) / CLK_GHZ > 1000.0) begin
      failures++;
      $display("FAIL: task retrieval took %0.1f ns", real'(max_gap) / CLK_GHZ);
    end
    for (int n = 0; n < ntasks; n++) begin
      checks++;
      if (!started[n] || !done[n]) begin
        failures++;
        $display("FAIL: task %0d never ran", n);
      end
    end
    checks++;
    if (n_exec != ntasks) begin
      failures++;
      $display("FAIL: %0d task starts for %0d tasks", n_exec, ntasks);
    end
    $display("mechanisms: raw=%0d war=%0d waw=%0d marker=%0d table_stall=%0d tt_full=%0d rq_full=%0d ib_full=%0d double_buffer=%0d",
             c_raw, c_war, c_waw, c_marker, c_stall, c_tt_full, c_rq_full, n_ib_full, n_dbuf);
    check_seen("read-after-write subscription", c_raw);
    check_seen("write-after-read subscription", c_war);
    check_seen("write-after-write marker", c_waw);
    check_seen("marker reached", c_marker);
    check_seen("dependency table stall", c_stall);
    check_seen("task table full", c_tt_full);
    check_seen("ready queue full", c_rq_full);
    check_seen("in buffer full", n_ib_full);
    check_seen("double buffering", n_dbuf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void check_seen(input string what, input int cnt);
    checks++;
    if (cnt == 0) begin
      failures++;
      $display("FAIL: mechanism never occurred: %s", what);
    end
  endfunction

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
