// tb_nexus_task_ctrl: test of one Task Controller with models of its
// surroundings: a ready queue of random tasks whose descriptors sit in a
// task-storage model (random grant), a DMA engine that accepts commands
// with random back-pressure and completes them in order after a random
// delay, a worker core that runs each task for a random time, and a finish
// buffer with random back-pressure. Expected values are worked out here
// from the descriptors: the list of gets (inputs and inouts) and of puts
// (outputs and inouts), each with its main-memory address, local-store
// address (task n uses buffer n mod 2) and size. Checked: every DMA
// command, the function, id and buffer of every start, that a task starts
// only when all its gets have completed, that its puts are issued only
// after the core finished it, that its id reaches the finish buffer only
// after all its puts completed, and the order of starts and finishes.
// Double buffering must be seen: gets of one task issued while the
// previous one executes.
module tb_nexus_task_ctrl;
  import nexus_pkg::*;
  localparam int NT = 16, DW = 8, TW = 4, SW = 7, OPB = 1024, LSW = 18, NTASK = 200;
  localparam int MAXO = DW - 1;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic rq_valid, rq_ready, ts_req, ts_gnt, dma_valid, dma_ready, dma_get, dma_done;
  logic [TW-1:0] rq_id, exec_id, fb_id;
  logic [SW-1:0] rq_desc, ts_addr;
  word_t ts_data, dma_ea;
  logic [LSW-1:0] dma_ls;
  logic [31:0] dma_size;
  logic exec_start, exec_buf, exec_done, fb_valid, fb_ready;
  logic [23:0] exec_func;

  nexus_task_ctrl #(.NUM_TASKS(NT), .DESC_WORDS(DW), .OP_BYTES(OPB), .LS_AW(LSW)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  word_t store [NT * DW];
  assign ts_data = store[ts_addr];

  typedef struct { int task_n; bit get; word_t ea; int ls; } dcmd_t;
  dcmd_t exp_get [$], exp_put [$];
  int    n_get [NTASK], n_put [NTASK], done_get [NTASK], done_put [NTASK];
  bit    ran [NTASK];
  int    pushed = 0, started = 0, finished = 0, overlap = 0;

  // build task n's descriptor in slot n mod NT
  task automatic make_task(input int n);
    int id = n % NT;
    int nops = $urandom_range(0, MAXO);
    store[id * DW] = {8'(nops), 24'(n)};
    n_get[n] = 0; n_put[n] = 0;
    for (int k = 1; k <= MAXO; k++) begin
      word_t w = {$urandom_range(0, 32'h3FFF_FFFF), 2'($urandom_range(1, 3))};
      dcmd_t c;
      store[id * DW + k] = w;
      c.task_n = n; c.ea = {w[31:2], 2'b00};
      c.ls = (n % 2) * MAXO * OPB + (k - 1) * OPB;
      if (k <= nops && w[0]) begin c.get = 1; exp_get.push_back(c); n_get[n]++; end
      if (k <= nops && w[1]) begin c.get = 0; exp_put.push_back(c); n_put[n]++; end
    end
  endtask

  // ready queue model
  always @(negedge clk) begin
    if (rst_n && !(rq_valid) && pushed < NTASK && $urandom_range(0, 2) == 0) begin
      make_task(pushed);
      rq_id = TW'(pushed % NT); rq_desc = SW'((pushed % NT) * DW); rq_valid = 1'b1;
    end
    ts_gnt    = $urandom_range(0, 2) != 0;
    dma_ready = $urandom_range(0, 3) != 0;
    fb_ready  = $urandom_range(0, 3) != 0;
  end
  always @(posedge clk) if (rst_n && rq_valid && rq_ready) begin
    pushed++;
    #1 rq_valid = 1'b0;
  end

  // DMA engine model: in-order completion 2..12 cycles after acceptance
  dcmd_t inflight [$];
  int    due [$];
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) begin
    dma_done = 1'b0;
    if (due.size() > 0 && due[0] <= cyc) begin
      dma_done = 1'b1;
      if (inflight[0].get) done_get[inflight[0].task_n]++;
      else                 done_put[inflight[0].task_n]++;
      void'(inflight.pop_front()); void'(due.pop_front());
    end
  end

  // core model
  int run_left = 0, run_task = -1;
  always @(negedge clk) begin
    exec_done = 1'b0;
    if (run_left > 0) begin
      run_left--;
      if (run_left == 0) begin exec_done = 1'b1; ran[run_task] = 1; end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (dma_valid && dma_ready) begin
      dcmd_t e;
      check(dma_size == OPB, "dma size");
      if (dma_get) begin
        check(exp_get.size() > 0, "unexpected get");
        e = exp_get.pop_front();
        if (run_left > 0 && e.task_n == run_task + 1) overlap++;
      end else begin
        check(exp_put.size() > 0, "unexpected put");
        e = exp_put.pop_front();
        check(ran[e.task_n], "put only after the task ran");
      end
      check(dma_ea == e.ea, $sformatf("dma ea task %0d", e.task_n));
      check(int'(dma_ls) == e.ls, $sformatf("dma ls %0d exp %0d", dma_ls, e.ls));
      e.get = dma_get;
      inflight.push_back(e);
      due.push_back(cyc + $urandom_range(2, 12));
    end
    if (exec_start) begin
      check(run_left == 0, "start while the core is busy");
      check(int'(exec_id) == started % NT, "start order");
      check(int'(exec_func) == started, "start function");
      check(exec_buf == 1'(started % 2), "start buffer");
      check(done_get[started] == n_get[started], "start after all gets completed");
      run_task = started; started++;
      run_left = $urandom_range(1, 40);
    end
    if (fb_valid && fb_ready) begin
      check(int'(fb_id) == finished % NT, "finish order");
      check(ran[finished] && done_put[finished] == n_put[finished],
            "finish after all puts completed");
      finished++;
    end
  end

  initial begin
    rq_valid = 1'b0;
    foreach (store[i]) store[i] = '0;
    foreach (done_get[i]) begin done_get[i] = 0; done_put[i] = 0; ran[i] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (finished == NTASK);
    repeat (5) @(posedge clk);
    check(exp_get.size() == 0 && exp_put.size() == 0, "all transfers seen");
    check(overlap > 0, "double buffering: gets during execution");
    $display("tasks %0d, gets overlapped with execution %0d", finished, overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
