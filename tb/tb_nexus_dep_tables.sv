// tb_nexus_dep_tables: test of the producers and consumers tables on their
// own. The testbench acts as descriptor handler, finish handler and task
// table: it enters a random program of tasks over a few shared addresses
// (ADD_IN / ADD_OUT per operand, then RELEASE), keeps every task's
// dependency count from the inc/dec outputs, treats a task whose count is
// zero as ready, "runs" ready tasks in random order and reports them
// finished with FIN_IN / FIN_OUT. The predecessors of every task are worked
// out independently from program order (last writer of each operand; for a
// written operand also the readers since then). Checked: no task becomes
// ready before all its predecessors finished, every task becomes ready,
// each count stays non-negative, and a small directed case gives the exact
// counts for read-after-write, write-after-read and write-after-write. The
// small tables (two sets of four entries) also force full sets.
module tb_nexus_dep_tables;
  import nexus_pkg::*;
  localparam int NT = 16, TW = 4, NPROG = 400, NADDR = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic h_valid, h_ready, f_valid, f_ready;
  cmd_e h_op, f_op;
  logic [TW-1:0] h_id;
  word_t h_addr, f_addr;
  logic inc_en, dec_en, dec_ready, busy;
  logic [TW-1:0] inc_id, dec_id;
  logic [1:0] inc_amt;
  logic ev_raw, ev_war, ev_waw, ev_marker, ev_stall;
  nexus_dep_tables #(.NUM_TASKS(NT), .P_ENTRIES(8), .C_ENTRIES(8), .WAYS(4), .KO_LEN(4)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // program
  int    p_nops [NPROG];
  word_t p_addr [NPROG][3];
  mode_e p_mode [NPROG][3];
  int    preds  [NPROG][$];
  bit    fin [NPROG], rdy [NPROG];
  int    id_task [NT];          // task currently holding an id, -1 if none
  int    cnt [NT];
  int    ready_q [$];

  function automatic void gen();
    int lw [NADDR];
    int rd [NADDR][$];
    foreach (lw[a]) lw[a] = -1;
    for (int n = 0; n < NPROG; n++) begin
      bit [NADDR-1:0] used = '0;
      p_nops[n] = $urandom_range(1, 3);
      for (int k = 0; k < p_nops[n]; k++) begin
        int a;
        do a = $urandom_range(0, NADDR - 1); while (used[a]);
        used[a] = 1;
        // addresses spread over a wide range; the small table makes them collide
        p_addr[n][k] = 32'h4000_0000 + 32'(a) * 32'h0001_0400;
        p_mode[n][k] = mode_e'($urandom_range(1, 3));
        if (lw[a] >= 0) preds[n].push_back(lw[a]);
        if (is_write(p_mode[n][k])) foreach (rd[a][r]) preds[n].push_back(rd[a][r]);
      end
      for (int k = 0; k < p_nops[n]; k++) begin
        int a = int'((p_addr[n][k] - 32'h4000_0000) / 32'h0001_0400);
        if (is_write(p_mode[n][k])) begin lw[a] = n; rd[a] = {}; end
        else rd[a].push_back(n);
      end
    end
  endfunction

  // dependency counts, kept from the unit's outputs
  int c_raw = 0, c_war = 0, c_waw = 0, c_marker = 0, c_stall = 0, c_dec_wait = 0;
  bit directed = 1;   // directed phase: no program task behind the ids
  always @(posedge clk) if (rst_n) begin
    if (inc_en) cnt[inc_id] += int'(inc_amt);
    if (dec_en && dec_ready) begin
      automatic int t = id_task[dec_id];
      cnt[dec_id]--;
      checks++;
      if (t < 0 || cnt[dec_id] < 0) begin
        failures++;
        $display("FAIL: decrement of idle id %0d or below zero", dec_id);
      end else if (cnt[dec_id] == 0 && !directed) begin
        rdy[t] = 1;
        ready_q.push_back(t);
        foreach (preds[t][p]) begin
          checks++;
          if (!fin[preds[t][p]]) begin
            failures++;
            $display("FAIL: task %0d ready before predecessor %0d finished", t, preds[t][p]);
          end
        end
      end
    end
    c_raw += int'(ev_raw); c_war += int'(ev_war); c_waw += int'(ev_waw);
    c_marker += int'(ev_marker); c_stall += int'(ev_stall);
    c_dec_wait += int'(dec_en && !dec_ready);
  end

  always @(posedge clk) dec_ready <= $urandom_range(0, 7) != 0;

  // Commands are driven after the falling edge; a command is taken at the
  // rising edge at which h_ready / f_ready is high.
  task automatic add_cmd(input cmd_e op, input int id, input word_t a);
    @(negedge clk);
    h_valid = 1; h_op = op; h_id = TW'(id); h_addr = a;
    #1;
    while (!h_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    h_valid = 0;
  endtask

  task automatic fin_cmd(input cmd_e op, input word_t a);
    @(negedge clk);
    f_valid = 1; f_op = op; f_addr = a;
    #1;
    while (!f_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    f_valid = 0;
  endtask

  bit adding_done = 0;
  int n_finished = 0;

  initial begin
    h_valid = 0; f_valid = 0; h_op = CMD_RELEASE; f_op = CMD_FIN_IN; h_id = 0; h_addr = 0; f_addr = 0;
    foreach (id_task[i]) id_task[i] = -1;
    gen();
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);

    // directed: T0 writes A, T1 reads A (RAW), T2 writes A (WAW + WAR)
    id_task[0] = 0; id_task[1] = 1; id_task[2] = 2;
    cnt[0] = 1; cnt[1] = 1; cnt[2] = 1;
    begin
      int r0, w0, m0;
      r0 = c_raw; w0 = c_war; m0 = c_waw;
      add_cmd(CMD_ADD_OUT, 0, 32'h7000_0000);
      add_cmd(CMD_ADD_IN,  1, 32'h7000_0000);
      add_cmd(CMD_ADD_OUT, 2, 32'h7000_0000);
      @(posedge clk);
      check(cnt[0] == 1 && cnt[1] == 2 && cnt[2] == 3, "directed counts 1/2/3");
      check(c_raw == r0 + 1 && c_war == w0 + 1 && c_waw == m0 + 1, "one RAW, WAR and WAW event");
      add_cmd(CMD_RELEASE, 0, 0); add_cmd(CMD_RELEASE, 1, 0); add_cmd(CMD_RELEASE, 2, 0);
      repeat (2) @(posedge clk);
      check(cnt[0] == 0 && cnt[1] == 1 && cnt[2] == 2, "after release only the writer is ready");
      fin_cmd(CMD_FIN_OUT, 32'h7000_0000);   // T0 done: T1 kicked, marker T2 reached
      repeat (6) @(posedge clk);
      check(cnt[1] == 0 && cnt[2] == 1, "writer done: reader ready, second writer waits for it");
      fin_cmd(CMD_FIN_IN, 32'h7000_0000);    // T1 done: T2 kicked from consumers list
      repeat (6) @(posedge clk);
      check(cnt[2] == 0, "reader done: second writer ready");
      fin_cmd(CMD_FIN_OUT, 32'h7000_0000);
      repeat (6) @(posedge clk);
      check(!busy, "tables idle");
      directed = 0;
      id_task[0] = -1; id_task[1] = -1; id_task[2] = -1;
    end

    fork
      // descriptor handler: enter tasks in program order
      begin
        for (int n = 0; n < NPROG; n++) begin
          automatic int id = n % NT;
          while (id_task[id] >= 0) @(negedge clk);
          id_task[id] = n;
          cnt[id] = 1;
          for (int k = 0; k < p_nops[n]; k++)
            add_cmd(is_write(p_mode[n][k]) ? CMD_ADD_OUT : CMD_ADD_IN, id, p_addr[n][k]);
          add_cmd(CMD_RELEASE, id, 0);
        end
        adding_done = 1;
      end
      // cores and finish handler: finish ready tasks in random order
      begin
        while (n_finished < NPROG) begin
          if (ready_q.size() != 0) begin
            automatic int pick = $urandom_range(0, ready_q.size() - 1);
            automatic int t = ready_q[pick];
            ready_q.delete(pick);
            // tasks stay pending for a while, so later tasks queue up behind them
            repeat ($urandom_range(0, 24)) @(negedge clk);
            fin[t] = 1;
            for (int k = 0; k < p_nops[t]; k++)
              fin_cmd(is_write(p_mode[t][k]) ? CMD_FIN_OUT : CMD_FIN_IN, p_addr[t][k]);
            @(negedge clk);
            while (busy) @(negedge clk);
            id_task[t % NT] = -1;
            n_finished++;
          end else @(negedge clk);
        end
      end
    join

    for (int n = 0; n < NPROG; n++) check(rdy[n] && fin[n], "every task ready and finished");
    $display("events: raw=%0d war=%0d waw=%0d marker=%0d stall=%0d dec_wait=%0d",
             c_raw, c_war, c_waw, c_marker, c_stall, c_dec_wait);
    check(c_raw > 0 && c_war > 0 && c_waw > 0 && c_marker > 0 && c_stall > 0 && c_dec_wait > 0,
          "every mechanism occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
