// tb_nexus_desc_handler: test of the descriptor handler on its own.
// The testbench fills a model of the task storage with random descriptors
// (0 to 9 operands, some of them with mode 0, which is skipped; counts
// above the slot are cut), hands task ids to the handler and accepts its
// commands with random back-pressure. The expected command list of each
// task is built here from the descriptor: ADD_IN for an input, ADD_OUT for
// an output or inout, in operand order, then RELEASE. Checked: every
// command, its id and address, and that handled_en comes exactly with the
// accepted RELEASE.
module tb_nexus_desc_handler;
  import nexus_pkg::*;
  localparam int NT = 16, DW = 8, TW = 4, SW = 7, NTASK = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, cmd_valid, cmd_ready, handled_en;
  logic [TW-1:0] in_id, cmd_id, handled_id;
  logic [SW-1:0] st_addr;
  word_t st_data, cmd_addr;
  cmd_e cmd_op;

  nexus_desc_handler #(.NUM_TASKS(NT), .DESC_WORDS(DW)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  word_t store [NT * DW];
  assign st_data = store[st_addr];

  cmd_e  exp_op   [$];
  word_t exp_addr [$];
  logic [TW-1:0] cur_id;
  int    sent = 0, done = 0, busy = 0, releases = 0, skipped = 0;

  // write a random descriptor for the next task into slot id and list the
  // commands it must produce
  task automatic make_desc(input logic [TW-1:0] id);
    int n = $urandom_range(0, 9);
    int nk = (n > DW - 1) ? DW - 1 : n;
    store[int'(id) * DW] = {8'(n), 24'($urandom)};
    for (int k = 1; k < DW; k++) begin
      word_t w = {$urandom_range(0, 32'h3FFF_FFFF), 2'($urandom_range(0, 3))};
      if ($urandom_range(0, 5) == 0) w[1:0] = 2'd0;
      store[int'(id) * DW + k] = w;
      if (k <= nk) begin
        if (w[1:0] == 2'd0) skipped++;
        else begin
          exp_op.push_back(w[1] ? CMD_ADD_OUT : CMD_ADD_IN);
          exp_addr.push_back({w[31:2], 2'b00});
        end
      end
    end
    exp_op.push_back(CMD_RELEASE);
    exp_addr.push_back('0);
  endtask

  always @(negedge clk) begin
    cmd_ready = $urandom_range(0, 2) != 0;
    if (rst_n && !busy && sent < NTASK && $urandom_range(0, 1)) begin
      in_id = TW'($urandom_range(0, NT - 1));
      make_desc(in_id);
      in_valid = 1'b1;
    end else if (!(in_valid && !in_ready)) in_valid = 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin busy = 1; sent++; cur_id = in_id; end
    if (cmd_valid) begin
      check(exp_op.size() > 0, "unexpected command");
      if (exp_op.size() > 0) begin
        check(cmd_op == exp_op[0], $sformatf("command op %0d exp %0d", cmd_op, exp_op[0]));
        if (cmd_op != CMD_RELEASE) check(cmd_addr == exp_addr[0], "command address");
        check(cmd_id == cur_id, "command id");
        check(handled_en == (cmd_ready && exp_op[0] == CMD_RELEASE), "handled with release");
        if (cmd_ready) begin
          if (exp_op[0] == CMD_RELEASE) begin busy = 0; done++; releases++;
            check(handled_id == cur_id, "handled id"); end
          void'(exp_op.pop_front()); void'(exp_addr.pop_front());
        end
      end
    end else check(!handled_en, "handled without command");
  end

  initial begin
    in_valid = 1'b0;
    foreach (store[i]) store[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == NTASK);
    repeat (5) @(posedge clk);
    check(exp_op.size() == 0, "all commands seen");
    $display("tasks %0d, skipped operands %0d", releases, skipped);
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
