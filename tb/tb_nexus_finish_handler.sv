// tb_nexus_finish_handler: test of the finish handler on its own.
// The testbench fills a model of the task storage with random descriptors
// (0 to 9 operands, some with mode 0, which is skipped; counts above the
// slot are cut), offers finished task ids as the finish buffer would and
// accepts the handler's commands with random back-pressure. The expected
// command list is built here from each descriptor: FIN_IN for an input,
// FIN_OUT for an output or inout, in operand order. Checked: fin_en comes
// exactly with the pop of the finish buffer, every command and address,
// and free_en for the same id once all commands are taken, and not before.
module tb_nexus_finish_handler;
  import nexus_pkg::*;
  localparam int NT = 16, DW = 8, TW = 4, SW = 7, NTASK = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic fb_valid, fb_ready, cmd_valid, cmd_ready, fin_en, free_en;
  logic [TW-1:0] fb_id, fin_id, free_id;
  logic [SW-1:0] st_addr;
  word_t st_data, cmd_addr;
  cmd_e cmd_op;

  nexus_finish_handler #(.NUM_TASKS(NT), .DESC_WORDS(DW)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  word_t store [NT * DW];
  assign st_data = store[st_addr];

  cmd_e  exp_op   [$];
  word_t exp_addr [$];
  logic [TW-1:0] cur_id;
  int    sent = 0, done = 0, busy = 0, cmds = 0;

  task automatic make_desc(input logic [TW-1:0] id);
    int n = $urandom_range(0, 9);
    int nk = (n > DW - 1) ? DW - 1 : n;
    store[int'(id) * DW] = {8'(n), 24'($urandom)};
    for (int k = 1; k < DW; k++) begin
      word_t w = {$urandom_range(0, 32'h3FFF_FFFF), 2'($urandom_range(0, 3))};
      if ($urandom_range(0, 5) == 0) w[1:0] = 2'd0;
      store[int'(id) * DW + k] = w;
      if (k <= nk && w[1:0] != 2'd0) begin
        exp_op.push_back(w[1] ? CMD_FIN_OUT : CMD_FIN_IN);
        exp_addr.push_back({w[31:2], 2'b00});
      end
    end
  endtask

  always @(negedge clk) begin
    cmd_ready = $urandom_range(0, 2) != 0;
    if (rst_n && !busy && sent < NTASK && $urandom_range(0, 1)) begin
      fb_id = TW'($urandom_range(0, NT - 1));
      make_desc(fb_id);
      fb_valid = 1'b1;
    end else if (!(fb_valid && !fb_ready)) fb_valid = 1'b0;
  end

  always @(posedge clk) if (rst_n) begin
    check(fin_en == (fb_valid && fb_ready), "fin_en with pop");
    if (fin_en) check(fin_id == fb_id, "fin id");
    if (fb_valid && fb_ready) begin busy = 1; sent++; cur_id = fb_id; end
    if (cmd_valid) begin
      check(exp_op.size() > 0, "unexpected command");
      if (exp_op.size() > 0) begin
        check(cmd_op == exp_op[0], "command op");
        check(cmd_addr == exp_addr[0], "command address");
        if (cmd_ready) begin
          void'(exp_op.pop_front()); void'(exp_addr.pop_front()); cmds++;
        end
      end
    end
    if (free_en) begin
      check(busy == 1 && exp_op.size() == 0, "free after all commands");
      check(free_id == cur_id, "free id");
      busy = 0; done++;
    end
  end

  initial begin
    fb_valid = 1'b0;
    foreach (store[i]) store[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done == NTASK);
    repeat (5) @(posedge clk);
    check(exp_op.size() == 0, "all commands seen");
    $display("tasks %0d, commands %0d", done, cmds);
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
