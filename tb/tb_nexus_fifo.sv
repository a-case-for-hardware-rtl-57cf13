// tb_nexus_fifo: self-checking test of the queue used for the in buffer,
// ready queue and finish buffer. Random pushes and pops (including pushes
// into a full queue while it is being read) are compared with a reference
// queue; the fill count, the full condition and the first-word latency of
// one cycle are checked as well.
module tb_nexus_fifo;
  localparam int W = 12, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [$clog2(D+1)-1:0] count;
  nexus_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  logic [W-1:0] model [$];
  int n_full = 0, n_full_push = 0;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // latency: a word pushed is visible in the next cycle
    in_valid <= 1; in_data <= 12'h5a5;
    @(posedge clk); model.push_back(12'h5a5);
    in_valid <= 0;
    #1 check(out_valid && out_data == 12'h5a5 && count == 1, "first word after one cycle");
    for (int c = 0; c < 4000; c++) begin
      // phases: fill up, drain, random
      int ph = (c / 250) % 3;
      in_valid  <= (ph == 0) ? ($urandom_range(0, 9) < 9) : (ph == 1) ? ($urandom_range(0, 9) < 1) : $urandom_range(0, 1);
      out_ready <= (ph == 0) ? ($urandom_range(0, 9) < 1) : (ph == 1) ? ($urandom_range(0, 9) < 9) : $urandom_range(0, 1);
      in_data   <= W'($urandom);
      #1;
      check(count == model.size(), "count matches");
      check(out_valid == (model.size() != 0), "out_valid");
      check(in_ready == (model.size() < D || out_ready), "in_ready");
      if (model.size() != 0) check(out_data == model[0], "data order");
      if (model.size() == D) n_full++;
      if (model.size() == D && in_valid && out_ready) n_full_push++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    check(n_full > 0 && n_full_push > 0, "queue became full and was pushed while read");
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
