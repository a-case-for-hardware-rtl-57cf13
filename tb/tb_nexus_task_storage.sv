// tb_nexus_task_storage: fills every word of the descriptor store with a
// value computed from its address, then reads it back through all three
// read ports at random addresses, and checks that a write is visible on the
// next cycle and does not disturb other words.
module tb_nexus_task_storage;
  import nexus_pkg::*;
  localparam int NT = 16, DW = 8, AW = $clog2(NT * DW);
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en;
  logic [AW-1:0] wr_addr, hd_addr, fh_addr, ext_addr;
  word_t wr_data, hd_data, fh_data, ext_data;
  nexus_task_storage #(.NUM_TASKS(NT), .DESC_WORDS(DW)) dut (.*);

  function automatic word_t pattern(input int a, input int gen);
    return word_t'(32'h1234_5678 ^ (a * 32'h0101_0101) ^ (gen << 28));
  endfunction

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    wr_en = 0; wr_addr = 0; wr_data = 0; hd_addr = 0; fh_addr = 0; ext_addr = 0;
    @(posedge clk);
    for (int a = 0; a < NT * DW; a++) begin
      wr_en <= 1; wr_addr <= AW'(a); wr_data <= pattern(a, 0);
      @(posedge clk);
    end
    wr_en <= 0;
    @(posedge clk);
    for (int i = 0; i < 500; i++) begin
      int a, b, c;
      a = $urandom_range(0, NT * DW - 1);
      b = $urandom_range(0, NT * DW - 1);
      c = $urandom_range(0, NT * DW - 1);
      hd_addr <= AW'(a); fh_addr <= AW'(b); ext_addr <= AW'(c);
      @(posedge clk); #1;
      check(hd_data == pattern(a, 0), "handler port");
      check(fh_data == pattern(b, 0), "finish port");
      check(ext_data == pattern(c, 0), "external port");
    end
    // overwrite one slot; its neighbours keep their words
    for (int k = 0; k < DW; k++) begin
      wr_en <= 1; wr_addr <= AW'(3 * DW + k); wr_data <= pattern(3 * DW + k, 1);
      ext_addr <= AW'(3 * DW + k);
      @(posedge clk); #1;
      check(ext_data == pattern(3 * DW + k, 1), "write visible next cycle");
    end
    wr_en <= 0;
    hd_addr <= AW'(2 * DW + DW - 1); fh_addr <= AW'(4 * DW);
    @(posedge clk); #1;
    check(hd_data == pattern(2 * DW + DW - 1, 0) && fh_data == pattern(4 * DW, 0), "neighbours kept");
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
