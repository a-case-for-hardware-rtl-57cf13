// tb_nexus_status_reg: drives random fill levels and flags into the status
// register and checks the captured word field by field one cycle later,
// including the saturation of counts above 255 and the "pool empty" bit.
module tb_nexus_status_reg;
  import nexus_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [4:0] ib_count;
  logic [8:0] rq_count;
  logic [6:0] tt_used;
  logic ib_full, tt_full, fb_full, deps_busy;
  word_t status;
  nexus_status_reg #(.IB_CW(5), .RQ_CW(9), .TT_CW(7)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (status %h)", msg, status); end
  endtask

  initial begin
    int empties = 0;
    ib_count = 0; rq_count = 0; tt_used = 0; ib_full = 0; tt_full = 0; fb_full = 0; deps_busy = 0;
    @(posedge clk); #1;
    check(status == 0, "reset value");
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      logic [4:0] ib; logic [8:0] rq; logic [6:0] tt; logic [3:0] fl;
      ib = (i % 7 == 0) ? '0 : 5'($urandom);
      rq = 9'($urandom);
      tt = (i % 5 == 0) ? '0 : 7'($urandom);
      fl = 4'($urandom);
      ib_count <= ib; rq_count <= rq; tt_used <= tt;
      {ib_full, tt_full, fb_full, deps_busy} <= fl;
      @(posedge clk); #1;
      check(status[7:0] == 8'(ib), "in buffer count");
      check(status[15:8] == ((rq > 255) ? 8'hff : rq[7:0]), "ready queue count, saturated");
      check(status[23:16] == 8'(tt), "task table use");
      check(status[27:24] == {fl[0], fl[1], fl[2], fl[3]}, "flags");
      check(status[28] == (ib == 0 && tt == 0), "pool empty");
      check(status[31:29] == 0, "reserved bits");
      if (status[28]) empties++;
    end
    check(empties > 0, "pool empty seen");
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
