// tb_nexus_desc_loader: test of the descriptor loader on its own.
// The testbench offers random (pointer, size) pairs, including size 0 and
// sizes above the slot size, grants task ids at random moments, answers
// memory reads from a model whose word at byte address a is a fixed
// function of a, with random grant delay and random read latency (in
// order), and takes the handler output with random back-pressure.
// Checked against values worked out here: the memory addresses asked for,
// the task-storage address and data of every written word, the number of
// words written, the id handed on and that a task is handed on only after
// all its words are stored.
module tb_nexus_desc_loader;
  import nexus_pkg::*;
  localparam int NT = 16, DW = 8, TW = 4, SW = 7, NDESC = 300;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ib_valid, ib_ready, alloc_avail, alloc_en, mem_req, mem_gnt, mem_rvalid;
  word_t ib_ptr, mem_addr, mem_rdata, st_wr_data;
  logic [7:0] ib_size;
  logic [TW-1:0] alloc_id, out_id;
  logic st_wr_en, out_valid, out_ready;
  logic [SW-1:0] st_wr_addr;

  nexus_desc_loader #(.NUM_TASKS(NT), .DESC_WORDS(DW)) dut (.*);

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic word_t mem_word(input word_t a);
    return (a * 32'h0101_0007) ^ 32'hC3A5_5A3C;
  endfunction

  // memory model: accepted requests come back after 1..4 cycles, in order
  word_t pend_a [$];
  int    pend_t [$];
  int    cyc = 0;
  always_ff @(posedge clk) cyc <= cyc + 1;
  logic gnt_r;
  always_ff @(posedge clk) gnt_r <= ($urandom_range(0, 3) != 0);
  assign mem_gnt = gnt_r;
  always @(posedge clk) if (rst_n && mem_req && mem_gnt) begin
    pend_a.push_back(mem_addr);
    pend_t.push_back(cyc + $urandom_range(1, 4));
  end
  always @(negedge clk) begin
    mem_rvalid = 1'b0;
    mem_rdata  = '0;
    if (pend_t.size() > 0 && pend_t[0] <= cyc) begin
      mem_rvalid = 1'b1;
      mem_rdata  = mem_word(pend_a[0]);
      void'(pend_a.pop_front());
      void'(pend_t.pop_front());
    end
  end

  // expected descriptors
  word_t d_ptr [NDESC];
  int    d_sz  [NDESC];
  int    d_n   [NDESC];
  int    cur = -1, wr_k = 0, req_k = 0, taken = 0, handed = 0;
  logic [TW-1:0] cur_id;

  initial begin
    for (int i = 0; i < NDESC; i++) begin
      d_ptr[i] = {$urandom_range(0, 32'h3FFF_FFFF), 2'b00};
      d_sz[i]  = (i == 0) ? 0 : (i == 1) ? 11 : $urandom_range(0, 11);
      // size 0 is read as one word, sizes above the slot are cut
      d_n[i]   = (d_sz[i] == 0) ? 1 : (d_sz[i] > DW ? DW : d_sz[i]);
    end
  end

  int next_in = 0;
  // drive inputs after the falling edge
  always @(negedge clk) begin
    ib_valid    = rst_n && next_in < NDESC && $urandom_range(0, 3) != 0;
    ib_ptr      = (next_in < NDESC) ? d_ptr[next_in] : '0;
    ib_size     = (next_in < NDESC) ? 8'(d_sz[next_in]) : '0;
    alloc_avail = $urandom_range(0, 4) != 0;
    alloc_id    = TW'($urandom_range(0, NT - 1));
    out_ready   = $urandom_range(0, 2) != 0;
  end

  // sample before the rising edge
  always @(posedge clk) if (rst_n) begin
    if (ib_valid && ib_ready) begin
      check(alloc_en, "alloc_en with in-buffer pop");
      check(cur == -1 || handed == cur + 1, "new descriptor only after hand-off");
      cur = next_in; next_in++; cur_id = alloc_id; wr_k = 0; req_k = 0; taken++;
    end else check(!alloc_en, "alloc_en without pop");
    if (mem_req) begin
      check(cur >= 0 && req_k < d_n[cur], "request count");
      if (cur >= 0) check(mem_addr == d_ptr[cur] + 32'(4 * req_k), "memory address");
      if (mem_gnt) req_k++;
    end
    if (st_wr_en) begin
      check(cur >= 0 && wr_k < d_n[cur], "write count");
      if (cur >= 0) begin
        check(st_wr_addr == SW'(int'(cur_id) * DW + wr_k), "storage address");
        check(st_wr_data == mem_word(d_ptr[cur] + 32'(4 * wr_k)), "storage data");
      end
      wr_k++;
    end
    if (out_valid) begin
      check(cur >= 0 && wr_k == d_n[cur], "hand-off after all words");
      check(out_id == cur_id, "handed id");
      if (out_ready) handed = cur + 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (handed == NDESC);
    repeat (5) @(posedge clk);
    check(taken == NDESC, "all descriptors taken");
    $display("descriptors %0d", handed);
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
