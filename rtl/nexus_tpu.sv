// nexus_tpu: Task Pool Unit, the central unit of the Nexus task manager.
//
// The control core writes, for every task in program order, a pointer to its
// descriptor and the descriptor's size into the in buffer. The unit then
// runs the life cycle of the task without software:
//   descriptor loader   copies the descriptor from main memory into the task
//                       storage and claims a task-table entry
//   descriptor handler  enters the operands into the producers and consumers
//                       tables, which yields the task's dependency count
//   task table          pushes the task into the ready queue once its count
//                       is zero
//   ready queue         read by the cores (or their task controllers); a
//                       read returns the task id and descriptor pointer
//   finish buffer       the cores write the id of each finished task here
//   finish handler      releases the dependent tasks and removes the task
// The stages are decoupled by the queues and run concurrently; full tables
// and queues stall the stage in front of them. The cores read descriptors
// from the task storage through the ts_* port and can poll the status
// register. Memory-mapped addressing on a bus is left to the bus interface
// around this unit: each resource appears here as its own port.
//
// Ports: ib_* (push, valid/ready), mem_* (descriptor reads, see
// nexus_desc_loader), rq_* (pop, valid/ready), fb_* (push, valid/ready),
// ts_addr/ts_data (combinational read), status, and event pulses ev_* for
// observing the dependency mechanisms.
// The blocks and their connections follow the document's block diagram of
// the unit; the port protocols, the sizes and the status word layout are
// this design's own.
module nexus_tpu #(
  parameter int unsigned NUM_TASKS  = 1024,
  parameter int unsigned DESC_WORDS = 8,
  parameter int unsigned IB_DEPTH   = 16,
  parameter int unsigned RQ_DEPTH   = 16,
  parameter int unsigned FB_DEPTH   = 16,
  parameter int unsigned P_ENTRIES  = 2048,
  parameter int unsigned C_ENTRIES  = 2048,
  parameter int unsigned WAYS       = 8,
  parameter int unsigned KO_LEN     = 4,
  parameter int unsigned SIZE_W     = 8,
  localparam int unsigned TW = $clog2(NUM_TASKS),
  localparam int unsigned SW = $clog2(NUM_TASKS * DESC_WORDS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // in buffer, written by the control core
  input  logic              ib_valid,
  output logic              ib_ready,
  input  nexus_pkg::word_t  ib_ptr,
  input  logic [SIZE_W-1:0] ib_size,
  // main memory read port of the descriptor loader
  output logic              mem_req,
  output nexus_pkg::word_t  mem_addr,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  nexus_pkg::word_t  mem_rdata,
  // ready queue, read by the cores
  output logic              rq_valid,
  input  logic              rq_ready,
  output logic [TW-1:0]     rq_id,
  output logic [SW-1:0]     rq_desc,
  // finish buffer, written by the cores
  input  logic              fb_valid,
  output logic              fb_ready,
  input  logic [TW-1:0]     fb_id,
  // task storage read port for the cores
  input  logic [SW-1:0]     ts_addr,
  output nexus_pkg::word_t  ts_data,
  // status register
  output nexus_pkg::word_t  status,
  // mechanism events
  output logic              ev_raw,
  output logic              ev_war,
  output logic              ev_waw,
  output logic              ev_marker,
  output logic              ev_dep_stall,
  output logic              ev_tt_full,
  output logic              ev_rq_full
);
  import nexus_pkg::*;

  // in buffer
  logic                     ib_o_valid, ib_o_ready;
  logic [WORD_W+SIZE_W-1:0] ib_o_data;
  logic [$clog2(IB_DEPTH+1)-1:0] ib_count;
  nexus_fifo #(.WIDTH(WORD_W + SIZE_W), .DEPTH(IB_DEPTH)) u_in_buffer (
    .clk, .rst_n,
    .in_valid(ib_valid), .in_ready(ib_ready), .in_data({ib_ptr, ib_size}),
    .out_valid(ib_o_valid), .out_ready(ib_o_ready), .out_data(ib_o_data),
    .count(ib_count));

  // task table
  logic          alloc_avail, alloc_en;
  logic [TW-1:0] alloc_id;
  logic          inc_en, dec_en, dec_ready;
  logic [TW-1:0] inc_id, dec_id;
  logic [1:0]    inc_amt;
  logic          handled_en, fin_en, free_en;
  logic [TW-1:0] handled_id, fin_id, free_id;
  logic          rq_i_valid, rq_i_ready;
  logic [TW+SW-1:0] rq_i_data, rq_o_data;
  logic [TW:0]   tt_used;
  nexus_task_table #(.NUM_TASKS(NUM_TASKS), .DESC_WORDS(DESC_WORDS)) u_task_table (
    .clk, .rst_n,
    .alloc_avail, .alloc_id, .alloc_en,
    .inc_en, .inc_id, .inc_amt,
    .dec_en, .dec_id, .dec_ready,
    .handled_en, .handled_id,
    .run_en(rq_valid && rq_ready), .run_id(rq_id),
    .fin_en, .fin_id, .free_en, .free_id,
    .rq_valid(rq_i_valid), .rq_ready(rq_i_ready), .rq_data(rq_i_data),
    .used_count(tt_used));

  // task storage
  logic          st_wr_en;
  logic [SW-1:0] st_wr_addr, hd_addr, fh_addr;
  word_t         st_wr_data, hd_data, fh_data;
  nexus_task_storage #(.NUM_TASKS(NUM_TASKS), .DESC_WORDS(DESC_WORDS)) u_task_storage (
    .clk, .wr_en(st_wr_en), .wr_addr(st_wr_addr), .wr_data(st_wr_data),
    .hd_addr, .hd_data, .fh_addr, .fh_data, .ext_addr(ts_addr), .ext_data(ts_data));

  // descriptor loader
  logic          ld_valid, ld_ready;
  logic [TW-1:0] ld_id;
  nexus_desc_loader #(.NUM_TASKS(NUM_TASKS), .DESC_WORDS(DESC_WORDS), .SIZE_W(SIZE_W)) u_loader (
    .clk, .rst_n,
    .ib_valid(ib_o_valid), .ib_ready(ib_o_ready),
    .ib_ptr(ib_o_data[WORD_W+SIZE_W-1:SIZE_W]), .ib_size(ib_o_data[SIZE_W-1:0]),
    .alloc_avail, .alloc_id, .alloc_en,
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .st_wr_en, .st_wr_addr, .st_wr_data,
    .out_valid(ld_valid), .out_ready(ld_ready), .out_id(ld_id));

  // descriptor handler
  logic          h_valid, h_ready;
  cmd_e          h_op;
  logic [TW-1:0] h_id;
  word_t         h_addr;
  nexus_desc_handler #(.NUM_TASKS(NUM_TASKS), .DESC_WORDS(DESC_WORDS)) u_handler (
    .clk, .rst_n,
    .in_valid(ld_valid), .in_ready(ld_ready), .in_id(ld_id),
    .st_addr(hd_addr), .st_data(hd_data),
    .cmd_valid(h_valid), .cmd_ready(h_ready), .cmd_op(h_op), .cmd_id(h_id), .cmd_addr(h_addr),
    .handled_en, .handled_id);

  // finish buffer
  logic          fb_o_valid, fb_o_ready;
  logic [TW-1:0] fb_o_id;
  nexus_fifo #(.WIDTH(TW), .DEPTH(FB_DEPTH)) u_finish_buffer (
    .clk, .rst_n,
    .in_valid(fb_valid), .in_ready(fb_ready), .in_data(fb_id),
    .out_valid(fb_o_valid), .out_ready(fb_o_ready), .out_data(fb_o_id),
    .count());

  // finish handler
  logic  f_valid, f_ready;
  cmd_e  f_op;
  word_t f_addr;
  nexus_finish_handler #(.NUM_TASKS(NUM_TASKS), .DESC_WORDS(DESC_WORDS)) u_finish_handler (
    .clk, .rst_n,
    .fb_valid(fb_o_valid), .fb_ready(fb_o_ready), .fb_id(fb_o_id),
    .st_addr(fh_addr), .st_data(fh_data),
    .cmd_valid(f_valid), .cmd_ready(f_ready), .cmd_op(f_op), .cmd_addr(f_addr),
    .fin_en, .fin_id, .free_en, .free_id);

  // producers and consumers tables
  logic deps_busy;
  nexus_dep_tables #(.NUM_TASKS(NUM_TASKS), .P_ENTRIES(P_ENTRIES), .C_ENTRIES(C_ENTRIES), .WAYS(WAYS),
                     .KO_LEN(KO_LEN)) u_dep_tables (
    .clk, .rst_n,
    .h_valid, .h_ready, .h_op, .h_id, .h_addr,
    .f_valid, .f_ready, .f_op, .f_addr,
    .inc_en, .inc_id, .inc_amt, .dec_en, .dec_id, .dec_ready,
    .busy(deps_busy), .ev_raw, .ev_war, .ev_waw, .ev_marker, .ev_stall(ev_dep_stall));

  // ready queue
  logic [$clog2(RQ_DEPTH+1)-1:0] rq_count;
  nexus_fifo #(.WIDTH(TW + SW), .DEPTH(RQ_DEPTH)) u_ready_queue (
    .clk, .rst_n,
    .in_valid(rq_i_valid), .in_ready(rq_i_ready), .in_data(rq_i_data),
    .out_valid(rq_valid), .out_ready(rq_ready), .out_data(rq_o_data),
    .count(rq_count));
  assign rq_id   = rq_o_data[TW+SW-1:SW];
  assign rq_desc = rq_o_data[SW-1:0];

  // status register
  nexus_status_reg #(.IB_CW($bits(ib_count)), .RQ_CW($bits(rq_count)), .TT_CW($bits(tt_used)))
    u_status (
    .clk, .rst_n, .ib_count, .ib_full(!ib_ready), .rq_count, .tt_used,
    .tt_full(!alloc_avail), .fb_full(!fb_ready), .deps_busy, .status);

  assign ev_tt_full = ib_o_valid && !alloc_avail;
  assign ev_rq_full = !rq_i_ready;   // full and not being read
endmodule
