// nexus_system: the Nexus hardware task manager for a multicore with one
// control core and NUM_SPE worker cores.
//
// One Task Pool Unit (TPU) keeps all tasks, resolves their dependencies and
// queues the ready ones; every worker core has a Task Controller (TC) that
// fetches ready tasks by itself, moves the operands by DMA with double
// buffering and reports finished tasks. Cores thus obtain work by reading a
// hardware queue instead of waiting for a software thread to assign it.
//
// The TPU's ready queue, finish buffer and task-storage read port are
// shared by the TCs through round-robin arbiters; they stand in for the
// on-chip bus, which is outside this design. Everything the design does not
// contain is brought out as ports:
//   ib_*            in-buffer writes of the control core (descriptor pointer,
//                   size in words)
//   status          TPU status register
//   mem_*           main-memory reads of the descriptor loader
//   dma_*[s]        DMA commands of TC s to the DMA engine of core s
//   exec_*[s]       start/done handshake of TC s with core s
//   ev_*            event pulses of the dependency mechanisms
// Per-core ports are unpacked arrays indexed by core number.
//
// From the document: one TPU, one TC per worker core (16 on the Cell
// blade), the task life cycle from in buffer to finish buffer. This
// design's own: the arbiters, the port protocols, and all table sizes.
// Timing: every port acts at the rising clock edge; handshakes are
// valid/ready, and the TPU's latencies are described in its submodules.
module nexus_system #(
  parameter int unsigned NUM_SPE    = 16,
  parameter int unsigned NUM_TASKS  = 1024,
  parameter int unsigned DESC_WORDS = 8,
  parameter int unsigned IB_DEPTH   = 16,
  parameter int unsigned RQ_DEPTH   = 16,
  parameter int unsigned FB_DEPTH   = 16,
  parameter int unsigned P_ENTRIES  = 2048,
  parameter int unsigned C_ENTRIES  = 2048,
  parameter int unsigned WAYS       = 8,
  parameter int unsigned KO_LEN     = 4,
  parameter int unsigned OP_BYTES   = 1024,
  parameter int unsigned LS_AW      = 18,
  localparam int unsigned TW = $clog2(NUM_TASKS),
  localparam int unsigned SI = (NUM_SPE > 1) ? $clog2(NUM_SPE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // control core
  input  logic              ib_valid,
  output logic              ib_ready,
  input  nexus_pkg::word_t  ib_ptr,
  input  logic [7:0]        ib_size,
  output nexus_pkg::word_t  status,
  // main memory, descriptor reads
  output logic              mem_req,
  output nexus_pkg::word_t  mem_addr,
  input  logic              mem_gnt,
  input  logic              mem_rvalid,
  input  nexus_pkg::word_t  mem_rdata,
  // per-core DMA engines
  output logic              dma_valid [NUM_SPE],
  input  logic              dma_ready [NUM_SPE],
  output logic              dma_get   [NUM_SPE],
  output nexus_pkg::word_t  dma_ea    [NUM_SPE],
  output logic [LS_AW-1:0]  dma_ls    [NUM_SPE],
  output logic [31:0]       dma_size  [NUM_SPE],
  input  logic              dma_done  [NUM_SPE],
  // per-core execution
  output logic              exec_start [NUM_SPE],
  output logic [23:0]       exec_func  [NUM_SPE],
  output logic [TW-1:0]     exec_id    [NUM_SPE],
  output logic              exec_buf   [NUM_SPE],
  input  logic              exec_done  [NUM_SPE],
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
  localparam int unsigned SW = $clog2(NUM_TASKS * DESC_WORDS);

  logic          rq_valid, rq_ready;
  logic [TW-1:0] rq_id;
  logic [SW-1:0] rq_desc;
  logic          fb_valid, fb_ready;
  logic [TW-1:0] fb_id;
  logic [SW-1:0] ts_addr;
  word_t         ts_data;

  nexus_tpu #(
    .NUM_TASKS(NUM_TASKS), .DESC_WORDS(DESC_WORDS), .IB_DEPTH(IB_DEPTH),
    .RQ_DEPTH(RQ_DEPTH), .FB_DEPTH(FB_DEPTH), .P_ENTRIES(P_ENTRIES),
    .C_ENTRIES(C_ENTRIES), .WAYS(WAYS), .KO_LEN(KO_LEN), .SIZE_W(8)
  ) u_tpu (
    .clk, .rst_n,
    .ib_valid, .ib_ready, .ib_ptr, .ib_size,
    .mem_req, .mem_addr, .mem_gnt, .mem_rvalid, .mem_rdata,
    .rq_valid, .rq_ready, .rq_id, .rq_desc,
    .fb_valid, .fb_ready, .fb_id,
    .ts_addr, .ts_data, .status,
    .ev_raw, .ev_war, .ev_waw, .ev_marker, .ev_dep_stall, .ev_tt_full, .ev_rq_full);

  // TC side signals
  logic [NUM_SPE-1:0] tc_rq_ready, tc_ts_req, tc_fb_valid;
  logic [SW-1:0]      tc_ts_addr [NUM_SPE];
  logic [TW-1:0]      tc_fb_id   [NUM_SPE];
  logic [NUM_SPE-1:0] rq_gnt, ts_gnt, fb_gnt;
  logic [SI-1:0]      ts_idx, fb_idx;

  nexus_rr_arb #(.N(NUM_SPE)) u_rq_arb (
    .clk, .rst_n, .req(tc_rq_ready), .advance(rq_valid && rq_ready), .gnt(rq_gnt), .gnt_idx());
  nexus_rr_arb #(.N(NUM_SPE)) u_ts_arb (
    .clk, .rst_n, .req(tc_ts_req), .advance(1'b1), .gnt(ts_gnt), .gnt_idx(ts_idx));
  nexus_rr_arb #(.N(NUM_SPE)) u_fb_arb (
    .clk, .rst_n, .req(tc_fb_valid), .advance(fb_ready), .gnt(fb_gnt), .gnt_idx(fb_idx));

  assign rq_ready = |tc_rq_ready;
  assign ts_addr  = tc_ts_addr[ts_idx];
  assign fb_valid = |tc_fb_valid;
  assign fb_id    = tc_fb_id[fb_idx];

  for (genvar s = 0; s < NUM_SPE; s++) begin : g_spe
    nexus_task_ctrl #(
      .NUM_TASKS(NUM_TASKS), .DESC_WORDS(DESC_WORDS), .OP_BYTES(OP_BYTES), .LS_AW(LS_AW)
    ) u_tc (
      .clk, .rst_n,
      .rq_valid(rq_valid && rq_gnt[s]), .rq_ready(tc_rq_ready[s]), .rq_id, .rq_desc,
      .ts_req(tc_ts_req[s]), .ts_addr(tc_ts_addr[s]), .ts_gnt(ts_gnt[s]), .ts_data,
      .dma_valid(dma_valid[s]), .dma_ready(dma_ready[s]), .dma_get(dma_get[s]),
      .dma_ea(dma_ea[s]), .dma_ls(dma_ls[s]), .dma_size(dma_size[s]), .dma_done(dma_done[s]),
      .exec_start(exec_start[s]), .exec_func(exec_func[s]), .exec_id(exec_id[s]),
      .exec_buf(exec_buf[s]), .exec_done(exec_done[s]),
      .fb_valid(tc_fb_valid[s]), .fb_ready(fb_ready && fb_gnt[s]), .fb_id(tc_fb_id[s]));
  end
endmodule
