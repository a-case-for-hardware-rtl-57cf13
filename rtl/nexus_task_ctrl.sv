// nexus_task_ctrl: Task Controller (TC), placed next to one worker core.
//
// The TC takes the work of fetching tasks off the core: it reads a task from
// the ready queue of the Task Pool Unit, copies its descriptor out of the
// task storage, issues the DMA commands that bring the input operands into
// the core's local store, starts the core on the task, issues the DMA
// commands that write the output operands back to main memory when the core
// is done, and finally writes the task id into the finish buffer.
//
// Double buffering: the local store holds two task buffers. While the core
// executes the task in one buffer, the TC already fetches the next task and
// loads its inputs into the other, so the core can start the next task as
// soon as it finishes the current one. Tasks run and retire in the order
// they were read from the ready queue.
//
// Local-store layout (this design's choice): buffer b, operand k starts at
// byte b*(DESC_WORDS-1)*OP_BYTES + (k-1)*OP_BYTES, and every operand moves
// OP_BYTES bytes (a 16x16 block of 32-bit integers by default). Inputs and
// inouts are fetched (get), outputs and inouts are written back (put).
//
// Interfaces (valid/ready unless noted):
//   rq_*    ready queue read: task id and descriptor pointer
//   ts_*    task storage read: ts_req/ts_addr held until ts_gnt; ts_data is
//           valid in the cycle of ts_gnt
//   dma_*   command to the core's DMA engine; dma_done pulses once for every
//           command completed
//   exec_*  exec_start pulses with the function, task id and buffer; the
//           core pulses exec_done when the task has run
//   fb_*    finish buffer write
// The finish id is written only after all puts of the task have completed.
module nexus_task_ctrl #(
  parameter int unsigned NUM_TASKS  = 1024,
  parameter int unsigned DESC_WORDS = 8,
  parameter int unsigned OP_BYTES   = 1024,
  parameter int unsigned LS_AW      = 18,
  localparam int unsigned TW = $clog2(NUM_TASKS),
  localparam int unsigned SW = $clog2(NUM_TASKS * DESC_WORDS),
  localparam int unsigned KW = $clog2(DESC_WORDS + 1),
  localparam int unsigned MAX_OPS = DESC_WORDS - 1,
  localparam int unsigned OI = $clog2(MAX_OPS)
) (
  input  logic               clk,
  input  logic               rst_n,
  // ready queue
  input  logic               rq_valid,
  output logic               rq_ready,
  input  logic [TW-1:0]      rq_id,
  input  logic [SW-1:0]      rq_desc,
  // task storage
  output logic               ts_req,
  output logic [SW-1:0]      ts_addr,
  input  logic               ts_gnt,
  input  nexus_pkg::word_t   ts_data,
  // DMA commands
  output logic               dma_valid,
  input  logic               dma_ready,
  output logic               dma_get,
  output nexus_pkg::word_t   dma_ea,
  output logic [LS_AW-1:0]   dma_ls,
  output logic [31:0]        dma_size,
  input  logic               dma_done,
  // core
  output logic               exec_start,
  output logic [23:0]        exec_func,
  output logic [TW-1:0]      exec_id,
  output logic               exec_buf,
  input  logic               exec_done,
  // finish buffer
  output logic               fb_valid,
  input  logic               fb_ready,
  output logic [TW-1:0]      fb_id
);
  import nexus_pkg::*;

  typedef enum logic [1:0] {B_EMPTY, B_LOADED, B_EXEC, B_DONE} buf_e;
  typedef enum logic [2:0] {M_IDLE, M_HDR, M_OPS, M_GET, M_WAIT_GET, M_PUT, M_WAIT_PUT, M_FIN}
    mstate_e;

  buf_e          bstate [2];
  logic [TW-1:0] bid    [2];
  logic [23:0]   bfunc  [2];
  logic [KW-1:0] bnops  [2];
  word_t         bops   [2][MAX_OPS];

  mstate_e       ms;
  logic          fq, xq, wq;      // next buffer to fill, to execute, to write back
  logic          cur;             // buffer the main FSM works on
  logic [SW-1:0] desc;
  logic [KW-1:0] k;
  logic [7:0]    outstanding;
  logic          spu_busy;

  word_t         op_w;
  mode_e         op_m;
  logic          want;            // operand k moves in the current phase
  assign op_w = bops[cur][OI'(k - 1'b1)];
  assign op_m = op_mode(op_w);
  assign want = (ms == M_GET) ? (op_m == MODE_IN || op_m == MODE_INOUT)
                              : is_write(op_m);

  assign rq_ready = ms == M_IDLE && !(bstate[wq] == B_DONE) && bstate[fq] == B_EMPTY;
  assign ts_req   = ms == M_HDR || ms == M_OPS;
  assign ts_addr  = desc + SW'(ms == M_OPS ? k : '0);

  assign dma_valid = (ms == M_GET || ms == M_PUT) && k <= bnops[cur] && want;
  assign dma_get   = ms == M_GET;
  assign dma_ea    = op_addr(op_w);
  assign dma_ls    = LS_AW'(32'(cur) * MAX_OPS * OP_BYTES + 32'(k - 1'b1) * OP_BYTES);
  assign dma_size  = 32'(OP_BYTES);

  assign exec_start = !spu_busy && bstate[xq] == B_LOADED;
  assign exec_func  = bfunc[xq];
  assign exec_id    = bid[xq];
  assign exec_buf   = xq;

  assign fb_valid = ms == M_FIN;
  assign fb_id    = bid[cur];

  logic dma_fire;
  assign dma_fire = dma_valid && dma_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ms          <= M_IDLE;
      fq          <= 1'b0;
      xq          <= 1'b0;
      wq          <= 1'b0;
      cur         <= 1'b0;
      desc        <= '0;
      k           <= '0;
      outstanding <= '0;
      spu_busy    <= 1'b0;
      for (int b = 0; b < 2; b++) begin
        bstate[b] <= B_EMPTY;
        bid[b]    <= '0;
        bfunc[b]  <= '0;
        bnops[b]  <= '0;
        for (int i = 0; i < MAX_OPS; i++) bops[b][i] <= '0;
      end
    end else begin
      outstanding <= outstanding + 8'(dma_fire) - 8'(dma_done);

      // core side: start the oldest loaded task, note its completion
      if (exec_start) begin
        bstate[xq] <= B_EXEC;
        spu_busy   <= 1'b1;
        xq         <= !xq;
      end
      if (exec_done && spu_busy) begin
        bstate[!xq] <= B_DONE;  // the task started last; xq has moved on
        spu_busy    <= 1'b0;
      end

      unique case (ms)
        M_IDLE: begin
          if (bstate[wq] == B_DONE) begin
            cur <= wq;
            k   <= KW'(1);
            ms  <= M_PUT;
          end else if (rq_valid && rq_ready) begin
            cur      <= fq;
            bid[fq]  <= rq_id;
            desc     <= rq_desc;
            ms       <= M_HDR;
          end
        end
        M_HDR: if (ts_gnt) begin
          bfunc[cur] <= ts_data[23:0];
          bnops[cur] <= (ts_data[31:24] > 8'(MAX_OPS)) ? KW'(MAX_OPS) : KW'(ts_data[31:24]);
          k          <= KW'(1);
          ms         <= (ts_data[31:24] == 0) ? M_WAIT_GET : M_OPS;
        end
        M_OPS: if (ts_gnt) begin
          bops[cur][OI'(k - 1'b1)] <= ts_data;
          k <= k + 1'b1;
          if (k == bnops[cur]) begin
            k  <= KW'(1);
            ms <= M_GET;
          end
        end
        M_GET, M_PUT: begin
          if (k > bnops[cur]) begin
            ms <= (ms == M_GET) ? M_WAIT_GET : M_WAIT_PUT;
          end else if (!want || dma_ready) begin
            k <= k + 1'b1;
          end
        end
        M_WAIT_GET: if (outstanding == 0) begin
          bstate[cur] <= B_LOADED;
          fq <= !fq;
          ms <= M_IDLE;
        end
        M_WAIT_PUT: if (outstanding == 0) ms <= M_FIN;
        M_FIN: if (fb_ready) begin
          bstate[cur] <= B_EMPTY;
          wq <= !wq;
          ms <= M_IDLE;
        end
        default: ms <= M_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(dma_done && outstanding == 0));
endmodule
