// nexus_task_table: the task table of the Task Pool Unit.
//
// One entry per task in the system, indexed by task id. Each entry records
// the task's status, a pointer to its descriptor in the task storage and
// the number of tasks it still waits for (#deps). A task whose count drops
// to zero is ready and is pushed into the ready queue together with its
// descriptor pointer. These columns follow the block diagram of the unit;
// the status encoding (nexus_pkg::status_e) is this design's own.
//
// A new entry starts with #deps = 1, a guard that keeps the task from
// becoming ready while the descriptor handler is still adding its
// dependencies (a producer may finish in the meantime). The handler drops
// the guard with a RELEASE command once all operands are entered.
//
// Ports, all acting at the clock edge:
//   alloc_*   lowest free id; alloc_en takes it (status LOADING, #deps 1)
//   inc_*     add inc_amt to an entry's #deps (descriptor handler path)
//   dec_*     subtract one (kick-off or release); accepted only while the
//             ready queue can take a push (dec_ready), since this may make
//             the task ready in the same cycle
//   handled_* the handler has entered all operands: LOADING -> WAITING
//   run_*     the task left the ready queue: RUNNING
//   fin_*     its id left the finish buffer: FINISHING
//   free_*    the finish handler is done with it: FREE
// Increments and a decrement of the same entry in one cycle add up.
module nexus_task_table #(
  parameter int unsigned NUM_TASKS  = 1024,
  parameter int unsigned DESC_WORDS = 8,
  localparam int unsigned TW   = $clog2(NUM_TASKS),
  localparam int unsigned PW   = $clog2(NUM_TASKS * DESC_WORDS),
  localparam int unsigned DW   = $clog2(2 * DESC_WORDS + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  output logic                 alloc_avail,
  output logic [TW-1:0]        alloc_id,
  input  logic                 alloc_en,
  input  logic                 inc_en,
  input  logic [TW-1:0]        inc_id,
  input  logic [1:0]           inc_amt,
  input  logic                 dec_en,
  input  logic [TW-1:0]        dec_id,
  output logic                 dec_ready,
  input  logic                 handled_en,
  input  logic [TW-1:0]        handled_id,
  input  logic                 run_en,
  input  logic [TW-1:0]        run_id,
  input  logic                 fin_en,
  input  logic [TW-1:0]        fin_id,
  input  logic                 free_en,
  input  logic [TW-1:0]        free_id,
  // push side of the ready queue: {id, descriptor pointer}
  output logic                 rq_valid,
  input  logic                 rq_ready,
  output logic [TW+PW-1:0]     rq_data,
  output logic [TW:0]          used_count
);
  import nexus_pkg::*;

  // The status column is reset and scanned as a whole (allocation, used
  // count); the #deps column is only read at one index and needs no reset.
  // The descriptor pointer column is fixed: slot id of the task storage.
  status_e       status [NUM_TASKS];
  logic [DW-1:0] ndeps  [NUM_TASKS];

  function automatic logic [PW-1:0] desc_ptr(input logic [TW-1:0] id);
    return PW'(id) * PW'(DESC_WORDS);
  endfunction

  // lowest free entry
  always_comb begin
    alloc_avail = 1'b0;
    alloc_id    = '0;
    for (int i = NUM_TASKS - 1; i >= 0; i--) begin
      if (status[i] == ST_FREE) begin
        alloc_avail = 1'b1;
        alloc_id    = TW'(i);
      end
    end
  end

  always_comb begin
    used_count = '0;
    for (int i = 0; i < NUM_TASKS; i++)
      if (status[i] != ST_FREE) used_count = used_count + 1'b1;
  end

  assign dec_ready = rq_ready;

  logic          dec_fire;
  logic [DW-1:0] dec_after;
  assign dec_fire  = dec_en && dec_ready;
  assign dec_after = ndeps[dec_id]
                   + ((inc_en && inc_id == dec_id) ? DW'(inc_amt) : '0) - 1'b1;
  assign rq_valid  = dec_fire && dec_after == '0;
  assign rq_data   = {dec_id, desc_ptr(dec_id)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NUM_TASKS; i++) status[i] <= ST_FREE;
    end else begin
      if (alloc_en) begin
        status[alloc_id] <= ST_LOADING;
        ndeps[alloc_id]  <= DW'(1);
      end
      if (inc_en && !(dec_fire && dec_id == inc_id))
        ndeps[inc_id] <= ndeps[inc_id] + DW'(inc_amt);
      if (handled_en)
        status[handled_id] <= ST_WAITING;
      if (dec_fire) begin
        ndeps[dec_id] <= dec_after;
        if (dec_after == '0) status[dec_id] <= ST_READY;
      end
      if (run_en)  status[run_id]  <= ST_RUNNING;
      if (fin_en)  status[fin_id]  <= ST_FINISHING;
      if (free_en) status[free_id] <= ST_FREE;
    end
  end

  // a decrement never takes a count below zero
  assert property (@(posedge clk) disable iff (!rst_n)
                   dec_fire |-> ndeps[dec_id] != '0 || (inc_en && inc_id == dec_id));
  // only a free entry is allocated
  assert property (@(posedge clk) disable iff (!rst_n)
                   alloc_en |-> alloc_avail);
endmodule
