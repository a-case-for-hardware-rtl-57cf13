// nexus_finish_handler: finish handler of the Task Pool Unit.
//
// Takes the id of a finished task from the finish buffer, reads the task's
// descriptor from the task storage and, operand by operand, tells the
// dependency tables that the task is done with the address: FIN_IN for an
// input (one reader fewer; the last reader kicks off waiting writers),
// FIN_OUT for an output or inout (its readers and the next writer are kicked
// off). Tasks whose dependency count reaches zero go to the ready queue from
// the task table. Finally the task is removed: its task-table entry and its
// task-storage slot become free.
//
// Timing: one cycle for the header, then one command per operand; each
// FIN_* is accepted when the tables are idle and may keep them busy for one
// cycle per kicked-off task. The task-table status is FINISHING from the
// pop until the last cycle, when free_en clears it.
// The document gives the job (update the tables, release waiting tasks,
// remove the finished task); reading the operands back from the task
// storage and the one-operand-per-cycle command sequence are this design's.
module nexus_finish_handler #(
  parameter int unsigned NUM_TASKS  = 1024,
  parameter int unsigned DESC_WORDS = 8,
  localparam int unsigned TW = $clog2(NUM_TASKS),
  localparam int unsigned SW = $clog2(NUM_TASKS * DESC_WORDS),
  localparam int unsigned KW = $clog2(DESC_WORDS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // finish buffer (pop side)
  input  logic               fb_valid,
  output logic               fb_ready,
  input  logic [TW-1:0]      fb_id,
  // task storage read port
  output logic [SW-1:0]      st_addr,
  input  nexus_pkg::word_t   st_data,
  // dependency tables command port
  output logic               cmd_valid,
  input  logic               cmd_ready,
  output nexus_pkg::cmd_e    cmd_op,
  output nexus_pkg::word_t   cmd_addr,
  // task table
  output logic               fin_en,
  output logic [TW-1:0]      fin_id,
  output logic               free_en,
  output logic [TW-1:0]      free_id
);
  import nexus_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_OPS, S_FREE} state_e;
  state_e        state;
  logic [TW-1:0] id;
  logic [KW-1:0] k, nops;
  logic [7:0]    hdr_nops;
  mode_e         mode;

  assign fb_ready  = state == S_IDLE;
  assign fin_en    = fb_valid && fb_ready;
  assign fin_id    = fb_id;
  assign st_addr   = SW'(id * DESC_WORDS) + ((state == S_OPS) ? SW'(k) : '0);
  assign hdr_nops  = st_data[31:24];
  assign mode      = op_mode(st_data);
  assign cmd_valid = state == S_OPS && mode != MODE_NONE;
  assign cmd_op    = is_write(mode) ? CMD_FIN_OUT : CMD_FIN_IN;
  assign cmd_addr  = op_addr(st_data);
  assign free_en   = state == S_FREE;
  assign free_id   = id;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      id    <= '0;
      k     <= '0;
      nops  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (fb_valid) begin
          id    <= fb_id;
          state <= S_HDR;
        end
        S_HDR: begin
          nops  <= (hdr_nops > 8'(DESC_WORDS - 1)) ? KW'(DESC_WORDS - 1) : KW'(hdr_nops);
          k     <= KW'(1);
          state <= (hdr_nops == 0) ? S_FREE : S_OPS;
        end
        S_OPS: if (mode == MODE_NONE || cmd_ready) begin
          k <= k + 1'b1;
          if (k == nops) state <= S_FREE;
        end
        S_FREE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
