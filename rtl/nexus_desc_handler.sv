// nexus_desc_handler: descriptor handler of the Task Pool Unit.
//
// For each task id received from the descriptor loader it reads the
// descriptor from the task storage and enters the task's operands into the
// dependency tables: an input operand as ADD_IN, an output or inout operand
// as ADD_OUT. When all operands are entered it marks the task as handled in
// the task table and drops the task's guard count with RELEASE; a task with
// no unresolved dependency then becomes ready at once.
//
// Timing: one cycle to read the header, then one cycle per operand unless
// the dependency tables hold a command back (full list, hash conflict,
// waiting writers, or the finish handler using the tables), then the
// release. Operand words with mode 0 are skipped. Tasks are handled one at
// a time in the order the loader delivers them, which is program order.
// The document gives the handler's job (fill the tables from the
// descriptor); the descriptor encoding, the command set and the guard
// count are this design's.
module nexus_desc_handler #(
  parameter int unsigned NUM_TASKS  = 1024,
  parameter int unsigned DESC_WORDS = 8,
  localparam int unsigned TW = $clog2(NUM_TASKS),
  localparam int unsigned SW = $clog2(NUM_TASKS * DESC_WORDS),
  localparam int unsigned KW = $clog2(DESC_WORDS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [TW-1:0]      in_id,
  // task storage read port
  output logic [SW-1:0]      st_addr,
  input  nexus_pkg::word_t   st_data,
  // dependency tables command port
  output logic               cmd_valid,
  input  logic               cmd_ready,
  output nexus_pkg::cmd_e    cmd_op,
  output logic [TW-1:0]      cmd_id,
  output nexus_pkg::word_t   cmd_addr,
  // task table
  output logic               handled_en,
  output logic [TW-1:0]      handled_id
);
  import nexus_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_OPS, S_REL} state_e;
  state_e        state;
  logic [TW-1:0] id;
  logic [KW-1:0] k, nops;
  logic [7:0]    hdr_nops;
  mode_e         mode;

  assign in_ready = state == S_IDLE;
  assign st_addr  = SW'(id * DESC_WORDS) + ((state == S_OPS) ? SW'(k) : '0);
  assign hdr_nops = st_data[31:24];
  assign mode     = op_mode(st_data);

  always_comb begin
    cmd_valid = 1'b0;
    cmd_op    = CMD_RELEASE;
    cmd_addr  = op_addr(st_data);
    if (state == S_OPS && mode != MODE_NONE) begin
      cmd_valid = 1'b1;
      cmd_op    = is_write(mode) ? CMD_ADD_OUT : CMD_ADD_IN;
    end else if (state == S_REL) begin
      cmd_valid = 1'b1;
    end
  end
  assign cmd_id     = id;
  assign handled_en = state == S_REL && cmd_ready;
  assign handled_id = id;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      id    <= '0;
      k     <= '0;
      nops  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          id    <= in_id;
          state <= S_HDR;
        end
        S_HDR: begin
          // operand k sits in word k; at most DESC_WORDS-1 operands fit
          nops  <= (hdr_nops > 8'(DESC_WORDS - 1)) ? KW'(DESC_WORDS - 1) : KW'(hdr_nops);
          k     <= KW'(1);
          state <= (hdr_nops == 0) ? S_REL : S_OPS;
        end
        S_OPS: if (mode == MODE_NONE || cmd_ready) begin
          k <= k + 1'b1;
          if (k == nops) state <= S_REL;
        end
        S_REL: if (cmd_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
