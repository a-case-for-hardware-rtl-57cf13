// nexus_task_storage: on-chip store of task descriptors.
//
// Every task descriptor is copied here by the descriptor loader and stays
// until the task has finished, so that neither the Task Pool Unit nor the
// cores need to fetch it from main memory again. The store is divided into
// NUM_TASKS slots of DESC_WORDS words; slot i belongs to task id i, so the
// descriptor pointer of a task is id*DESC_WORDS. Tying slots to task-table
// entries is this design's choice.
//
// Interface: one write port (descriptor loader) and three read ports: the
// descriptor handler, the finish handler and the memory-mapped port through
// which cores read descriptors. Reads are combinational (register-file
// style), writes take effect at the clock edge. The array is not reset:
// a slot is always written before it is read.
module nexus_task_storage #(
  parameter int unsigned NUM_TASKS  = 1024,
  parameter int unsigned DESC_WORDS = 8,
  localparam int unsigned DEPTH = NUM_TASKS * DESC_WORDS,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic [AW-1:0]             wr_addr,
  input  nexus_pkg::word_t          wr_data,
  input  logic [AW-1:0]             hd_addr,
  output nexus_pkg::word_t          hd_data,
  input  logic [AW-1:0]             fh_addr,
  output nexus_pkg::word_t          fh_data,
  input  logic [AW-1:0]             ext_addr,
  output nexus_pkg::word_t          ext_data
);
  nexus_pkg::word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  assign hd_data  = mem[hd_addr];
  assign fh_data  = mem[fh_addr];
  assign ext_data = mem[ext_addr];
endmodule
