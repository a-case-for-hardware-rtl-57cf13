// nexus_fifo: synchronous first-in first-out queue with valid/ready handshakes.
//
// Used for the three hardware queues of the Task Pool Unit: the in buffer
// (descriptor pointer and size written by the control core), the ready queue
// (id and descriptor pointer of tasks whose dependencies are met) and the
// finish buffer (ids of finished tasks). The queues are of fixed size and a
// full queue stalls its producer, as the design requires; the depth is this
// design's choice.
//
// Interface: push side in_valid/in_ready/in_data, pop side
// out_valid/out_ready/out_data. A word pushed in cycle t can be popped in
// cycle t+1. count gives the fill level for the status register.
// Timing: one push and one pop per cycle, also when full (pop frees a place
// for the push in the same cycle).
module nexus_fifo #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  logic [WIDTH-1:0]         in_data,
  output logic                     out_valid,
  input  logic                     out_ready,
  output logic [WIDTH-1:0]         out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             push, pop;

  assign out_valid = count != 0;
  assign in_ready  = (count != DEPTH[$clog2(DEPTH+1)-1:0]) || out_ready;
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rd_ptr];

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

  // a push into a full queue must be matched by a pop
  assert property (@(posedge clk) disable iff (!rst_n)
                   count <= DEPTH[$clog2(DEPTH+1)-1:0]);
endmodule
