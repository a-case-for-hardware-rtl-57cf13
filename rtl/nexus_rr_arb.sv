// nexus_rr_arb: round-robin arbiter.
//
// Grants one of N requesters (one-hot gnt) combinationally. The requester
// granted last has the lowest priority next time: the priority pointer moves
// past the winner in the cycle in which `advance` is high (the grant was
// used). Used to share the Task Pool Unit's ready queue, finish buffer and
// task-storage read port among the task controllers of several cores.
// The arbiter is this design's own: the document connects the cores to the
// unit through the on-chip bus, which is not built here.
module nexus_rr_arb #(
  parameter int unsigned N = 4,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [N-1:0]  req,
  input  logic          advance,
  output logic [N-1:0]  gnt,
  output logic [IW-1:0] gnt_idx
);
  logic [IW-1:0] prio;   // requester with the highest priority

  always_comb begin
    gnt     = '0;
    gnt_idx = '0;
    for (int off = N - 1; off >= 0; off--) begin
      int unsigned i;
      i = (int'(prio) + off) % N;
      if (req[i]) begin
        gnt     = '0;
        gnt[i]  = 1'b1;
        gnt_idx = IW'(i);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                    prio <= '0;
    else if (advance && |req)      prio <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(gnt));
endmodule
