// nexus_status_reg: memory-mapped status register of the Task Pool Unit.
//
// The block diagram shows a status register next to the in buffer, readable
// by the cores; its contents are this design's choice. Each cycle it
// captures a 32-bit word:
//   [7:0]   in-buffer fill level        [15:8]  ready-queue fill level
//   [23:16] tasks held by the task table
//   [24]    in buffer full              [25]    task table full
//   [26]    finish buffer full          [27]    dependency tables busy
//   [28]    pool empty: no task held and the in buffer empty, so that the
//           control core can wait for all tasks (a barrier)
//   [31:29] zero
// Counts wider than 8 bits saturate at 255. The value read lags the state
// by one cycle.
module nexus_status_reg #(
  parameter int unsigned IB_CW = 5,
  parameter int unsigned RQ_CW = 7,
  parameter int unsigned TT_CW = 7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [IB_CW-1:0] ib_count,
  input  logic             ib_full,
  input  logic [RQ_CW-1:0] rq_count,
  input  logic [TT_CW-1:0] tt_used,
  input  logic             tt_full,
  input  logic             fb_full,
  input  logic             deps_busy,
  output nexus_pkg::word_t status
);
  function automatic logic [7:0] sat8(input logic [31:0] v);
    return (v > 32'd255) ? 8'hff : v[7:0];
  endfunction

  nexus_pkg::word_t next;
  always_comb begin
    next        = '0;
    next[7:0]   = sat8(32'(ib_count));
    next[15:8]  = sat8(32'(rq_count));
    next[23:16] = sat8(32'(tt_used));
    next[24]    = ib_full;
    next[25]    = tt_full;
    next[26]    = fb_full;
    next[27]    = deps_busy;
    next[28]    = tt_used == '0 && ib_count == '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) status <= '0;
    else        status <= next;
  end
endmodule
