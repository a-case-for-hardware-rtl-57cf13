// nexus_desc_loader: descriptor loader of the Task Pool Unit.
//
// Takes a (pointer, size) pair from the in buffer, claims a free task-table
// entry (which fixes the task id and its task-storage slot), reads the
// descriptor of `size` 32-bit words from main memory starting at the byte
// address `pointer`, writes them into the slot and hands the task id to the
// descriptor handler. With no free entry the loader stalls and the in buffer
// fills up, which in turn stalls the control core.
//
// Memory port (this design's choice): mem_req/mem_addr are held until
// mem_gnt; read data returns in request order on mem_rvalid/mem_rdata, any
// number of cycles later. Requests are issued back to back, so a descriptor
// of n words takes about n cycles plus the memory latency.
// Sizes above DESC_WORDS are cut to DESC_WORDS; size 0 is read as 1.
// Handler port: out_valid/out_ready/out_id.
module nexus_desc_loader #(
  parameter int unsigned NUM_TASKS  = 1024,
  parameter int unsigned DESC_WORDS = 8,
  parameter int unsigned SIZE_W     = 8,
  localparam int unsigned TW = $clog2(NUM_TASKS),
  localparam int unsigned SW = $clog2(NUM_TASKS * DESC_WORDS),
  localparam int unsigned KW = $clog2(DESC_WORDS + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // in buffer (pop side)
  input  logic               ib_valid,
  output logic               ib_ready,
  input  nexus_pkg::word_t   ib_ptr,
  input  logic [SIZE_W-1:0]  ib_size,
  // task table allocation
  input  logic               alloc_avail,
  input  logic [TW-1:0]      alloc_id,
  output logic               alloc_en,
  // main memory read port
  output logic               mem_req,
  output nexus_pkg::word_t   mem_addr,
  input  logic               mem_gnt,
  input  logic               mem_rvalid,
  input  nexus_pkg::word_t   mem_rdata,
  // task storage write port
  output logic               st_wr_en,
  output logic [SW-1:0]      st_wr_addr,
  output nexus_pkg::word_t   st_wr_data,
  // to the descriptor handler
  output logic               out_valid,
  input  logic               out_ready,
  output logic [TW-1:0]      out_id
);
  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_HAND} state_e;
  state_e           state;
  logic [TW-1:0]    id;
  nexus_pkg::word_t ptr;
  logic [KW-1:0]    nwords, req_k, rsp_k;

  assign ib_ready  = state == S_IDLE && alloc_avail;
  assign alloc_en  = ib_valid && ib_ready;
  assign mem_req   = state == S_LOAD && req_k != nwords;
  assign mem_addr  = ptr + 32'({req_k, 2'b00});
  assign st_wr_en  = state == S_LOAD && mem_rvalid;
  assign st_wr_addr = SW'(id * DESC_WORDS) + SW'(rsp_k);
  assign st_wr_data = mem_rdata;
  assign out_valid = state == S_HAND;
  assign out_id    = id;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      id     <= '0;
      ptr    <= '0;
      nwords <= '0;
      req_k  <= '0;
      rsp_k  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (alloc_en) begin
          id     <= alloc_id;
          ptr    <= ib_ptr;
          nwords <= (ib_size == 0) ? KW'(1)
                  : (ib_size > SIZE_W'(DESC_WORDS)) ? KW'(DESC_WORDS) : KW'(ib_size);
          req_k  <= '0;
          rsp_k  <= '0;
          state  <= S_LOAD;
        end
        S_LOAD: begin
          if (mem_req && mem_gnt) req_k <= req_k + 1'b1;
          if (mem_rvalid) begin
            rsp_k <= rsp_k + 1'b1;
            if (rsp_k + 1'b1 == nwords) state <= S_HAND;
          end
        end
        S_HAND: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // memory never returns more words than were asked for
  assert property (@(posedge clk) disable iff (!rst_n)
                   state == S_LOAD && mem_rvalid |-> rsp_k < req_k);
endmodule
