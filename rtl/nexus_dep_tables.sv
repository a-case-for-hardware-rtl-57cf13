// nexus_dep_tables: producers table and consumers table of the Task Pool Unit.
//
// Dependencies between tasks are found by table lookups only. Both tables
// are indexed by the top bits of a hash of the operand address
// (nexus_pkg::addr_hash), so an address is found without searching. Each
// index selects a set of WAYS entries that are compared in parallel; a
// command that needs a new entry in a set whose entries are all taken
// waits until one is freed. WAYS must be at least the number of operands a
// descriptor can hold (DESC_WORDS-1): the entries of older tasks are always
// freed eventually, so a task's own operands can always be placed and a
// full set cannot deadlock the unit. (With one entry per index, two
// operands of the same task that hash alike would wait for each other.)
//
//  producers table: an entry exists while a pending task will write the
//    address. A task that reads the address subscribes to the entry's
//    kick-off list and gains one dependency; when the writer finishes, the
//    list is walked and every subscriber loses one dependency (read after
//    write).
//  consumers table: an entry counts the pending tasks that read the address
//    (#deps). A task that writes the address while readers are pending
//    subscribes to the entry's kick-off list and gains one dependency; when
//    the last reader finishes, the writers on the list are kicked off (write
//    after read).
//  A task that writes an address that already has a pending writer is put
//    on the producers kick-off list with a marker bit (write after write).
//    When the walk of the list reaches a marked entry, that task becomes the
//    entry's producer and the walk stops: readers behind the marker wait
//    for the new writer.
// An inout operand is handled as an output: it waits for the previous writer
// through the marker and for the previous readers through the consumers
// table, which covers its read as well.
//
// Rule of this design: a reader is not entered while writers wait on the
// consumers entry of its address (the command stalls until they are kicked
// off), since it would otherwise be counted among the readers those writers
// wait for. Tasks are entered in program order and older tasks always
// finish, so such a stall ends. The same holds for full kick-off lists,
// hash-slot conflicts and a saturated reader count.
//
// Commands arrive on two valid/ready ports: the finish handler's (FIN_IN,
// FIN_OUT) has priority over the descriptor handler's (ADD_IN, ADD_OUT,
// RELEASE). ADD_* and RELEASE complete in the cycle they are accepted;
// FIN_* are accepted at once and then walk a kick-off list, one kicked-off
// task per cycle, during which no other command is accepted. Dependency
// counts are changed through inc_* (ADD_*) and dec_* (kick-offs and
// RELEASE); a decrement waits for dec_ready.
// The event outputs pulse for one cycle when the named mechanism acts.
//
// From the document: the two tables and their columns (producers: address,
// kick-off list; consumers: address, #deps, kick-off list), hashed
// indexing, subscription to kick-off lists and the write-after-write
// marker. This design's own: the hash function, set associativity, the
// circular kick-off lists of KO_LEN ids, the reader stall above and the
// command interface. Entry bodies carry no reset (only the valid bits), so
// synthesis can map them to RAM.
module nexus_dep_tables #(
  parameter int unsigned NUM_TASKS = 1024,
  parameter int unsigned P_ENTRIES = 2048,
  parameter int unsigned C_ENTRIES = 2048,
  parameter int unsigned WAYS      = 8,    // >= operands per descriptor
  parameter int unsigned KO_LEN    = 4,    // kick-off list length
  parameter int unsigned RD_CNT_W  = 6,
  localparam int unsigned TW = $clog2(NUM_TASKS),
  localparam int unsigned PS = P_ENTRIES / WAYS,
  localparam int unsigned CS = C_ENTRIES / WAYS,
  localparam int unsigned PI = (PS > 1) ? $clog2(PS) : 1,
  localparam int unsigned CI = (CS > 1) ? $clog2(CS) : 1,
  localparam int unsigned WI = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned KW = (KO_LEN > 1) ? $clog2(KO_LEN) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // descriptor handler port
  input  logic                 h_valid,
  output logic                 h_ready,
  input  nexus_pkg::cmd_e      h_op,
  input  logic [TW-1:0]        h_id,
  input  nexus_pkg::word_t     h_addr,
  // finish handler port
  input  logic                 f_valid,
  output logic                 f_ready,
  input  nexus_pkg::cmd_e      f_op,
  input  nexus_pkg::word_t     f_addr,
  // dependency count updates to the task table
  output logic                 inc_en,
  output logic [TW-1:0]        inc_id,
  output logic [1:0]           inc_amt,
  output logic                 dec_en,
  output logic [TW-1:0]        dec_id,
  input  logic                 dec_ready,
  // status and events
  output logic                 busy,
  output logic                 ev_raw,      // reader subscribed to a producer
  output logic                 ev_war,      // writer subscribed to a consumers entry
  output logic                 ev_waw,      // marker inserted
  output logic                 ev_marker,   // walk stopped at a marker
  output logic                 ev_stall     // handler command held back
);
  import nexus_pkg::*;

  typedef struct packed {
    word_t                    addr;
    logic [TW-1:0]            producer;
    logic [KO_LEN-1:0][TW-1:0] ko_id;
    logic [KO_LEN-1:0]        ko_mark;
    logic [KW-1:0]            head;
    logic [KW:0]              cnt;
  } prod_t;

  typedef struct packed {
    word_t                    addr;
    logic [RD_CNT_W-1:0]      ndeps;
    logic [KO_LEN-1:0][TW-1:0] ko_id;
    logic [KW-1:0]            head;
    logic [KW:0]              cnt;
  } cons_t;

  // Entry bodies carry no reset and may be held in RAM; only the valid
  // bits are cleared at reset.
  prod_t ptab [PS][WAYS];
  cons_t ctab [CS][WAYS];
  logic  p_valid [PS][WAYS];
  logic  c_valid [CS][WAYS];

  typedef enum logic [1:0] {S_IDLE, S_WALK_P, S_WALK_C} state_e;
  state_e        state;
  logic [PI-1:0] walk_ps;
  logic [CI-1:0] walk_cs;
  logic [WI-1:0] walk_pw, walk_cw;

  // lookups for whichever command is considered this cycle
  logic          use_f;
  word_t         addr;
  word_t         hash;
  logic [PI-1:0] hp;
  logic [CI-1:0] hc;
  logic [WI-1:0] pw, cw;           // matching way, else a free way
  prod_t         pe;
  cons_t         ce;
  logic          p_match, p_conf, c_match, c_conf;

  assign use_f = f_valid;
  assign addr  = use_f ? f_addr : h_addr;
  assign hash  = addr_hash(addr);
  assign hp    = (PS > 1) ? hash[WORD_W-1 -: PI] : '0;
  assign hc    = (CS > 1) ? hash[WORD_W-1 -: CI] : '0;

  always_comb begin
    logic p_free, c_free;
    p_match = 1'b0; p_free = 1'b0; pw = '0;
    c_match = 1'b0; c_free = 1'b0; cw = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (!p_valid[hp][w] && !p_match) begin p_free = 1'b1; pw = WI'(w); end
      if (!c_valid[hc][w] && !c_match) begin c_free = 1'b1; cw = WI'(w); end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (p_valid[hp][w] && ptab[hp][w].addr == addr) begin p_match = 1'b1; pw = WI'(w); end
      if (c_valid[hc][w] && ctab[hc][w].addr == addr) begin c_match = 1'b1; cw = WI'(w); end
    end
    // no entry for the address and no room for one in its set
    p_conf = !p_match && !p_free;
    c_conf = !c_match && !c_free;
  end
  assign pe = ptab[hp][pw];
  assign ce = ctab[hc][cw];

  localparam logic [KW:0]         KO_FULL = (KW+1)'(KO_LEN);

  // kick-off lists are circular: slot `off` places after `head`
  function automatic logic [KW-1:0] ko_slot(input logic [KW-1:0] head, input logic [KW:0] off);
    return KW'((int'(head) + int'(off)) % KO_LEN);
  endfunction
  localparam logic [RD_CNT_W-1:0] RD_MAX  = '1;

  // can the handler command complete this cycle?
  logic h_block;
  always_comb begin
    h_block = 1'b0;
    unique case (h_op)
      CMD_ADD_IN:  h_block = c_conf || (c_match && (ce.cnt != 0 || ce.ndeps == RD_MAX))
                          || (p_match && pe.cnt == KO_FULL);
      CMD_ADD_OUT: h_block = p_conf || (p_match && pe.cnt == KO_FULL)
                          || (c_match && ce.cnt == KO_FULL);
      CMD_RELEASE: h_block = !dec_ready;
      default:     h_block = 1'b1;
    endcase
  end

  logic h_fire, f_fire;
  assign f_ready = state == S_IDLE;
  assign f_fire  = f_valid && f_ready;
  assign h_ready = state == S_IDLE && !f_valid && !h_block;
  assign h_fire  = h_valid && h_ready;
  assign busy    = state != S_IDLE;

  // kick-off walk outputs
  prod_t wpe;
  cons_t wce;
  assign wpe = ptab[walk_ps][walk_pw];
  assign wce = ctab[walk_cs][walk_cw];

  always_comb begin
    dec_en = 1'b0;
    dec_id = '0;
    unique case (state)
      S_IDLE:   if (h_fire && h_op == CMD_RELEASE) begin dec_en = 1'b1; dec_id = h_id; end
      S_WALK_P: if (wpe.cnt != 0) begin dec_en = 1'b1; dec_id = wpe.ko_id[wpe.head]; end
      S_WALK_C: if (wce.cnt != 0) begin dec_en = 1'b1; dec_id = wce.ko_id[wce.head]; end
      default:  ;
    endcase
  end

  always_comb begin
    inc_en  = 1'b0;
    inc_id  = h_id;
    inc_amt = '0;
    if (h_fire && h_op == CMD_ADD_IN && p_match) begin
      inc_en = 1'b1; inc_amt = 2'd1;
    end else if (h_fire && h_op == CMD_ADD_OUT && (p_match || c_match)) begin
      inc_en = 1'b1; inc_amt = 2'(p_match) + 2'(c_match);
    end
  end

  assign ev_raw    = h_fire && h_op == CMD_ADD_IN && p_match;
  assign ev_waw    = h_fire && h_op == CMD_ADD_OUT && p_match;
  assign ev_war    = h_fire && h_op == CMD_ADD_OUT && c_match;
  assign ev_stall  = h_valid && state == S_IDLE && !f_valid && h_block;
  assign ev_marker = state == S_WALK_P && wpe.cnt != 0 && dec_ready && wpe.ko_mark[wpe.head];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      walk_ps <= '0;
      walk_pw <= '0;
      walk_cs <= '0;
      walk_cw <= '0;
      for (int i = 0; i < PS; i++)
        for (int w = 0; w < WAYS; w++) p_valid[i][w] <= 1'b0;
      for (int i = 0; i < CS; i++)
        for (int w = 0; w < WAYS; w++) c_valid[i][w] <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (f_fire) begin
            if (f_op == CMD_FIN_OUT) begin
              walk_ps <= hp;
              walk_pw <= pw;
              state   <= S_WALK_P;
            end else begin
              // FIN_IN: one reader fewer
              ctab[hc][cw].ndeps <= ce.ndeps - 1'b1;
              if (ce.ndeps == RD_CNT_W'(1)) begin
                if (ce.cnt != 0) begin
                  walk_cs <= hc;
                  walk_cw <= cw;
                  state   <= S_WALK_C;
                end else begin
                  c_valid[hc][cw] <= 1'b0;
                end
              end
            end
          end else if (h_fire) begin
            unique case (h_op)
              CMD_ADD_IN: begin
                if (p_match) begin
                  ptab[hp][pw].ko_id[ko_slot(pe.head, pe.cnt)]   <= h_id;
                  ptab[hp][pw].ko_mark[ko_slot(pe.head, pe.cnt)] <= 1'b0;
                  ptab[hp][pw].cnt <= pe.cnt + 1'b1;
                end
                if (c_match) begin
                  ctab[hc][cw].ndeps <= ce.ndeps + 1'b1;
                end else begin
                  c_valid[hc][cw] <= 1'b1;
                  ctab[hc][cw].addr  <= addr;
                  ctab[hc][cw].ndeps <= RD_CNT_W'(1);
                  ctab[hc][cw].head  <= '0;
                  ctab[hc][cw].cnt   <= '0;
                end
              end
              CMD_ADD_OUT: begin
                if (p_match) begin
                  ptab[hp][pw].ko_id[ko_slot(pe.head, pe.cnt)]   <= h_id;
                  ptab[hp][pw].ko_mark[ko_slot(pe.head, pe.cnt)] <= 1'b1;
                  ptab[hp][pw].cnt <= pe.cnt + 1'b1;
                end else begin
                  p_valid[hp][pw]    <= 1'b1;
                  ptab[hp][pw].addr     <= addr;
                  ptab[hp][pw].producer <= h_id;
                  ptab[hp][pw].head     <= '0;
                  ptab[hp][pw].cnt      <= '0;
                end
                if (c_match) begin
                  ctab[hc][cw].ko_id[ko_slot(ce.head, ce.cnt)] <= h_id;
                  ctab[hc][cw].cnt <= ce.cnt + 1'b1;
                end
              end
              default: ;  // RELEASE only decrements
            endcase
          end
        end
        S_WALK_P: begin
          if (wpe.cnt == 0) begin
            p_valid[walk_ps][walk_pw] <= 1'b0;
            state <= S_IDLE;
          end else if (dec_ready) begin
            ptab[walk_ps][walk_pw].head <= ko_slot(wpe.head, (KW+1)'(1));
            ptab[walk_ps][walk_pw].cnt  <= wpe.cnt - 1'b1;
            if (wpe.ko_mark[wpe.head]) begin
              ptab[walk_ps][walk_pw].producer <= wpe.ko_id[wpe.head];
              state <= S_IDLE;
            end
          end
        end
        S_WALK_C: begin
          if (wce.cnt == 0) begin
            c_valid[walk_cs][walk_cw] <= 1'b0;
            state <= S_IDLE;
          end else if (dec_ready) begin
            ctab[walk_cs][walk_cw].head <= ko_slot(wce.head, (KW+1)'(1));
            ctab[walk_cs][walk_cw].cnt  <= wce.cnt - 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // a finished task always finds the entries it created
  assert property (@(posedge clk) disable iff (!rst_n)
                   f_fire && f_op == CMD_FIN_IN |-> c_match && ce.ndeps != 0);
  assert property (@(posedge clk) disable iff (!rst_n)
                   f_fire && f_op == CMD_FIN_OUT |-> p_match);
endmodule
