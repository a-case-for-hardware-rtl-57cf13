// nexus_pkg: types and constants shared by the Nexus task-management units.
//
// A task descriptor is a short run of 32-bit words in main memory. Word 0 is
// the header: bits [31:24] give the number of operands, bits [23:0] the
// function to run. Each following word describes one operand: bits [31:2]
// are the word-aligned operand address, bits [1:0] the access mode
// (1 = input, 2 = output, 3 = inout). This layout is this design's own; the
// descriptor is only described as holding "the function to perform and the
// location of the operands".
//
// Operand addresses are looked up in the producers and consumers tables
// through a hash of the address (addr_hash below); the hashing function
// itself is this design's choice.
package nexus_pkg;

  localparam int unsigned WORD_W = 32;

  typedef logic [WORD_W-1:0] word_t;

  // operand access mode, bits [1:0] of an operand word
  typedef enum logic [1:0] {
    MODE_NONE  = 2'd0,
    MODE_IN    = 2'd1,
    MODE_OUT   = 2'd2,
    MODE_INOUT = 2'd3
  } mode_e;

  // task table status of an entry
  typedef enum logic [2:0] {
    ST_FREE      = 3'd0,  // slot unused
    ST_LOADING   = 3'd1,  // descriptor being copied or handled
    ST_WAITING   = 3'd2,  // handled, dependencies outstanding
    ST_READY     = 3'd3,  // in the ready queue
    ST_RUNNING   = 3'd4,  // taken from the ready queue by a core
    ST_FINISHING = 3'd5   // id read from the finish buffer, tables being updated
  } status_e;

  // commands to the dependency tables
  typedef enum logic [2:0] {
    CMD_ADD_IN  = 3'd0,  // new task reads an address
    CMD_ADD_OUT = 3'd1,  // new task writes an address
    CMD_RELEASE = 3'd2,  // new task fully handled: drop its guard count
    CMD_FIN_IN  = 3'd3,  // finished task had read an address
    CMD_FIN_OUT = 3'd4   // finished task had written an address
  } cmd_e;

  function automatic logic [WORD_W-1:0] op_addr(input word_t w);
    return {w[WORD_W-1:2], 2'b00};
  endfunction

  function automatic mode_e op_mode(input word_t w);
    return mode_e'(w[1:0]);
  endfunction

  function automatic logic is_write(input mode_e m);
    return m == MODE_OUT || m == MODE_INOUT;
  endfunction

  // Multiplicative (Fibonacci) hash of the word address: the product with
  // 2^32/phi, of which the caller keeps the top index bits. Operands a power
  // of two apart (blocks and rows of blocks of a matrix) spread evenly over
  // the table, which a plain bit slice or XOR fold of the address does not
  // achieve for such strides.
  localparam logic [31:0] HASH_MUL = 32'h9E37_79B1;
  function automatic word_t addr_hash(input word_t a);
    word_t w;
    w = {2'b00, a[31:2]};
    return w * HASH_MUL;
  endfunction

endpackage
