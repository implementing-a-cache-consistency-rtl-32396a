// bop_pkg: types and constants shared by the snooping data cache.
//
// The cache keeps one of four ownership states per entry (Invalid, UnOwned,
// Owned Exclusively, Owned NonExclusively) in two bits, and the system bus
// carries five operations: the conventional Read and Write plus the
// protocol's Read-For-Ownership, Write-For-Invalidation and
// Write-Without-Invalidation. The four states, the five operations, the
// 16-entry direct-mapped organisation, the 64-bit block of four 16-bit words
// and the 13-bit tag of a 19-bit word address follow the source design. The
// binary encodings of states and operations are this design's own choice.
package bop_pkg;

  localparam int unsigned WORD_W    = 16;  // external data width
  localparam int unsigned WORDS     = 4;   // words per block
  localparam int unsigned BLOCK_W   = WORD_W * WORDS;  // 64-bit block
  localparam int unsigned WSEL_W    = 2;   // word select bits of an address
  // The index and tag widths (4 and 13) are module parameters, IDX_W and TAG_W.

  // Entry state, two bits per entry.
  typedef enum logic [1:0] {
    ST_INV = 2'b00,  // Invalid
    ST_UNO = 2'b01,  // UnOwned
    ST_NON = 2'b10,  // Owned NonExclusively
    ST_EXC = 2'b11   // Owned Exclusively
  } state_e;

  // System bus operation, carried on the bus's extended command lines.
  typedef enum logic [2:0] {
    OP_READ  = 3'd0,  // Read
    OP_WRITE = 3'd1,  // Write (I/O devices and cacheless masters)
    OP_RFO   = 3'd2,  // Read-For-Ownership
    OP_WFI   = 3'd3,  // Write-For-Invalidation (address only)
    OP_WWI   = 3'd4   // Write-Without-Invalidation (flush of an owned block)
  } bus_op_e;

  // Processor request kinds as seen by the cache controller.
  typedef enum logic [1:0] {
    PR_READ  = 2'd0,
    PR_WRITE = 2'd1,
    PR_TAS   = 2'd2   // atomic test-and-set
  } proc_op_e;

  function automatic logic is_owned(state_e s);
    return (s == ST_EXC) || (s == ST_NON);
  endfunction

  function automatic logic op_is_read(bus_op_e op);
    return (op == OP_READ) || (op == OP_RFO);
  endfunction

  // Number of data beats of a bus operation: a Write-For-Invalidation moves
  // no data and completes in a single acknowledged beat.
  function automatic logic [2:0] op_beats(bus_op_e op);
    return (op == OP_WFI) ? 3'd1 : 3'(WORDS);
  endfunction

endpackage
