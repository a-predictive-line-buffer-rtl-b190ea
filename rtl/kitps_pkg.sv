// kitps_pkg: shared constants and types of the predictive line buffer (PLB)
// instruction cache with the Key Instruction Trace Predictive Strategy (KITPS).
//
// The defaults reproduce the baseline configuration: a 16 KB, 4-way set
// associative level-1 instruction cache with 64-byte lines, a line buffer of
// one cache line, and an Instruction Trace Table (ITT) of 8 entries.  The
// 32-bit address and 32-bit instruction word are this design's choice (the
// host is a 32-bit SPARC core).  Modules take these values as the defaults of
// their own typed parameters, so each block can be resized on its own.
package kitps_pkg;

  // Address and instruction word
  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned INSTR_W     = 32;

  // Level-1 instruction cache (baseline configuration)
  localparam int unsigned CACHE_BYTES = 16384;
  localparam int unsigned LINE_BYTES  = 64;
  localparam int unsigned WAYS        = 4;

  // Instruction Trace Table entries (two ways per set)
  localparam int unsigned ITT_SIZE    = 8;

  // Outcome of the parallel line buffer / ITT lookup (rows of the operation table)
  typedef enum logic [1:0] {
    LB_HIT_ITT_MISS  = 2'b10,
    LB_HIT_ITT_HIT   = 2'b11,
    LB_MISS_ITT_MISS = 2'b00,
    LB_MISS_ITT_HIT  = 2'b01
  } lookup_case_e;

  // Fetch controller states
  typedef enum logic [1:0] {
    ST_IDLE,    // ready: line buffer and ITT looked up with the request address
    ST_CACHE,   // line buffer missed: normal cache access
    ST_REFILL,  // cache missed: waiting for the line from memory
    ST_RESP     // refilled line written: cache read returns the instruction
  } fetch_state_e;

endpackage
