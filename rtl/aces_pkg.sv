// aces_pkg: types and constants shared by the ACES sparse matrix-matrix
// multiplication (SpMM) accelerator.
//
// Values are IEEE-754 double precision (64 bit), as in the evaluated
// configuration. A sparse element is a (coordinate, value) pair; a fiber is a
// coordinate-sorted list of such elements (one row of B or one partial row of
// C). Fibers of B are stored line-aligned in memory, LINE_ELEMS elements per
// cache line; the line size is this design's choice (64 B holding four 16-byte
// element slots). Degrees of condensing follow the three the accelerator
// switches between: none, moderate (two column groups) and aggressive.
package aces_pkg;
  parameter int unsigned COORD_W    = 32;
  parameter int unsigned VAL_W      = 64;
  parameter int unsigned ROW_W      = 32;
  parameter int unsigned LINE_W     = 32;   // cache-line address width
  parameter int unsigned LINE_ELEMS = 4;    // elements per 64-byte line

  typedef struct packed {
    logic [COORD_W-1:0] coord;
    logic [VAL_W-1:0]   val;
  } elem_t;

  typedef elem_t [LINE_ELEMS-1:0] line_t;

  // Non-zero of A as dispatched: its row, original column and value.
  typedef struct packed {
    logic [ROW_W-1:0]   row;
    logic [COORD_W-1:0] col;
    logic [VAL_W-1:0]   val;
  } a_elem_t;

  typedef enum logic [1:0] {
    DEG_NONE       = 2'd0,
    DEG_MODERATE   = 2'd1,
    DEG_AGGRESSIVE = 2'd2
  } degree_t;

  // Reply of the global cache to one line request.
  typedef enum logic [1:0] {
    CR_HIT  = 2'd0,   // data returned
    CR_MISS = 2'd1,   // miss recorded in the NB buffer: wait for the fill notice
    CR_NACK = 2'd2    // NB buffer could not take the miss: ask again
  } cresp_t;

  // Event counters of one run, brought out of the top for inspection.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] a_elems;        // A non-zeros dispatched to MPEs
    logic [31:0] pure_fibers;    // B fibers read without a single miss
    logic [31:0] hits;
    logic [31:0] misses;         // misses parked in the NB buffer
    logic [31:0] nb_merges;      // secondary misses merged into an NB entry
    logic [31:0] nacks;          // requests refused (NB buffer full or busy port)
    logic [31:0] evictions;      // PureFiber victim replacements
    logic [31:0] sq_bypass;      // fiber taken from behind the head of an SQ
    logic [31:0] sync_conflict;  // idle APE with only conflicting fibers
    logic [31:0] imm_merges;     // merges with a stored partial fiber
    logic [31:0] direct_writes;  // fibers written with no stored partner
    logic [31:0] adds;           // coordinate matches summed
    logic [31:0] bands;
    logic [31:0] sample_passes;
    logic [31:0] choices;        // degree decisions from sampling
    logic [31:0] win_none;       // windows run per degree
    logic [31:0] win_moderate;
    logic [31:0] win_aggressive;
    logic [31:0] c_elems;        // output elements written
  } stats_t;
endpackage
