// fh_pkg: types and constants shared by the fetch-halting blocks.
//
// Every instruction carries a two-bit criticality annotation placed in
// otherwise unused bits of its instruction word by an offline profiling
// pass. Three levels exist: non-critical, half-critical (fetch is halted
// for about half of the miss) and critical (fetch is halted for the whole
// miss). The bit encoding of the two annotation bits is this design's own
// choice: bit 1 marks a critical instruction, bit 0 alone a half-critical
// one.
//
// The default sizes follow the simulated machine the technique was
// evaluated on: a 256-entry reorder buffer (8-bit instruction tags), an
// 8-wide issue stage, a 128 kB 8-way L2 with 32-byte lines and a 32 kbit
// partial-address Bloom filter. The 32-bit physical address is assumed.
package fh_pkg;

  // Reorder-buffer tag width: 256-entry ROB.
  localparam int unsigned ROB_TAG_W = 8;
  // Physical address width (assumed).
  localparam int unsigned ADDR_W    = 32;
  // L2 line size 32 bytes -> 5 offset bits.
  localparam int unsigned L2_OFF_W  = 5;
  // Line address width.
  localparam int unsigned LINE_W    = ADDR_W - L2_OFF_W;
  // Bloom filter: 32 kbit -> 15 partial-address bits.
  localparam int unsigned BF_P      = 15;

  typedef enum logic [1:0] {
    CRIT_NONE = 2'd0,
    CRIT_HALF = 2'd1,
    CRIT_FULL = 2'd2
  } crit_e;

  // Map the raw two annotation bits of an instruction word to a level.
  function automatic crit_e decode_annot(input logic [1:0] annot);
    if (annot[1])      return CRIT_FULL;
    else if (annot[0]) return CRIT_HALF;
    else               return CRIT_NONE;
  endfunction

endpackage
