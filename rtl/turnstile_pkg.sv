// turnstile_pkg: shared sizes and record types of the Turnstile soft-error
// recovery hardware (region boundary buffer, gated store queue, recovery
// sequencer).
//
// The default sizes are those of the evaluated configuration: a worst-case
// detection latency (WCDL) of 30 cycles, a 40-entry gated store queue, a
// 14-entry region boundary buffer and 32-bit PCs. An RBB entry then holds
// 32 + log2(40) + log2(30) = 32 + 6 + 5 = 43 bits. Address and data widths of
// 32 bits and a byte-enable per byte are this design's choice (an ARMv7-class
// core is assumed).
package turnstile_pkg;

  localparam int unsigned WCDL_DEF      = 30;
  localparam int unsigned GSQ_DEPTH_DEF = 40;
  localparam int unsigned RBB_DEPTH_DEF = 14;
  localparam int unsigned PC_W          = 32;
  localparam int unsigned ADDR_W        = 32;
  localparam int unsigned DATA_W        = 32;
  localparam int unsigned BE_W          = DATA_W / 8;

  // Pointer into the default gated store queue and width of a RegionTime.
  // Modules derive their own widths from their parameters; these are the
  // values at the default sizes.
  localparam int unsigned GSQ_PTR_W = $clog2(GSQ_DEPTH_DEF);
  localparam int unsigned RT_W      = $clog2(WCDL_DEF + 1);

  // One region boundary buffer entry at the default sizes: the PC of the
  // boundary instruction that ends the region, the GSQ tail pointer at that
  // boundary, and the region's execution time in cycles (capped at the WCDL).
  // The region boundary buffer builds the same record for other sizes.
  typedef struct packed {
    logic [PC_W-1:0]      pc;
    logic [GSQ_PTR_W-1:0] gsq_ptr;
    logic [RT_W-1:0]      rt;
  } rbb_entry_t;

  // One store held in the gated store queue.
  typedef struct packed {
    logic [ADDR_W-1:0] addr;
    logic [DATA_W-1:0] data;
    logic [BE_W-1:0]   be;
  } store_t;

endpackage
