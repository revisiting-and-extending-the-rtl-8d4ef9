// elbow_pkg: constants, types and address helpers shared by the elbow cache.
//
// The 8 KB page (address bits 12..0 need no translation) is taken from the original
// proposal; it bounds which address bits the skewing functions may use early.
// The physical address width (32 bits) and the 64-bit word width of the
// processor port are this design's own choices. The cache geometry is set
// by parameters of elbow_cache.
package elbow_pkg;

  localparam int unsigned ADDR_W = 32;   // physical address bits
  localparam int unsigned PAGE_W = 13;   // 8 KB page: bits b12..b0 untranslated
  localparam int unsigned WORD_W = 64;   // processor word

  // Outcome of victim selection: which of the four candidates is evicted.
  // A/B are the two primary locations of the missing address (bank 0 / bank 1),
  // C is the alternate location of A (in bank 1), D that of B (in bank 0).
  typedef enum logic [1:0] {
    VIC_A = 2'd0,
    VIC_B = 2'd1,
    VIC_C = 2'd2,
    VIC_D = 2'd3
  } victim_e;

endpackage
