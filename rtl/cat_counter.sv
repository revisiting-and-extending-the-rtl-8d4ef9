// cat_counter: the global cache-allocation-tick (CAT) counter.
//
// A K-bit counter that advances by one every time a new block is allocated
// in the cache (not on hits, not on cycles), so the time base runs faster
// when the miss ratio is high. The timestamp stored with a block is the
// TS_W most significant bits of the counter. K defaults to
// log2(blocks) + 2 = 11 for 512 blocks, so the counter wraps after four
// times the number of blocks in the cache, and TS_W defaults to 5.
// Counter width, timestamp width and the allocate-only increment follow the
// original proposal; the reset value of zero and the free wrap-around are this
// design's own choices.
//
// Timing: `alloc` is sampled on the rising clock edge; `ts` reflects the new
// count one cycle later. Synchronous active-low reset.
module cat_counter #(
  parameter int unsigned K    = 11,
  parameter int unsigned TS_W = 5
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            alloc,  // one block allocated this cycle
  output logic [K-1:0]    count,  // full counter value
  output logic [TS_W-1:0] ts      // current timestamp (top TS_W bits)
);
  always_ff @(posedge clk) begin
    if (!rst_n)     count <= '0;
    else if (alloc) count <= count + 1'b1;
  end

  assign ts = count[K-1 -: TS_W];
endmodule
