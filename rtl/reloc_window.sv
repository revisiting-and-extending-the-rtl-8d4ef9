// reloc_window: limits how often the elbow cache may relocate a block.
//
// Relocation costs a full block read and write, so at most MAX_RELOC
// relocations are allowed over any WINDOW consecutive misses (16 in 64 by
// default: on average at most one relocation per four misses). The unit
// keeps one bit per miss in a WINDOW-1 deep history (1 = that miss
// relocated) and the number of ones in it. `allow` is high when the current
// miss together with the previous WINDOW-1 misses would still hold no more
// than MAX_RELOC relocations if this one relocated.
//
// Timing: `allow` is combinational from the history. On a cycle with `miss`
// high, the history shifts in `reloc` (the decision taken for that miss) on
// the clock edge. Synchronous active-low reset clears the history. The 16/64
// sliding window follows the original proposal; representing it as a shift register
// with a running count is this design's own choice.
module reloc_window #(
  parameter int unsigned WINDOW    = 64,
  parameter int unsigned MAX_RELOC = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic miss,    // a miss that picks a victim this cycle
  input  logic reloc,   // ... and it relocates a block
  output logic allow    // a relocation is permitted for this miss
);
  localparam int unsigned CW = $clog2(WINDOW + 1);

  logic [WINDOW-2:0] hist;   // hist[0] newest, hist[WINDOW-2] oldest
  logic [CW-1:0]     count;  // number of ones in hist

  assign allow = count < CW'(MAX_RELOC);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist  <= '0;
      count <= '0;
    end else if (miss) begin
      hist  <= {hist[WINDOW-3:0], reloc};
      count <= count + CW'(reloc) - CW'(hist[WINDOW-2]);
    end
  end

  relocation_in_budget: assert property (@(posedge clk) disable iff (!rst_n)
    miss && reloc |-> allow);
endmodule
