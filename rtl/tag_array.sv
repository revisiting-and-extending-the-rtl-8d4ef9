// tag_array: tag store and valid bits of one way-bank.
//
// Each entry holds the address bits above the page offset (ADDR_W-1 down to
// PAGE_W). Because the skewing functions mix page-offset bits into the row
// number, the full upper address is kept rather than only the bits the row
// does not determine; together with the row and the bank it lets the
// alternate location of a resident block be computed for relocation.
// Single port, synchronous read: `rvalid`/`rtag` appear the cycle after a
// read and hold until the next read. The valid bits are cleared by the
// synchronous active-low reset; the tags themselves are not.
// Storing the full upper address and the port timing are this design's own
// choices.
module tag_array #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned TAG_W = 19
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic                     wvalid,
  input  logic [TAG_W-1:0]         wtag,
  output logic                     rvalid,
  output logic [TAG_W-1:0]         rtag
);
  logic [TAG_W-1:0] tags [DEPTH];
  logic [DEPTH-1:0] valid;

  always_ff @(posedge clk) begin
    if (en && we) tags[addr] <= wtag;
    if (en && !we) rtag <= tags[addr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid  <= '0;
      rvalid <= 1'b0;
    end else if (en) begin
      if (we) valid[addr] <= wvalid;
      else    rvalid      <= valid[addr];
    end
  end
endmodule
