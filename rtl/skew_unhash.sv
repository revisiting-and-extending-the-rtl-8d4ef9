// skew_unhash: rebuilds the block address of a resident block from the bank
// it sits in, its row there and its stored tag.
//
// The tag holds every address bit from PAGE_W upward, so the translated bits
// a are known; the page-offset bits b follow by undoing the skewing function
// of that bank: b = row XOR a for bank 0, and b = sigma^-1(row XOR a) (a
// one-bit left rotation) for bank 1. The elbow cache needs this to find the
// alternate location of a block it may relocate. Combinational.
module skew_unhash #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned OFF_W  = 6,
  parameter int unsigned PAGE_W = 13,
  parameter int unsigned IDX_W  = 8
) (
  input  logic                     bank,   // 0: row came from f1, 1: from f2
  input  logic [IDX_W-1:0]         row,
  input  logic [ADDR_W-PAGE_W-1:0] tag,    // address bits ADDR_W-1 .. PAGE_W
  output logic [ADDR_W-1:0]        addr    // block address, offset bits zero
);
  localparam int unsigned L = PAGE_W - OFF_W;
  localparam int unsigned H = IDX_W - L;

  logic [L-1:0] x, b;

  assign x = row[L-1:0] ^ tag[H +: L];
  assign b = bank ? {x[L-2:0], x[L-1]} : x;
  assign addr = {tag, b, {OFF_W{1'b0}}};
endmodule
