// ts_array: timestamp array of one way-bank.
//
// Holds one TS_W-bit timestamp per block of the bank, in a structure kept
// apart from the tags and data; each way-bank has its own. A hit simply
// overwrites the timestamp of the accessed block with the current one (no
// read-modify-write). Single port: one read or one write per cycle.
// Read data appears on `rdata` the cycle after a read with `en` high and
// `we` low, and holds until the next read. Contents are not reset; the
// valid bits of the tag array say which entries mean anything.
// The separate per-bank structure follows the original proposal; the single-port
// synchronous interface is this design's own choice.
module ts_array #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned TS_W  = 5
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [TS_W-1:0]          wdata,
  output logic [TS_W-1:0]          rdata
);
  logic [TS_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
