// data_array: the data store of both way-banks with its output selection.
//
// Physically the two logical way-banks share one array with their bit-lines
// interleaved (bit-line n of bank 0 next to bit-line n of bank 1), the way a
// 2-way set-associative array is laid out. Unlike that array, each bank has
// its own row decoder, so bank 0 and bank 1 are read at two different rows
// in the same access: the rows given by the two skewing functions. Below the
// array, column multiplexers pick one word of each bank's block and the
// way-select multiplexer picks the bank that hit.
//
// Here the two banks are two memories, one per decoder, each with a single
// port; bit-line interleaving is a layout matter with no effect on the
// logic. Per bank and per cycle: read a whole block (`en`, no write), write
// a whole block (`we_blk`, fill or relocation) or write one word
// (`we_word`, store hit). Read blocks appear on `rblock` the cycle after the
// read and hold until the next read of that bank. `rword` is combinational
// from the held blocks, `word_sel` and `way_sel`.
// Two decoders, one shared read access and the way-select stage follow the
// original proposal; the port set and timing are this design's own choices.
module data_array #(
  parameter int unsigned DEPTH   = 256,
  parameter int unsigned BLOCK_W = 512,
  parameter int unsigned WORD_W  = 64
) (
  input  logic                             clk,
  input  logic [1:0]                       en,        // per bank access
  input  logic [1:0]                       we_blk,    // per bank block write
  input  logic [1:0]                       we_word,   // per bank word write
  input  logic [$clog2(DEPTH)-1:0]         row [2],   // decoder inputs
  input  logic [BLOCK_W-1:0]               wblock [2],
  input  logic [$clog2(BLOCK_W/WORD_W)-1:0] wsel,     // word written by we_word
  input  logic [WORD_W-1:0]                wword,
  output logic [BLOCK_W-1:0]               rblock [2],
  input  logic [$clog2(BLOCK_W/WORD_W)-1:0] word_sel, // column mux select
  input  logic                             way_sel,   // way-select mux
  output logic [WORD_W-1:0]                rword
);
  logic [BLOCK_W-1:0] bank0 [DEPTH];
  logic [BLOCK_W-1:0] bank1 [DEPTH];
  logic [WORD_W-1:0]  col [2];

  always_ff @(posedge clk) begin
    if (en[0]) begin
      if (we_blk[0])       bank0[row[0]] <= wblock[0];
      else if (we_word[0]) bank0[row[0]][wsel*WORD_W +: WORD_W] <= wword;
      else                 rblock[0] <= bank0[row[0]];
    end
  end

  always_ff @(posedge clk) begin
    if (en[1]) begin
      if (we_blk[1])       bank1[row[1]] <= wblock[1];
      else if (we_word[1]) bank1[row[1]][wsel*WORD_W +: WORD_W] <= wword;
      else                 rblock[1] <= bank1[row[1]];
    end
  end

  // Column multiplexers, then the way-select multiplexer.
  assign col[0] = rblock[0][word_sel*WORD_W +: WORD_W];
  assign col[1] = rblock[1][word_sel*WORD_W +: WORD_W];
  assign rword  = way_sel ? col[1] : col[0];
endmodule
