// skew_hash: the two skewing functions that give a block its row in each
// way-bank.
//
// The block address is split into the page-offset index bits b (address bits
// PAGE_W-1 .. OFF_W, available before translation) and bits a0, a1, ... of the
// translated part (address bits PAGE_W and up). With L = PAGE_W - OFF_W index
// bits in the page offset and H = IDX_W - L further bits:
//   bank 0 row: f1 = { a[H-1:0], b XOR a[H+L-1:H] }
//   bank 1 row: f2 = { a[H-1:0], sigma(b) XOR a[H+L-1:H] }
// where sigma is a one-bit rotation to the right (the least significant bit
// becomes the most significant). For the 32 KB default (IDX_W = 8, L = 7,
// H = 1) bit a0 is used directly as the top row bit and b12..b6 are XORed
// with a7..a1. The rotation is applied to the early bits b, so it is only
// wiring, and every XOR is a pass-transistor cell steered by an early bit.
// Both rails of every row bit are produced for the row decoders.
//
// Combinational. The XOR structure, the rotation and the restriction to the
// page-offset bits follow the original proposal; the exact choice of a-bits for
// sizes other than IDX_W = 8 is this design's own (IDX_W = 7, a 16 KB
// cache, has no directly used a-bits; IDX_W must be at least L).
module skew_hash #(
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned OFF_W  = 6,
  parameter int unsigned PAGE_W = 13,
  parameter int unsigned IDX_W  = 8
) (
  input  logic [ADDR_W-1:0] addr,     // byte or block address (offset bits ignored)
  output logic [IDX_W-1:0]  idx0,     // f1: row in bank 0
  output logic [IDX_W-1:0]  idx0_n,   // its complement, for the decoder
  output logic [IDX_W-1:0]  idx1,     // f2: row in bank 1
  output logic [IDX_W-1:0]  idx1_n
);
  localparam int unsigned L = PAGE_W - OFF_W;
  localparam int unsigned H = IDX_W - L;

  logic [L-1:0] b, b_rot, a_x;
  logic [L-1:0] f1, f1_n, f2, f2_n;

  assign b     = addr[OFF_W +: L];
  assign b_rot = {b[0], b[L-1:1]};
  assign a_x   = addr[PAGE_W + H +: L];

  for (genvar i = 0; i < L; i++) begin : g_xor
    ptl_xor u_f1 (.a(a_x[i]), .a_n(~a_x[i]), .b(b[i]),     .b_n(~b[i]),
                  .y(f1[i]),  .y_n(f1_n[i]));
    ptl_xor u_f2 (.a(a_x[i]), .a_n(~a_x[i]), .b(b_rot[i]), .b_n(~b_rot[i]),
                  .y(f2[i]),  .y_n(f2_n[i]));
  end

  if (H == 0) begin : g_no_hi
    assign idx0   = f1;
    assign idx0_n = f1_n;
    assign idx1   = f2;
    assign idx1_n = f2_n;
  end else begin : g_hi
    // Translated bits a0 .. a(H-1) fill the top of the row number directly.
    logic [H-1:0] a_hi;
    assign a_hi   = addr[PAGE_W +: H];
    assign idx0   = {a_hi, f1};
    assign idx0_n = {~a_hi, f1_n};
    assign idx1   = {a_hi, f2};
    assign idx1_n = {~a_hi, f2_n};
  end
endmodule
