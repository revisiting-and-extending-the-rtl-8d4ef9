// ptl_xor: one dual-rail XOR cell of the skewing functions.
//
// The skewing functions are built from pass-transistor XOR cells rather than
// logic gates. The early-arriving address bit b (and its complement) drives
// the transistor gates and selects which rail of the late-arriving bit a
// (a or its complement) is passed to the output. Once b has settled, the
// delay from a to the output is only that of a conducting pass transistor.
// Both output rails are produced, because the row decoder that follows needs
// true and complemented index bits.
//
// At the register-transfer level the cell is a two-way selector steered by b:
//   y   = b ? a_n : a     (a XOR b)
//   y_n = b ? a   : a_n   (complement of a XOR b)
// The dual-rail interface and the role of b as the steering input follow the
// transistor circuit this cell stands for; the rails are assumed to be true
// complements of each other. Purely combinational, no clock.
module ptl_xor (
  input  logic a,    // late address bit (translated part)
  input  logic a_n,  // its complement
  input  logic b,    // early address bit (page-offset part)
  input  logic b_n,  // its complement
  output logic y,    // a XOR b
  output logic y_n   // NOT (a XOR b)
);
  // Pass gates: b closes the path from a_n, b_n closes the path from a.
  always_comb begin
    y   = (b & a_n) | (b_n & a);
    y_n = (b & a)   | (b_n & a_n);
  end
endmodule
