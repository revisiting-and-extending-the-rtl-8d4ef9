// tb_skew_hash: checks both skewing functions of the 32 KB configuration on
// random addresses against the bit-level definition
//   f1 = {a0, b12..b6 XOR a7..a1},  f2 = {a0, rotr(b12..b6) XOR a7..a1}
// (address bits: b = [12:6], a0 = [13], a7..a1 = [20:14]), the complement
// rails, and that skew_unhash gives back the block address from either
// bank's row and the tag.
module tb_skew_hash;
  logic [31:0] addr, back0, back1;
  logic [7:0]  i0, i0n, i1, i1n, e0, e1;
  logic [6:0]  b;
  int checks = 0, failures = 0;

  skew_hash dut (.addr(addr), .idx0(i0), .idx0_n(i0n), .idx1(i1), .idx1_n(i1n));
  skew_unhash u0 (.bank(1'b0), .row(i0), .tag(addr[31:13]), .addr(back0));
  skew_unhash u1 (.bank(1'b1), .row(i1), .tag(addr[31:13]), .addr(back1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s addr=%h", what, addr); end
  endtask

  initial begin
    for (int n = 0; n < 5000; n++) begin
      addr = $urandom;
      if (n == 0) addr = 32'h0000_0040;   // single b bit: rotation visible
      #1;
      b  = addr[12:6];
      e0 = {addr[13], b ^ addr[20:14]};
      e1 = {addr[13], {b[0], b[6:1]} ^ addr[20:14]};
      check(i0 == e0, "f1");
      check(i1 == e1, "f2");
      check(i0n == ~e0 && i1n == ~e1, "complement rails");
      check(back0 == {addr[31:6], 6'b0}, "unhash bank 0");
      check(back1 == {addr[31:6], 6'b0}, "unhash bank 1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
