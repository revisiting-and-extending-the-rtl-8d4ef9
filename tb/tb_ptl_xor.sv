// tb_ptl_xor: exhaustive test of the dual-rail XOR cell over all four
// input combinations with complementary rails.
module tb_ptl_xor;
  logic a, b, y, y_n;
  int checks = 0, failures = 0;
  ptl_xor dut (.a(a), .a_n(~a), .b(b), .b_n(~b), .y(y), .y_n(y_n));
  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks += 2;
      if (y !== (a ^ b))   begin failures++; $display("FAIL y a=%0b b=%0b", a, b); end
      if (y_n !== ~(a ^ b)) begin failures++; $display("FAIL y_n a=%0b b=%0b", a, b); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
