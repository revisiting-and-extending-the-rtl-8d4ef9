// tb_cat_distance: exhaustive check of the 5-bit timestamp distance,
// d = Tcurr - Tst without wrap and Tcurr + 32 - Tst with wrap.
module tb_cat_distance;
  logic [4:0] tc, tst, d;
  int checks = 0, failures = 0, e;
  cat_distance dut (.t_curr(tc), .t_st(tst), .d(d));
  initial begin
    for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++) begin
      tc = 5'(i); tst = 5'(j);
      #1;
      e = (i >= j) ? i - j : i + 32 - j;
      checks++;
      if (int'(d) != e) begin failures++; $display("FAIL tc=%0d ts=%0d d=%0d exp %0d", i, j, d, e); end
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
