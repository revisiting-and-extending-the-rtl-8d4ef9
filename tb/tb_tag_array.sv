// tb_tag_array: valid bits are clear after reset; random tag/valid writes
// and reads against a reference, read result checked the cycle after.
module tb_tag_array;
  logic clk = 0, rst_n = 0, en = 0, we = 0, wvalid = 0, rvalid;
  logic [7:0]  addr = 0;
  logic [18:0] wtag = 0, rtag, ref_tag [256], last_tag;
  logic        ref_v [256], last_v;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  tag_array dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 256; i++) ref_v[i] = 0;
    // After reset every entry reads invalid.
    for (int i = 0; i < 256; i++) begin
      en <= 1; we <= 0; addr <= 8'(i);
      @(posedge clk);
      #1;
      checks++;
      if (rvalid) begin failures++; if (failures < 10) $display("FAIL entry %0d valid after reset", i); end
    end
    last_v = 0; last_tag = rtag;
    for (int n = 0; n < 20000; n++) begin
      en <= ($urandom_range(4) != 0); we <= $urandom_range(1); addr <= 8'($urandom);
      wvalid <= ($urandom_range(5) != 0); wtag <= 19'($urandom);
      @(posedge clk);
      #1;
      if (en && we) begin ref_v[addr] = wvalid; ref_tag[addr] = wtag; end
      if (en && !we) begin last_v = ref_v[addr]; last_tag = ref_tag[addr]; end
      checks++;
      if (rvalid != last_v || (last_v && rtag != last_tag)) begin
        failures++;
        if (failures < 10) $display("FAIL rvalid=%0b rtag=%h exp %0b %h", rvalid, rtag, last_v, last_tag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
