// tb_ts_array: random reads and writes of a 256 x 5-bit timestamp array
// against a reference array; read data is checked the cycle after the read
// and must hold through following write cycles.
module tb_ts_array;
  logic clk = 0, en = 0, we = 0;
  logic [7:0] addr = 0;
  logic [4:0] wdata = 0, rdata, ref_mem [256], last;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  ts_array dut (.*);
  initial begin
    for (int i = 0; i < 256; i++) begin
      en <= 1; we <= 1; addr <= 8'(i); wdata <= 5'(i * 7); ref_mem[i] = 5'(i * 7);
      @(posedge clk);
    end
    last = rdata;
    for (int n = 0; n < 20000; n++) begin
      en <= ($urandom_range(4) != 0); we <= $urandom_range(1); addr <= 8'($urandom); wdata <= 5'($urandom);
      @(posedge clk);
      #1;
      if (en && we) ref_mem[addr] = wdata;
      if (en && !we) last = ref_mem[addr];
      checks++;
      if (rdata != last) begin failures++; if (failures < 10) $display("FAIL rdata=%0d exp %0d", rdata, last); end
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
