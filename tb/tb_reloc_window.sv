// tb_reloc_window: the relocation budget of 16 relocations in any window of
// 64 misses. A reference keeps the flags of the last 63 misses; a
// relocation is allowed while they hold fewer than 16. The stimulus
// relocates greedily in bursts so the budget runs out and recovers.
module tb_reloc_window;
  logic clk = 0, rst_n = 0, miss = 0, reloc = 0, allow;
  int checks = 0, failures = 0, cnt, n_block = 0, n_reloc = 0;
  bit hist [$];
  always #5 clk = ~clk;
  reloc_window dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 20000; n++) begin
      #1;
      cnt = 0;
      foreach (hist[i]) cnt += hist[i];
      checks++;
      if (allow != (cnt < 16)) begin
        failures++;
        if (failures < 10) $display("FAIL allow=%0b window count=%0d", allow, cnt);
      end
      miss  = ($urandom_range(3) != 0);
      reloc = miss && allow && ((n % 2000) < 1000 ? 1'b1 : ($urandom_range(7) == 0));
      if (miss && !allow) n_block++;
      if (reloc) n_reloc++;
      if (miss) begin
        hist.push_back(reloc);
        if (hist.size() > 63) void'(hist.pop_front());
      end
      @(posedge clk);
    end
    checks++;
    if (n_block == 0 || n_reloc == 0) begin failures++; $display("FAIL budget never exhausted"); end
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
