// tb_cat_counter: the CAT counter advances only on allocations, exposes its
// top 5 bits as the timestamp, and wraps after 2048 allocations (11 bits).
module tb_cat_counter;
  logic clk = 0, rst_n = 0, alloc = 0;
  logic [10:0] count;
  logic [4:0]  ts;
  int checks = 0, failures = 0, expect_cnt = 0;
  always #5 clk = ~clk;
  cat_counter dut (.*);
  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 6000; n++) begin
      alloc <= ($urandom_range(2) != 0);
      @(posedge clk);
      #1;
      if (alloc) expect_cnt = (expect_cnt + 1) % 2048;
      checks++;
      if (count != 11'(expect_cnt) || ts != 5'(expect_cnt >> 6)) begin
        failures++;
        if (failures < 10) $display("FAIL count=%0d ts=%0d expected %0d", count, ts, expect_cnt);
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
