// tb_data_array: two banks read at independent rows in the same cycle,
// block writes, word writes, and the column / way-select multiplexers,
// checked against a reference copy of both banks.
module tb_data_array;
  logic clk = 0;
  logic [1:0]   en = 0, we_blk = 0, we_word = 0;
  logic [7:0]   row [2];
  logic [511:0] wblock [2], rblock [2], ref_b [2][256], last [2];
  logic [2:0]   wsel = 0, word_sel = 0;
  logic [63:0]  wword = 0, rword;
  logic         way_sel = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  data_array dut (.*);

  function automatic logic [511:0] rnd_block();
    logic [511:0] v;
    for (int i = 0; i < 16; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      en <= 2'b11; we_blk <= 2'b11; row[0] <= 8'(i); row[1] <= 8'(i);
      wblock[0] <= rnd_block(); wblock[1] <= rnd_block();
      @(posedge clk);
      #1;
      ref_b[0][i] = wblock[0]; ref_b[1][i] = wblock[1];
    end
    last[0] = rblock[0]; last[1] = rblock[1];
    for (int n = 0; n < 10000; n++) begin
      for (int b = 0; b < 2; b++) begin
        en[b] <= ($urandom_range(4) != 0);
        we_blk[b]  <= ($urandom_range(5) == 0);
        we_word[b] <= ($urandom_range(3) == 0);
        row[b] <= 8'($urandom);
        wblock[b] <= rnd_block();
      end
      wsel <= 3'($urandom); wword <= {$urandom, $urandom};
      @(posedge clk);
      #1;
      for (int b = 0; b < 2; b++) if (en[b]) begin
        if (we_blk[b]) ref_b[b][row[b]] = wblock[b];
        else if (we_word[b]) ref_b[b][row[b]][wsel*64 +: 64] = wword;
        else last[b] = ref_b[b][row[b]];
      end
      word_sel = 3'($urandom); way_sel = $urandom_range(1);
      #1;
      checks += 2;
      if (rblock[0] != last[0] || rblock[1] != last[1]) begin
        failures++; if (failures < 10) $display("FAIL block read at cycle %0d", n);
      end
      if (rword != last[way_sel][word_sel*64 +: 64]) begin
        failures++; if (failures < 10) $display("FAIL rword way %0d word %0d", way_sel, word_sel);
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
