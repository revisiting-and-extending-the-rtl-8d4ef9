// tb_cache_sizes: the elbow cache at the two other sizes it is meant to
// scale to, 16 KB (128 rows per bank, no untranslated top row bits) and
// 64 KB (512 rows per bank, top row bits a1 a0), each under random traffic
// checked by a cache_env reference model. Both run side by side; the result
// line sums their checks and failures.
`timescale 1ns/1ps
module tb_cache_sizes;
  logic done16, done64;
  int   checks16, failures16, checks64, failures64;

  cache_env #(.SIZE_BYTES(16384), .RELOC(1'b1), .N_ACC(60000)) env16 (
    .done(done16), .checks(checks16), .failures(failures16));
  cache_env #(.SIZE_BYTES(65536), .RELOC(1'b1), .N_ACC(120000)) env64 (
    .done(done64), .checks(checks64), .failures(failures64));

  initial begin
    wait (done16 && done64);
    $display("16 KB: checks=%0d failures=%0d   64 KB: checks=%0d failures=%0d",
             checks16, failures16, checks64, failures64);
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks64, failures16 + failures64);
    $finish;
  end

  initial begin
    #50_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks16 + checks64, failures16 + failures64 + 1);
    $finish;
  end
endmodule
