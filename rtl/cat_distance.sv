// cat_distance: age of a block in timestamp units.
//
// The distance between the current timestamp Tcurr and a stored timestamp
// Tst, both n bits wide, is
//   d = Tcurr - Tst          when Tcurr >= Tst
//   d = Tcurr + 2^n - Tst    when Tcurr <  Tst (the counter has wrapped)
// which is the n-bit modular difference. The block with the largest
// distance is the least recently used one. Both cases are computed as the
// design states them and selected by the comparison. Combinational.
module cat_distance #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] t_curr,  // current timestamp
  input  logic [N-1:0] t_st,    // stored timestamp of a block
  output logic [N-1:0] d        // distance
);
  logic [N:0] no_wrap, wrap;

  always_comb begin
    no_wrap = {1'b0, t_curr} - {1'b0, t_st};
    wrap    = {1'b0, t_curr} + (N+1)'(1 << N) - {1'b0, t_st};
    d       = (t_curr >= t_st) ? no_wrap[N-1:0] : wrap[N-1:0];
  end
endmodule
