// victim_select: picks the block to evict on an elbow-cache miss.
//
// A miss to address X has four candidate victims: A and B in X's two primary
// locations (bank 0 and bank 1) and C and D, the alternate locations of A and
// B in the other bank. The candidate with the largest CAT distance (the
// oldest) is chosen. Choosing C means A is moved to C's place and X takes A's
// old place; choosing D moves B likewise.
//
// Relocation is restricted: C (D) is a candidate only when relocation is
// enabled, the sliding-window budget allows it (`allow`), and A (B) is valid
// with a distance of at most MAX_MOVE_DIST (3 by default), i.e. it is young
// enough to be worth keeping. With RELOCATE = 0 the unit picks the older of A
// and B, which is the plain timestamp-based skewed cache.
//
// This design's own choices: an invalid candidate counts as older than any
// valid one (distance 2^n); ties go to the first of A, B, C, D, so an empty
// or equally old primary location is filled without moving anything.
// Combinational.
module victim_select
  import elbow_pkg::victim_e, elbow_pkg::VIC_A, elbow_pkg::VIC_B, elbow_pkg::VIC_C, elbow_pkg::VIC_D;
#(
  parameter int unsigned N             = 5,
  parameter int unsigned MAX_MOVE_DIST = 3,
  parameter bit          RELOCATE      = 1'b1
) (
  input  logic [N-1:0] t_curr,
  input  logic [3:0]   valid,     // [0]=A [1]=B [2]=C [3]=D
  input  logic [N-1:0] ts [4],    // stored timestamps, same order
  input  logic         allow,     // relocation budget not exhausted
  output victim_e      victim,
  output logic         relocate   // victim is C or D
);
  logic [N-1:0] d   [4];
  logic [N:0]   age [4];
  logic [3:0]   eligible;

  for (genvar i = 0; i < 4; i++) begin : g_dist
    cat_distance #(.N(N)) u_dist (.t_curr(t_curr), .t_st(ts[i]), .d(d[i]));
    assign age[i] = valid[i] ? {1'b0, d[i]} : (N+1)'(1 << N);
  end

  always_comb begin
    eligible[0] = 1'b1;
    eligible[1] = 1'b1;
    eligible[2] = RELOCATE && allow && valid[0] && (d[0] <= N'(MAX_MOVE_DIST));
    eligible[3] = RELOCATE && allow && valid[1] && (d[1] <= N'(MAX_MOVE_DIST));

    victim = VIC_A;
    if (age[1] > age[0])                              victim = VIC_B;
    if (eligible[2] && age[2] > age[victim])          victim = VIC_C;
    if (eligible[3] && age[3] > age[victim])          victim = VIC_D;
    relocate = (victim == VIC_C) || (victim == VIC_D);
  end
endmodule
