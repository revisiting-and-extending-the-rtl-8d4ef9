// tb_victim_select: victim choice among A, B (primary) and C, D (alternate)
// on random and directed inputs. Expected result: the oldest candidate
// (invalid = oldest), where C/D only count when the budget allows and A/B is
// valid with distance <= 3; ties go to A, then B, C, D.
module tb_victim_select
  import elbow_pkg::*;
;
  logic [4:0] tc;
  logic [3:0] valid;
  logic [4:0] ts [4];
  logic       allow, relocate;
  victim_e    victim;
  int checks = 0, failures = 0;
  int n_c = 0, n_d = 0, n_blk = 0;

  victim_select dut (.t_curr(tc), .valid(valid), .ts(ts), .allow(allow),
                     .victim(victim), .relocate(relocate));

  function automatic int ref_victim();
    int age [4], v;
    bit ok [4];
    for (int i = 0; i < 4; i++)
      age[i] = valid[i] ? ((tc >= ts[i]) ? int'(tc) - int'(ts[i]) : int'(tc) + 32 - int'(ts[i])) : 32;
    ok[2] = allow && valid[0] && age[0] <= 3;
    ok[3] = allow && valid[1] && age[1] <= 3;
    v = 0;
    if (age[1] > age[0]) v = 1;
    if (ok[2] && age[2] > age[v]) v = 2;
    if (ok[3] && age[3] > age[v]) v = 3;
    return v;
  endfunction

  task automatic run_one();
    int e;
    #1;
    e = ref_victim();
    checks++;
    if (int'(victim) != e || relocate != (e >= 2)) begin
      failures++;
      if (failures < 10) $display("FAIL victim=%0d expected %0d (tc=%0d v=%b ts=%0d %0d %0d %0d allow=%0b)",
                                  victim, e, tc, valid, ts[0], ts[1], ts[2], ts[3], allow);
    end
    if (e == 2) n_c++;
    if (e == 3) n_d++;
  endtask

  initial begin
    // Directed: young A, old C -> relocate A into C.
    tc = 5'd10; valid = 4'b1111; ts = '{5'd9, 5'd8, 5'd1, 5'd7}; allow = 1; run_one();
    checks++; if (victim != VIC_C) failures++;
    // Same but A too old (distance 4): no relocation, older primary chosen.
    ts = '{5'd6, 5'd8, 5'd1, 5'd7}; run_one();
    checks++; if (victim != VIC_A) failures++;
    // Budget exhausted.
    ts = '{5'd9, 5'd8, 5'd1, 5'd7}; allow = 0; run_one();
    checks++; if (relocate) failures++;
    // Wrapped timestamps: tc=2, C stored at 30 (distance 4) is older than A at 1.
    tc = 5'd2; ts = '{5'd1, 5'd0, 5'd30, 5'd1}; allow = 1; run_one();
    checks++; if (victim != VIC_C) failures++;
    // Empty primary wins.
    valid = 4'b1101; run_one();
    checks++; if (victim != VIC_B) failures++;
    for (int n = 0; n < 20000; n++) begin
      tc = 5'($urandom); valid = 4'($urandom) | 4'($urandom);
      for (int i = 0; i < 4; i++) ts[i] = tc - 5'($urandom_range(($urandom_range(1) == 0) ? 5 : 31));
      allow = ($urandom_range(3) != 0);
      run_one();
    end
    checks++;
    if (n_c == 0 || n_d == 0) begin failures++; $display("FAIL relocation cases not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
