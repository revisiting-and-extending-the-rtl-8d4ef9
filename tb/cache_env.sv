// cache_env: reusable random-traffic test environment for elbow_cache at a
// given size. It drives loads and stores over a working set of twice the
// cache's block count with a hot subset, plays the L2 (fixed read latency,
// randomly stalling request port, word contents a fixed function of the
// address until written), and runs a reference model of the replacement
// policy written from the policy rules: skewing functions for any row count,
// CAT timestamps, four-candidate victim choice, distance limit and
// relocation budget. Every load value, hit/miss and relocation decision and
// the one-cycle load-hit latency are checked, and every mechanism must occur.
// Results appear on `done`, `checks` and `failures`; the instantiating
// testbench prints them.
`timescale 1ns/1ps
module cache_env #(
  parameter int SIZE_BYTES = 32768,
  parameter bit RELOC      = 1'b1,
  parameter int N_ACC      = 100000
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int L2_LAT = 6;
  localparam int DEPTH  = SIZE_BYTES / 128;
  localparam int IW     = $clog2(DEPTH);
  localparam int H      = IW - 7;          // row bits taken directly from a0, a1, ...
  localparam int NPOOL  = 4 * DEPTH;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         req_valid, req_ready, req_we, resp_valid;
  logic [31:0]  req_addr;
  logic [63:0]  req_wdata, resp_rdata;
  logic         l2_req_valid, l2_req_ready, l2_req_we, l2_resp_valid;
  logic [31:0]  l2_req_addr;
  logic [63:0]  l2_req_wdata;
  logic [511:0] l2_resp_data;
  logic         ev_hit, ev_miss, ev_reloc;

  elbow_cache #(.SIZE_BYTES(SIZE_BYTES), .RELOCATE(RELOC)) dut (.*);

  initial begin checks = 0; failures = 0; done = 0; end
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------ memory
  logic [63:0] mem [longint];
  function automatic logic [63:0] rd_word(input logic [31:0] a);
    longint k = longint'(a >> 3);
    if (mem.exists(k)) return mem[k];
    return {a[31:3], 3'b101, ~a[31:3], 3'b010};
  endfunction

  // ------------------------------------------------------------ L2 model
  int          l2_cnt = -1;
  logic [31:0] l2_addr;
  always @(posedge clk) begin
    l2_req_ready  <= ($urandom_range(3) != 0);
    l2_resp_valid <= 1'b0;
    if (l2_req_valid && l2_req_ready) begin
      if (l2_req_we) mem[longint'(l2_req_addr >> 3)] = l2_req_wdata;
      else begin
        l2_cnt  <= L2_LAT;
        l2_addr <= l2_req_addr;
      end
    end
    if (l2_cnt > 0) l2_cnt <= l2_cnt - 1;
    if (l2_cnt == 0) begin
      l2_cnt        <= -1;
      l2_resp_valid <= 1'b1;
      for (int w = 0; w < 8; w++) l2_resp_data[w*64 +: 64] <= rd_word(l2_addr + 32'(w*8));
    end
  end

  // ------------------------------------------------------------ reference model
  logic        rv  [2][DEPTH];
  logic [18:0] rt  [2][DEPTH];
  logic [4:0]  rts [2][DEPTH];
  int          cat = 0;
  bit          hist [$];           // relocation flag of previous misses, newest last

  function automatic int f(input int bank, input logic [31:0] a);
    logic [6:0] b = a[12:6];
    logic [6:0] ax = 7'(a >> (13 + H));
    int hi = int'(a >> 13) & ((1 << H) - 1);
    if (bank == 1) b = {b[0], b[6:1]};
    return (hi << 7) | int'(b ^ ax);
  endfunction
  function automatic logic [31:0] rebuild(input int bank, input int row, input logic [18:0] t);
    logic [6:0] x = 7'(row) ^ 7'(t >> H);
    if (bank == 1) x = {x[5:0], x[6]};
    return {t, x, 6'b0};
  endfunction
  function automatic int cat_dist(input logic [4:0] tc, input logic [4:0] ts);
    return (int'(tc) >= int'(ts)) ? int'(tc) - int'(ts) : int'(tc) + 32 - int'(ts);
  endfunction

  int n_hit, n_miss, n_shit, n_smiss, n_empty, n_reloc_a, n_reloc_b, n_win_block, n_dist_block, n_wrap;

  // Returns expected {hit, reloc}; updates the model.
  task automatic model_access(input logic [31:0] a, input bit we, output bit hit, output bit reloc);
    int          r [2];
    logic [18:0] t = a[31:13];
    logic [4:0]  tc = 5'(cat >> (IW - 2));
    int age [4], vic, cnt, w;
    bit ok [4], vv [4];
    int alt [2];
    logic [4:0] cts [4];
    r[0] = f(0, a); r[1] = f(1, a);
    hit = 0; reloc = 0;
    for (int b = 0; b < 2; b++)
      if (rv[b][r[b]] && rt[b][r[b]] == t) begin hit = 1; rts[b][r[b]] = tc; end
    if (hit || we) return;
    // candidates A, B, C, D
    alt[0] = f(1, rebuild(0, r[0], rt[0][r[0]]));
    alt[1] = f(0, rebuild(1, r[1], rt[1][r[1]]));
    vv[0] = rv[0][r[0]];   cts[0] = rts[0][r[0]];
    vv[1] = rv[1][r[1]];   cts[1] = rts[1][r[1]];
    vv[2] = rv[1][alt[0]]; cts[2] = rts[1][alt[0]];
    vv[3] = rv[0][alt[1]]; cts[3] = rts[0][alt[1]];
    for (int i = 0; i < 4; i++) age[i] = vv[i] ? cat_dist(tc, cts[i]) : 32;
    cnt = 0;
    foreach (hist[i]) cnt += hist[i];
    ok[0] = 1; ok[1] = 1;
    ok[2] = RELOC && (cnt < 16) && vv[0] && age[0] <= 3;
    ok[3] = RELOC && (cnt < 16) && vv[1] && age[1] <= 3;
    vic = (age[1] > age[0]) ? 1 : 0;
    for (int i = 2; i < 4; i++) if (ok[i] && age[i] > age[vic]) vic = i;
    // mechanism bookkeeping
    if (!vv[0] || !vv[1]) n_empty++;
    for (int i = 2; i < 4; i++) begin
      if (age[i] > age[0] && age[i] > age[1] && vv[i-2] && age[i-2] <= 3 && cnt >= 16) n_win_block++;
      if (age[i] > age[0] && age[i] > age[1] && vv[i-2] && age[i-2] > 3) n_dist_block++;
    end
    reloc = (vic >= 2);
    if (vic == 2) begin
      n_reloc_a++;
      rv[1][alt[0]] = 1; rt[1][alt[0]] = rt[0][r[0]]; rts[1][alt[0]] = rts[0][r[0]];
    end
    if (vic == 3) begin
      n_reloc_b++;
      rv[0][alt[1]] = 1; rt[0][alt[1]] = rt[1][r[1]]; rts[0][alt[1]] = rts[1][r[1]];
    end
    w = (vic == 0 || vic == 2) ? 0 : 1;
    rv[w][r[w]] = 1; rt[w][r[w]] = t; rts[w][r[w]] = tc;
    if (cat == 8 * DEPTH - 1) n_wrap++;
    cat = (cat + 1) % (8 * DEPTH);
    hist.push_back(reloc);
    if (hist.size() > 63) void'(hist.pop_front());
  endtask

  // ------------------------------------------------------------ stimulus
  logic [31:0] pool [NPOOL];
  initial begin
    bit exp_hit, exp_reloc, got_hit, got_reloc;
    logic [31:0] a;
    longint t_acc;
    for (int b = 0; b < 2; b++) for (int i = 0; i < DEPTH; i++) rv[b][i] = 0;
    // Working set of twice the cache's blocks with a hot subset.
    for (int i = 0; i < NPOOL; i++) pool[i] = ($urandom & 32'hffff_e000) | ($urandom & 32'h0000_1fc0);
    req_valid = 0; req_we = 0; req_addr = 0; req_wdata = 0;
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < N_ACC; n++) begin
      int sel;
      sel = ($urandom_range(3) == 0) ? $urandom_range(NPOOL - 1) : $urandom_range(NPOOL * 3 / 10);
      a = pool[sel] | {26'd0, 3'($urandom_range(7)), 3'd0};
      req_we    <= ($urandom_range(9) == 0);
      req_addr  <= a;
      req_wdata <= {$urandom, $urandom};
      req_valid <= 1'b1;
      @(posedge clk);
      while (!req_ready) @(posedge clk);
      t_acc = cycle;
      req_valid <= 1'b0;
      got_hit = 0; got_reloc = 0;
      forever begin
        @(posedge clk);
        if (ev_hit) got_hit = 1;
        if (ev_reloc) got_reloc = 1;
        if (resp_valid) break;
      end
      model_access(a, req_we, exp_hit, exp_reloc);
      check(got_hit == exp_hit, $sformatf("access %0d addr %h hit %0d expected %0d", n, a, got_hit, exp_hit));
      check(got_reloc == exp_reloc, $sformatf("access %0d addr %h reloc %0d expected %0d", n, a, got_reloc, exp_reloc));
      if (req_we) begin
        mem[longint'(a >> 3)] = req_wdata;
        if (exp_hit) n_shit++; else n_smiss++;
      end else begin
        check(resp_rdata == rd_word(a), $sformatf("load %h got %h expected %h", a, resp_rdata, rd_word(a)));
        if (exp_hit) begin
          n_hit++;
          check(cycle - t_acc == 1, $sformatf("hit latency %0d cycles", cycle - t_acc));
        end else n_miss++;
      end
    end
    $display("hits=%0d misses=%0d store_hits=%0d store_misses=%0d empty_fills=%0d reloc_A=%0d reloc_B=%0d window_blocked=%0d distance_blocked=%0d cat_wraps=%0d",
             n_hit, n_miss, n_shit, n_smiss, n_empty, n_reloc_a, n_reloc_b, n_win_block, n_dist_block, n_wrap);
    check(n_hit > 0, "no load hit");
    check(n_miss > 0, "no load miss");
    check(n_shit > 0, "no store hit");
    check(n_smiss > 0, "no store miss");
    check(n_empty > 0, "no fill into an empty location");
    if (RELOC) begin
      check(n_reloc_a > 0, "no relocation of A");
      check(n_reloc_b > 0, "no relocation of B");
      check(n_win_block > 0, "window never refused a relocation");
      check(n_dist_block > 0, "distance limit never refused a relocation");
    end else begin
      check(n_reloc_a + n_reloc_b == 0, "relocation in a plain skewed cache");
    end
    check(n_wrap > 0, "CAT counter never wrapped");
    done = 1'b1;
  end
endmodule
