// elbow_cache: a 2-way skewed-associative data cache with timestamp
// replacement and victim relocation (the "elbow" cache).
//
// Organisation. The cache is split into two way-banks of DEPTH blocks. A
// block may live in bank 0 at row f1(addr) or in bank 1 at row f2(addr),
// two different XOR skewing functions (skew_hash), so blocks that collide in
// one bank are usually apart in the other. Every access reads both candidate
// locations at once (tag, timestamp and data), through one decoder per bank.
//
// Replacement. A global cache-allocation-tick counter advances on every fill;
// its top TS_W bits are the current timestamp. A hit overwrites the accessed
// block's timestamp. On a load miss the resident blocks A (bank 0) and B
// (bank 1) are inspected, the alternate location of each in the other bank
// is computed (C for A, D for B) and the four timestamps are compared. The
// oldest block is the victim. If it is C (or D), A (or B) is first moved
// there and the missing block is then filled where A (B) was: the new block
// elbows the old one aside instead of evicting it. Relocation is only
// allowed when the block to be moved has a CAT distance of at most
// MAX_MOVE_DIST and the sliding window permits it (MAX_RELOC relocations in
// WINDOW misses). With RELOCATE = 0 the cache is a plain timestamp-based
// skewed cache.
//
// Processor port (valid/ready request, single response pulse):
//   one request at a time; `req_ready` is high only when idle. A load hit
//   answers on `resp_valid` exactly one cycle after the request is accepted.
//   A load miss answers when the fill has been written.
//   Stores write one 64-bit word: a store hit updates the word and the
//   timestamp, every store is also written through to L2, and a store miss
//   does not allocate. `resp_valid` acknowledges a store once L2 accepted it.
// L2 port: read requests return one whole block on `l2_resp_valid`; write
//   requests carry one word and return nothing.
// Event outputs pulse once per hit, per load miss and per relocation, the
//   quantities the cache's dynamic-power model is built from.
//
// Cycle by cycle: IDLE (accept, read both primary locations) -> LOOKUP
// (compare tags; on a hit update the timestamp and answer; on a load miss
// send the L2 read, compute the alternate rows and read their tags and
// timestamps) -> ALT (choose the victim, do the relocation write) -> FILL
// (wait for the block, write it, answer). The relocation is done while the
// L2 read is outstanding, off the critical path of the load.
//
// Taken from the original elbow-cache proposal: geometry (32 KB, 64-byte blocks, 2 banks of 256),
// skewing functions, 5-bit CAT timestamps with an 11-bit counter, four-way
// victim choice with relocation, distance limit 3, window 16 in 64.
// This design's own choices: the processor and L2 handshakes, write-through
// with no write allocation, one outstanding request, invalid blocks treated
// as the oldest, ties resolved in the order A, B, C, D.
module elbow_cache
  import elbow_pkg::*;
#(
  parameter int unsigned SIZE_BYTES    = 32768,
  parameter int unsigned BLOCK_BYTES   = 64,
  parameter int unsigned TS_BITS       = 5,
  parameter int unsigned WINDOW        = 64,
  parameter int unsigned MAX_RELOC     = 16,
  parameter int unsigned MAX_MOVE_DIST = 3,
  parameter bit          RELOCATE      = 1'b1
) (
  input  logic                clk,
  input  logic                rst_n,
  // processor side
  input  logic                req_valid,
  output logic                req_ready,
  input  logic                req_we,
  input  logic [ADDR_W-1:0]   req_addr,
  input  logic [WORD_W-1:0]   req_wdata,
  output logic                resp_valid,
  output logic [WORD_W-1:0]   resp_rdata,
  // L2 side
  output logic                l2_req_valid,
  input  logic                l2_req_ready,
  output logic                l2_req_we,
  output logic [ADDR_W-1:0]   l2_req_addr,
  output logic [WORD_W-1:0]   l2_req_wdata,
  input  logic                l2_resp_valid,
  input  logic [BLOCK_BYTES*8-1:0] l2_resp_data,
  // events
  output logic                ev_hit,
  output logic                ev_miss,
  output logic                ev_reloc
);
  localparam int unsigned BW    = BLOCK_BYTES * 8;
  localparam int unsigned OW    = $clog2(BLOCK_BYTES);
  localparam int unsigned DEPTH = SIZE_BYTES / BLOCK_BYTES / 2;
  localparam int unsigned IW    = $clog2(DEPTH);
  localparam int unsigned K     = $clog2(2 * DEPTH) + 2;
  localparam int unsigned TW    = ADDR_W - PAGE_W;
  localparam int unsigned SW    = $clog2(BW / WORD_W);

  typedef enum logic [2:0] {S_IDLE, S_LOOKUP, S_ALT, S_FILL, S_WT} state_e;
  state_e state;

  // ---------------------------------------------------------------- request
  logic [ADDR_W-1:0] addr_q;
  logic              we_q;
  logic [WORD_W-1:0] wdata_q;
  logic [IW-1:0]     idx_q [2];
  logic [TW-1:0]     tag_x;
  logic [SW-1:0]     wsel_x;
  logic [1:0]        hit_w;   // tag match per bank
  logic              hit;

  logic [IW-1:0] h_idx0, h_idx1, h_idx0_n, h_idx1_n;
  skew_hash #(.ADDR_W(ADDR_W), .OFF_W(OW), .PAGE_W(PAGE_W), .IDX_W(IW)) u_hash (
    .addr(req_addr), .idx0(h_idx0), .idx0_n(h_idx0_n), .idx1(h_idx1), .idx1_n(h_idx1_n));

  assign tag_x  = addr_q[ADDR_W-1:PAGE_W];
  assign wsel_x = addr_q[OW-1 -: SW];

  // ---------------------------------------------------------------- storage
  logic [1:0]     tg_en, tg_we, tg_wvalid, tg_rvalid;
  logic [IW-1:0]  tg_addr [2];
  logic [TW-1:0]  tg_wtag [2], tg_rtag [2];
  logic [1:0]     ts_en, ts_we;
  logic [IW-1:0]  ts_addr [2];
  logic [TS_BITS-1:0] ts_wdata [2], ts_rdata [2];
  logic [1:0]     d_en, d_we_blk, d_we_word;
  logic [IW-1:0]  d_row [2];
  logic [BW-1:0]  d_wblock [2], d_rblock [2];
  logic [WORD_W-1:0] d_rword;

  for (genvar b = 0; b < 2; b++) begin : g_bank
    tag_array #(.DEPTH(DEPTH), .TAG_W(TW)) u_tag (
      .clk(clk), .rst_n(rst_n), .en(tg_en[b]), .we(tg_we[b]), .addr(tg_addr[b]),
      .wvalid(tg_wvalid[b]), .wtag(tg_wtag[b]), .rvalid(tg_rvalid[b]), .rtag(tg_rtag[b]));
    ts_array #(.DEPTH(DEPTH), .TS_W(TS_BITS)) u_ts (
      .clk(clk), .en(ts_en[b]), .we(ts_we[b]), .addr(ts_addr[b]),
      .wdata(ts_wdata[b]), .rdata(ts_rdata[b]));
  end

  data_array #(.DEPTH(DEPTH), .BLOCK_W(BW), .WORD_W(WORD_W)) u_data (
    .clk(clk), .en(d_en), .we_blk(d_we_blk), .we_word(d_we_word), .row(d_row),
    .wblock(d_wblock), .wsel(wsel_x), .wword(wdata_q), .rblock(d_rblock),
    .word_sel(wsel_x), .way_sel(hit_w[1]), .rword(d_rword));

  // ---------------------------------------------------------------- time
  logic               alloc;
  logic [K-1:0]       cat;
  logic [TS_BITS-1:0] t_curr;
  cat_counter #(.K(K), .TS_W(TS_BITS)) u_cat (
    .clk(clk), .rst_n(rst_n), .alloc(alloc), .count(cat), .ts(t_curr));

  // ---------------------------------------------------------------- lookup
  assign hit_w[0] = tg_rvalid[0] && (tg_rtag[0] == tag_x);
  assign hit_w[1] = tg_rvalid[1] && (tg_rtag[1] == tag_x);
  assign hit      = |hit_w;

  // Alternate locations of the resident blocks A (bank 0) and B (bank 1).
  logic [ADDR_W-1:0] addr_a, addr_b;
  logic [IW-1:0]     alt_a, alt_b, unused_a0, unused_a0n, unused_a1n, unused_b1, unused_b0n, unused_b1n;
  skew_unhash #(.ADDR_W(ADDR_W), .OFF_W(OW), .PAGE_W(PAGE_W), .IDX_W(IW)) u_unh_a (
    .bank(1'b0), .row(idx_q[0]), .tag(tg_rtag[0]), .addr(addr_a));
  skew_unhash #(.ADDR_W(ADDR_W), .OFF_W(OW), .PAGE_W(PAGE_W), .IDX_W(IW)) u_unh_b (
    .bank(1'b1), .row(idx_q[1]), .tag(tg_rtag[1]), .addr(addr_b));
  skew_hash #(.ADDR_W(ADDR_W), .OFF_W(OW), .PAGE_W(PAGE_W), .IDX_W(IW)) u_hash_a (
    .addr(addr_a), .idx0(unused_a0), .idx0_n(unused_a0n), .idx1(alt_a), .idx1_n(unused_a1n));
  skew_hash #(.ADDR_W(ADDR_W), .OFF_W(OW), .PAGE_W(PAGE_W), .IDX_W(IW)) u_hash_b (
    .addr(addr_b), .idx0(alt_b), .idx0_n(unused_b0n), .idx1(unused_b1), .idx1_n(unused_b1n));

  // State of A and B saved at the miss; alternate rows of A and B.
  logic [TW-1:0]      tag_ab [2];
  logic [1:0]         v_ab;
  logic [TS_BITS-1:0] ts_ab [2];
  logic [IW-1:0]      alt_q [2];   // [0]: row of C in bank 1, [1]: row of D in bank 0

  // ---------------------------------------------------------------- victim
  logic               allow, relocate;
  victim_e            victim, victim_q;
  logic [TS_BITS-1:0] cand_ts [4];
  logic [3:0]         cand_v;

  assign cand_v  = {tg_rvalid[0], tg_rvalid[1], v_ab[1], v_ab[0]};
  assign cand_ts = '{ts_ab[0], ts_ab[1], ts_rdata[1], ts_rdata[0]};

  victim_select #(.N(TS_BITS), .MAX_MOVE_DIST(MAX_MOVE_DIST), .RELOCATE(RELOCATE)) u_vsel (
    .t_curr(t_curr), .valid(cand_v), .ts(cand_ts), .allow(allow),
    .victim(victim), .relocate(relocate));

  reloc_window #(.WINDOW(WINDOW), .MAX_RELOC(MAX_RELOC)) u_win (
    .clk(clk), .rst_n(rst_n), .miss(state == S_ALT), .reloc(relocate), .allow(allow));

  // Bank that receives the new block.
  logic xb;
  assign xb = (victim_q == VIC_B) || (victim_q == VIC_D);

  // ---------------------------------------------------------------- L2 side
  logic          rd_pend, wt_pend, fill_vld;
  logic [BW-1:0] fill_q;

  assign l2_req_valid = rd_pend || wt_pend;
  assign l2_req_we    = wt_pend;
  assign l2_req_addr  = wt_pend ? addr_q : {addr_q[ADDR_W-1:OW], {OW{1'b0}}};
  assign l2_req_wdata = wdata_q;

  // ---------------------------------------------------------------- control
  assign req_ready = (state == S_IDLE);
  assign alloc     = (state == S_FILL) && fill_vld;
  assign ev_hit    = (state == S_LOOKUP) && hit;
  assign ev_miss   = (state == S_LOOKUP) && !hit && !we_q;
  assign ev_reloc  = (state == S_ALT) && relocate;

  always_comb begin
    tg_en = '0; tg_we = '0; tg_wvalid = '0;
    ts_en = '0; ts_we = '0;
    d_en  = '0; d_we_blk = '0; d_we_word = '0;
    for (int b = 0; b < 2; b++) begin
      tg_addr[b]  = idx_q[b];
      tg_wtag[b]  = tag_x;
      ts_addr[b]  = idx_q[b];
      ts_wdata[b] = t_curr;
      d_row[b]    = idx_q[b];
      d_wblock[b] = fill_q;
    end
    resp_valid = 1'b0;
    resp_rdata = '0;

    unique case (state)
      S_IDLE: if (req_valid) begin
        tg_en = 2'b11; ts_en = 2'b11; d_en = 2'b11;
        tg_addr[0] = h_idx0; ts_addr[0] = h_idx0; d_row[0] = h_idx0;
        tg_addr[1] = h_idx1; ts_addr[1] = h_idx1; d_row[1] = h_idx1;
      end
      S_LOOKUP: begin
        if (hit) begin
          // Overwrite the timestamp of the accessed block.
          ts_en = hit_w; ts_we = hit_w;
          if (we_q) begin
            d_en = hit_w; d_we_word = hit_w;
          end else begin
            resp_valid = 1'b1;
            resp_rdata = d_rword;
          end
        end else if (!we_q) begin
          // Read the tags and timestamps of the alternate locations C and D.
          tg_en = 2'b11; ts_en = 2'b11;
          tg_addr[1] = alt_a; ts_addr[1] = alt_a;
          tg_addr[0] = alt_b; ts_addr[0] = alt_b;
        end
      end
      S_ALT: if (relocate) begin
        // Move A into C's place (bank 1) or B into D's place (bank 0).
        if (victim == VIC_C) begin
          tg_en[1] = 1'b1; tg_we[1] = 1'b1; tg_wvalid[1] = 1'b1; tg_addr[1] = alt_q[0];
          tg_wtag[1] = tag_ab[0];
          ts_en[1] = 1'b1; ts_we[1] = 1'b1; ts_addr[1] = alt_q[0]; ts_wdata[1] = ts_ab[0];
          d_en[1] = 1'b1; d_we_blk[1] = 1'b1; d_row[1] = alt_q[0]; d_wblock[1] = d_rblock[0];
        end else begin
          tg_en[0] = 1'b1; tg_we[0] = 1'b1; tg_wvalid[0] = 1'b1; tg_addr[0] = alt_q[1];
          tg_wtag[0] = tag_ab[1];
          ts_en[0] = 1'b1; ts_we[0] = 1'b1; ts_addr[0] = alt_q[1]; ts_wdata[0] = ts_ab[1];
          d_en[0] = 1'b1; d_we_blk[0] = 1'b1; d_row[0] = alt_q[1]; d_wblock[0] = d_rblock[1];
        end
      end
      S_FILL: if (fill_vld) begin
        tg_en[xb] = 1'b1; tg_we[xb] = 1'b1; tg_wvalid[xb] = 1'b1;
        ts_en[xb] = 1'b1; ts_we[xb] = 1'b1;
        d_en[xb]  = 1'b1; d_we_blk[xb] = 1'b1;
        resp_valid = 1'b1;
        resp_rdata = fill_q[wsel_x*WORD_W +: WORD_W];
      end
      S_WT: if (!wt_pend) resp_valid = 1'b1;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      rd_pend  <= 1'b0;
      wt_pend  <= 1'b0;
      fill_vld <= 1'b0;
      victim_q <= VIC_A;
    end else begin
      if (l2_req_valid && l2_req_ready) begin
        rd_pend <= 1'b0;
        wt_pend <= 1'b0;
      end
      if (l2_resp_valid) begin
        fill_vld <= 1'b1;
        fill_q   <= l2_resp_data;
      end
      unique case (state)
        S_IDLE: if (req_valid) begin
          addr_q   <= req_addr;
          we_q     <= req_we;
          wdata_q  <= req_wdata;
          idx_q[0] <= h_idx0;
          idx_q[1] <= h_idx1;
          state    <= S_LOOKUP;
        end
        S_LOOKUP: begin
          if (we_q) begin
            wt_pend <= 1'b1;
            state   <= S_WT;
          end else if (hit) begin
            state <= S_IDLE;
          end else begin
            rd_pend   <= 1'b1;
            tag_ab[0] <= tg_rtag[0];
            tag_ab[1] <= tg_rtag[1];
            v_ab      <= tg_rvalid;
            ts_ab[0]  <= ts_rdata[0];
            ts_ab[1]  <= ts_rdata[1];
            alt_q[0]  <= alt_a;
            alt_q[1]  <= alt_b;
            state     <= S_ALT;
          end
        end
        S_ALT: begin
          victim_q <= victim;
          state    <= S_FILL;
        end
        S_FILL: if (fill_vld) begin
          fill_vld <= 1'b0;
          state    <= S_IDLE;
        end
        S_WT: if (!wt_pend) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A block is never present in both banks.
  single_copy: assert property (@(posedge clk) disable iff (!rst_n)
    state == S_LOOKUP |-> !(hit_w[0] && hit_w[1]));
  // The L2 only answers a read that was asked for.
  fill_expected: assert property (@(posedge clk) disable iff (!rst_n)
    l2_resp_valid |-> (state == S_ALT || state == S_FILL) && !fill_vld);
endmodule
