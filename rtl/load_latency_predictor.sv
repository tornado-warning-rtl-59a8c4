// load_latency_predictor: hybrid load latency prediction for the Zephyr
// latency prediction engine.
//
// Two parts, tried in order for every load:
//  * Latency History Table (LHT): a PC-indexed last-value predictor. Each
//    entry keeps the latency the last instance of the load saw and a 2-bit
//    confidence that grows while the latency repeats and clears when it
//    changes. A confident entry gives the prediction.
//  * Cache Latency Propagation (CLP), used when the LHT is not confident. A
//    PC-indexed stride address predictor guesses the load's address; if it
//    is confident, the guessed block is looked up in the SILO (Status of
//    In-flight Loads: block addresses of outstanding misses and the cycle
//    their data returns) and in the miss detection engine (a table of
//    counters of resident L1 blocks per hashed block address, where a zero
//    counter means "definite miss" and anything else "maybe hit").
//    A SILO hit predicts the time until that miss returns; a definite miss
//    predicts an L2 hit; otherwise an L1 hit is assumed.
// A load that no part can predict gets the L1 hit latency, as in a plain
// Cyclone scheduler. PORTS predictions are made per cycle.
//
// Interface: q_* is combinational (prediction in the same cycle). The
// training inputs come from the memory system: upd_* on load completion
// (pc, address, observed latency), fill/evict on L1 block fills and
// evictions, miss_* when a load misses (block address and return cycle).
// All tables are written at the clock edge.
// The structure (LHT, address predictor, miss detection engine, SILO, the
// fall-back to a hit) follows the published scheme; table sizes, the
// confidence rule, the stride predictor, the counter filter used as the
// miss detection engine and "definite miss -> L2 latency" are this design's
// choices.
module load_latency_predictor
  import zephyr_pkg::*;
#(
  parameter int PORTS        = 2,
  parameter int LHT_ENTRIES  = 1024,
  parameter int AP_ENTRIES   = 1024,
  parameter int MDE_ENTRIES  = 1024,
  parameter int SILO_ENTRIES = 16,
  parameter int L1_LAT       = 2,
  parameter int L2_LAT       = 12,
  parameter int BLOCK_BITS   = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TS_W-1:0]   now,
  // predictions
  input  logic [PORTS-1:0]  q_valid,
  input  logic [31:0]       q_pc   [PORTS],
  output logic [WAIT_W-1:0] q_lat  [PORTS],
  output logic [1:0]        q_src  [PORTS],   // 0 default, 1 LHT, 2 SILO, 3 definite miss
  // training
  input  logic              upd_valid,
  input  logic [31:0]       upd_pc,
  input  logic [31:0]       upd_addr,
  input  logic [WAIT_W-1:0] upd_lat,
  input  logic              fill_valid,
  input  logic [31:0]       fill_addr,
  input  logic              evict_valid,
  input  logic [31:0]       evict_addr,
  input  logic              miss_valid,
  input  logic [31:0]       miss_addr,
  input  logic [TS_W-1:0]   miss_done_ts
);

  localparam int LI = $clog2(LHT_ENTRIES);
  localparam int AI = $clog2(AP_ENTRIES);
  localparam int MI = $clog2(MDE_ENTRIES);
  localparam int SI = (SILO_ENTRIES > 1) ? $clog2(SILO_ENTRIES) : 1;
  localparam int BW = 32 - BLOCK_BITS;

  // LHT
  logic [LHT_ENTRIES-1:0] lht_v;
  logic [WAIT_W-1:0]      lht_lat  [LHT_ENTRIES];
  logic [1:0]             lht_conf [LHT_ENTRIES];
  // address predictor
  logic [AP_ENTRIES-1:0]  ap_v;
  logic [31:0]            ap_last   [AP_ENTRIES];
  logic [31:0]            ap_stride [AP_ENTRIES];
  logic [1:0]             ap_conf   [AP_ENTRIES];
  // miss detection engine
  logic [2:0]             mde_cnt [MDE_ENTRIES];
  // SILO
  logic [SILO_ENTRIES-1:0] silo_v;
  logic [BW-1:0]           silo_blk [SILO_ENTRIES];
  logic [TS_W-1:0]         silo_ts  [SILO_ENTRIES];
  logic [SI-1:0]           silo_rr;

  function automatic logic [LI-1:0] lht_idx(logic [31:0] pc); return pc[2 +: LI]; endfunction
  function automatic logic [AI-1:0] ap_idx(logic [31:0] pc);  return pc[2 +: AI]; endfunction
  function automatic logic [MI-1:0] mde_idx(logic [31:0] a);
    return a[BLOCK_BITS +: MI] ^ MI'(a[31:BLOCK_BITS+MI]);
  endfunction

  // ---- prediction ----
  always_comb begin
    for (int p = 0; p < PORTS; p++) begin
      logic [LI-1:0] li;
      logic [AI-1:0] ai;
      logic [31:0]   pa;
      logic          silo_hit;
      logic [WAIT_W-1:0] silo_lat;
      li = lht_idx(q_pc[p]);
      ai = ap_idx(q_pc[p]);
      pa = ap_last[ai] + ap_stride[ai];
      silo_hit = 1'b0;
      silo_lat = '0;
      for (int s = 0; s < SILO_ENTRIES; s++) begin
        if (silo_v[s] && silo_blk[s] == pa[31:BLOCK_BITS]) begin
          silo_hit = 1'b1;
          silo_lat = ts_remaining(silo_ts[s], now);
        end
      end
      q_lat[p] = WAIT_W'(L1_LAT);
      q_src[p] = 2'd0;
      if (q_valid[p]) begin
        if (lht_v[li] && lht_conf[li] >= 2'd2) begin
          q_lat[p] = lht_lat[li];
          q_src[p] = 2'd1;
        end else if (ap_v[ai] && ap_conf[ai] >= 2'd2) begin
          if (silo_hit) begin
            q_lat[p] = (silo_lat > WAIT_W'(L1_LAT)) ? silo_lat : WAIT_W'(L1_LAT);
            q_src[p] = 2'd2;
          end else if (mde_cnt[mde_idx(pa)] == '0) begin
            q_lat[p] = WAIT_W'(L2_LAT);
            q_src[p] = 2'd3;
          end
        end
      end
    end
  end

  // ---- training ----
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      lht_v   <= '0;
      ap_v    <= '0;
      silo_v  <= '0;
      silo_rr <= '0;
      for (int m = 0; m < MDE_ENTRIES; m++) mde_cnt[m] <= '0;
    end else begin
      if (upd_valid) begin
        logic [LI-1:0] li;
        logic [AI-1:0] ai;
        logic [31:0]   st;
        li = lht_idx(upd_pc);
        ai = ap_idx(upd_pc);
        lht_v[li] <= 1'b1;
        if (lht_v[li] && lht_lat[li] == upd_lat) begin
          if (lht_conf[li] != 2'd3) lht_conf[li] <= lht_conf[li] + 2'd1;
        end else begin
          lht_lat[li]  <= upd_lat;
          lht_conf[li] <= '0;
        end
        st = upd_addr - ap_last[ai];
        ap_v[ai]    <= 1'b1;
        ap_last[ai] <= upd_addr;
        if (ap_v[ai] && st == ap_stride[ai]) begin
          if (ap_conf[ai] != 2'd3) ap_conf[ai] <= ap_conf[ai] + 2'd1;
        end else begin
          ap_stride[ai] <= ap_v[ai] ? st : '0;
          ap_conf[ai]   <= '0;
        end
      end
      // miss detection engine: resident-block counters
      if (fill_valid && !(evict_valid && mde_idx(fill_addr) == mde_idx(evict_addr))) begin
        if (mde_cnt[mde_idx(fill_addr)] != '1)
          mde_cnt[mde_idx(fill_addr)] <= mde_cnt[mde_idx(fill_addr)] + 3'd1;
      end
      if (evict_valid && !(fill_valid && mde_idx(fill_addr) == mde_idx(evict_addr))) begin
        if (mde_cnt[mde_idx(evict_addr)] != '0)
          mde_cnt[mde_idx(evict_addr)] <= mde_cnt[mde_idx(evict_addr)] - 3'd1;
      end
      // SILO: retire returned misses, allocate new ones
      for (int s = 0; s < SILO_ENTRIES; s++)
        if (silo_v[s] && ts_reached(silo_ts[s], now)) silo_v[s] <= 1'b0;
      if (miss_valid) begin
        logic          found;
        logic [SI-1:0] slot;
        found = 1'b0;
        slot  = silo_rr;
        for (int s = 0; s < SILO_ENTRIES; s++)
          if (!found && !silo_v[s]) begin found = 1'b1; slot = SI'(s); end
        silo_v[slot]   <= 1'b1;
        silo_blk[slot] <= miss_addr[31:BLOCK_BITS];
        silo_ts[slot]  <= miss_done_ts;
        if (!found) silo_rr <= silo_rr + 1'b1;
      end
    end
  end

endmodule
