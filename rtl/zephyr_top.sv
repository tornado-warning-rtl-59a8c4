// zephyr_top: the Zephyr instruction scheduler for an SMT core, with the
// Sliding Window tornado guard.
//
// A speculative Cyclone scheduler replays instructions that reach its head
// before their operands are ready; in an SMT core one thread's replays and
// the switchback conflicts they cause can feed each other (a "tornado") and
// starve the other threads. Zephyr keeps the Cyclone queues lightly loaded:
//
//   dispatch --> latency prediction --> coarse sorting FIFOs --> per-thread
//   (renamed)    (timing table +        (lengths 1/5/10/20/150)   PreIssue
//                 load latency                                     Buffers
//                 predictor)                                          |
//                                           ICOUNT + Sliding Window   v
//   execution <-- ready-bit check <-- Cyclone switchback queues <-- select
//                       |  replay (re-evaluated wait) ^
//                       +-----------------------------+
//
// 1. Latency prediction: the timing table gives each instruction its wait
//    (MAX over its sources' expected ready times) and records when its
//    result will be ready (wait + latency). Loads use the load latency
//    predictor (at most two per cycle; further loads in the group, and loads
//    it cannot predict, assume an L1 hit). The instruction carries the
//    predicted operand-ready cycle (ready_ts) from here on.
// 2. Coarse sorting: the instruction waits in a FIFO whose length is its wait
//    rounded down, so it arrives in its thread's PIB close to its issue time.
// 3. ICOUNT picks the non-empty PIB of the thread with the fewest
//    instructions in Cyclone; the thread's Sliding Window may cap that number.
// 4. Cyclone finishes the remaining wait (fine-grain sorting), checks the
//    physical-register ready bits at the head and issues or selectively
//    replays. Replay counts per thread drive the Sliding Window.
//
// Interface: dispatch takes a contiguous list of up to DISP_W renamed
// instructions per cycle and reports how many it accepted (the rest are
// offered again). Up to ISSUE_W instructions issue per cycle; the execution
// core reports on wb_* when a physical register becomes usable (a wb in
// cycle t lets a dependent issue in t+1), and trains the load predictor on
// the ld_upd/fill/evict/miss ports. Statistics outputs expose replays,
// switchback hazards, occupancy and the Sliding Window state.
// The stage order, queue sizes, ICOUNT policy and Sliding Window follow the
// published design; the port protocol and the execution-feedback interface
// are this design's.
module zephyr_top
  import zephyr_pkg::*;
#(
  parameter int THREADS        = 4,
  parameter int ISSUE_W        = 8,
  parameter int DISP_W         = 8,
  parameter int CYC_LEN        = 100,
  parameter int PIB_DEPTH      = 64,
  parameter int WB_PORTS       = 16,
  parameter bit SLIDING_WINDOW = 1'b1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // dispatch
  input  logic [DISP_W-1:0]    disp_valid,
  input  uop_t                 disp_uop   [DISP_W],
  output logic [3:0]           disp_count,
  // issue
  output logic [ISSUE_W-1:0]   iss_valid,
  output uop_t                 iss_uop    [ISSUE_W],
  // execution feedback
  input  logic [WB_PORTS-1:0]  wb_valid,
  input  logic [PREG_W-1:0]    wb_preg    [WB_PORTS],
  // load predictor training
  input  logic                 ld_upd_valid,
  input  logic [31:0]          ld_upd_pc,
  input  logic [31:0]          ld_upd_addr,
  input  logic [WAIT_W-1:0]    ld_upd_lat,
  input  logic                 fill_valid,
  input  logic [31:0]          fill_addr,
  input  logic                 evict_valid,
  input  logic [31:0]          evict_addr,
  input  logic                 miss_valid,
  input  logic [31:0]          miss_addr,
  input  logic [TS_W-1:0]      miss_done_ts,
  // statistics
  output logic [TS_W-1:0]      now,
  output logic [ISSUE_W-1:0]   st_replay,
  output logic [10:0]          st_hazards,
  output logic [10:0]          st_occ        [THREADS],
  output logic [6:0]           st_pib_count  [THREADS],
  output logic [7:0]           st_win        [THREADS],
  output logic [THREADS-1:0]   st_win_unlimited,
  output logic [THREADS-1:0]   st_decr,
  output logic [THREADS-1:0]   st_incr,
  output logic [THREADS-1:0]   st_capped,
  output logic [4:0]           st_disp_fifo  [DISP_W],
  output logic [1:0]           st_pred_src   [2]
);

  localparam int N_FIFO = 16;
  localparam int LD_PORTS = 2;

  always_ff @(posedge clk) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  // ---------------- latency prediction engine ----------------
  logic [LD_PORTS-1:0] q_valid;
  logic [31:0]         q_pc  [LD_PORTS];
  logic [WAIT_W-1:0]   q_lat [LD_PORTS];
  logic [1:0]          q_src [LD_PORTS];
  logic [WAIT_W-1:0]   d_lat [DISP_W];
  logic [WAIT_W-1:0]   d_wait [DISP_W];
  logic [DISP_W-1:0]   d_accept;
  uop_t                s_uop [DISP_W];

  logic [1:0] port_of [DISP_W];   // 0: no port, else port + 1
  always_comb begin
    int nld;
    nld = 0;
    q_valid = '0;
    for (int p = 0; p < LD_PORTS; p++) q_pc[p] = '0;
    for (int i = 0; i < DISP_W; i++) begin
      port_of[i] = 2'd0;
      if (disp_valid[i] && disp_uop[i].op == OP_LOAD && nld < LD_PORTS) begin
        q_valid[nld] = 1'b1;
        q_pc[nld]    = disp_uop[i].pc;
        port_of[i]   = 2'(nld + 1);
        nld++;
      end
    end
  end

  always_comb begin
    for (int i = 0; i < DISP_W; i++) begin
      d_lat[i] = op_latency(disp_uop[i].op);
      for (int p = 0; p < LD_PORTS; p++)
        if (int'(port_of[i]) == p + 1) d_lat[i] = q_lat[p];
    end
  end

  load_latency_predictor #(.PORTS(LD_PORTS), .L1_LAT(LAT_L1), .L2_LAT(LAT_L2)) u_llp (
    .clk, .rst_n, .now,
    .q_valid, .q_pc, .q_lat, .q_src,
    .upd_valid(ld_upd_valid), .upd_pc(ld_upd_pc), .upd_addr(ld_upd_addr), .upd_lat(ld_upd_lat),
    .fill_valid, .fill_addr, .evict_valid, .evict_addr,
    .miss_valid, .miss_addr, .miss_done_ts);

  uop_t              head_uop [ISSUE_W];
  logic [WAIT_W-1:0] rp_wait  [ISSUE_W];

  timing_table #(.THREADS(THREADS), .DISP_W(DISP_W), .RD_PORTS(ISSUE_W)) u_tt (
    .clk, .rst_n,
    .d_valid(disp_valid), .d_uop(disp_uop), .d_lat, .d_accept, .d_wait,
    .r_uop(head_uop), .r_wait(rp_wait));

  always_comb begin
    for (int i = 0; i < DISP_W; i++) begin
      s_uop[i]          = disp_uop[i];
      s_uop[i].ready_ts = now + TS_W'(d_wait[i]);
      d_accept[i]       = 32'(i) < 32'(disp_count);
    end
  end

  // ---------------- coarse-grain sorting engine ----------------
  logic [6:0]        pib_free [THREADS];
  logic [N_FIFO-1:0] so_valid;
  uop_t              so_uop [N_FIFO];

  coarse_sort_engine #(.THREADS(THREADS), .DISP_W(DISP_W)) u_sort (
    .clk, .rst_n, .now,
    .in_valid(disp_valid), .in_uop(s_uop), .in_wait(d_wait),
    .in_count(disp_count), .in_fifo(st_disp_fifo),
    .pib_free, .out_valid(so_valid), .out_uop(so_uop));

  // ---------------- PreIssue Buffers ----------------
  uop_t       pib_out [THREADS][ISSUE_W];
  logic [6:0] pib_count [THREADS];
  logic       sel_valid;
  logic [1:0] sel_tid;
  logic [3:0] sel_n;

  for (genvar t = 0; t < THREADS; t++) begin : g_pib
    logic [N_FIFO-1:0] in_v;
    always_comb
      for (int f = 0; f < N_FIFO; f++) in_v[f] = so_valid[f] && int'(so_uop[f].tid) == t;
    pib #(.DEPTH(PIB_DEPTH), .IN_W(N_FIFO), .OUT_W(ISSUE_W)) u_pib (
      .clk, .rst_n, .in_valid(in_v), .in_uop(so_uop),
      .free(pib_free[t]), .count(pib_count[t]), .out_uop(pib_out[t]),
      .pop_n((sel_valid && int'(sel_tid) == t) ? sel_n : 4'd0));
  end

  // ---------------- Sliding Window per thread ----------------
  logic [7:0]         win [THREADS];
  logic [THREADS-1:0] win_unl;
  logic [ISSUE_W-1:0] replay;
  logic [3:0]         rep_cnt [THREADS];

  always_comb begin
    for (int t = 0; t < THREADS; t++) begin
      rep_cnt[t] = '0;
      for (int l = 0; l < ISSUE_W; l++)
        if (replay[l] && int'(head_uop[l].tid) == t) rep_cnt[t] = rep_cnt[t] + 4'd1;
    end
  end

  for (genvar t = 0; t < THREADS; t++) begin : g_sw
    logic unused_preset;
    sliding_window u_sw (
      .clk, .rst_n, .replays(rep_cnt[t]),
      .win_unlimited(win_unl[t]), .win(win[t]),
      .decr_flag(st_decr[t]), .incr_flag(st_incr[t]), .period_reset(unused_preset));
  end

  // ---------------- ICOUNT selection ----------------
  logic [10:0] occ [THREADS];
  logic [3:0]  free_lanes;

  icount_select #(.THREADS(THREADS), .ISSUE_W(ISSUE_W), .SLIDING_WINDOW(SLIDING_WINDOW)) u_icount (
    .clk, .rst_n, .occ, .pib_count, .win, .win_unlimited(win_unl), .free_lanes,
    .sel_valid, .sel_tid, .sel_n, .capped(st_capped));

  // ---------------- Cyclone queues ----------------
  logic [ISSUE_W-1:0] c_in_valid;
  uop_t               c_in_uop [ISSUE_W];
  logic [ISSUE_W-1:0] head_valid, head_ready;

  always_comb begin
    for (int k = 0; k < ISSUE_W; k++) begin
      c_in_valid[k] = sel_valid && 32'(k) < 32'(sel_n);
      c_in_uop[k]   = pib_out[sel_tid][k];
    end
  end

  cyclone_queue #(.ISSUE_W(ISSUE_W), .LEN(CYC_LEN), .THREADS(THREADS)) u_cyc (
    .clk, .rst_n, .now,
    .in_valid(c_in_valid), .in_uop(c_in_uop), .free_lanes,
    .head_valid, .head_uop, .head_ready, .rp_wait,
    .iss_valid, .replay, .hazards(st_hazards), .occ);

  // ---------------- physical register ready bits ----------------
  logic [DISP_W-1:0] alloc_v;
  logic [PREG_W-1:0] alloc_p [DISP_W];
  always_comb begin
    for (int i = 0; i < DISP_W; i++) begin
      alloc_v[i] = disp_valid[i] && d_accept[i] && disp_uop[i].dst_v;
      alloc_p[i] = disp_uop[i].pdst;
    end
  end

  ready_table #(.RD_W(ISSUE_W), .WB_PORTS(WB_PORTS), .ALLOC_W(DISP_W)) u_rdy (
    .clk, .rst_n, .alloc_valid(alloc_v), .alloc_preg(alloc_p),
    .wb_valid, .wb_preg, .rd_uop(head_uop), .rd_ready(head_ready));

  // ---------------- outputs ----------------
  assign iss_uop          = head_uop;
  assign st_replay        = replay;
  assign st_occ           = occ;
  assign st_pib_count     = pib_count;
  assign st_win           = win;
  assign st_win_unlimited = win_unl;
  assign st_pred_src      = q_src;

endmodule
