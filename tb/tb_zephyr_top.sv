// tb_zephyr_top: end-to-end test of the Zephyr scheduler at its default size
// (4 threads, 8-wide, 100-column Cyclone lanes, 64-entry PIBs).
//
// The testbench plays the rest of the core:
//  * front end and rename: each thread runs a loop of 32 static
//    instructions. Logical registers are renamed onto the 512 physical
//    registers with a free pool; a register is recycled only when it has
//    been overwritten, its producer has completed and its readers have
//    issued. Each cycle one thread (rotating) offers up to 8 instructions;
//    those not accepted are offered again.
//  * execution and memory: issued instructions complete after their unit
//    latency (1/5/25 integer, 2/10/30 FP). Loads look up a direct-mapped L1
//    (16 KB, 32 B blocks) and L2 (512 KB, 64 B blocks) model: 2, 12 or 164
//    cycles. The register becomes ready for dependents exactly at issue +
//    latency. Load completions, L1 fills/evictions and misses train the
//    predictor through its ports.
// Thread 0 is tornado-prone: its loads miss to memory most of the time at
// random addresses, so their latency cannot be predicted, and all seven
// instructions after each load read its result; a surprise miss makes them
// replay together. Thread 0 runs alone for the first SOLO_CYCLES cycles.
// Threads 1-3 have regular strided loads with no address dependence (stride
// 8 bytes for threads 1-2, so several loads share a block still in flight;
// 4096 bytes for thread 3), each static load in its own L1 sets, and half
// their sources in long-ready registers. Every thread has at most 64
// instructions in flight and a 128-instruction in-order window, like a ROB,
// so a tag never belongs to two live instructions.
// The execution model, cache geometry and programs are this testbench's own;
// the unit latencies and cache latencies are the published machine's.
//
// Checks: no instruction issues before the values it reads exist (tracked
// here from completion times, independently of the design's ready bits);
// every dispatched instruction issues exactly once; the design's occupancy
// figures return to zero after draining. Mechanisms counted, each of which
// must occur: dispatch stalls, every sorting-queue length, replays,
// switchback hazards, Sliding Window decrements/increments/caps and the
// periodic reset, each predictor source, and issue from every thread.
`timescale 1ns/1ps
module tb_zephyr_top;
  import zephyr_pkg::*;
  localparam int T = 4, DW = 8, IW = 8, WBP = 16, NPREG = 512;
  localparam int PROG = 32;
  localparam int RUN_CYCLES = 10400;
  localparam int SOLO_CYCLES = 2000;

  logic clk = 0, rst_n = 0;
  logic [DW-1:0] disp_valid;
  uop_t disp_uop [DW];
  logic [3:0] disp_count;
  logic [IW-1:0] iss_valid;
  uop_t iss_uop [IW];
  logic [WBP-1:0] wb_valid;
  logic [PREG_W-1:0] wb_preg [WBP];
  logic ld_upd_valid, fill_valid, evict_valid, miss_valid;
  logic [31:0] ld_upd_pc, ld_upd_addr, fill_addr, evict_addr, miss_addr;
  logic [WAIT_W-1:0] ld_upd_lat;
  logic [TS_W-1:0] miss_done_ts, now;
  logic [IW-1:0] st_replay;
  logic [10:0] st_hazards;
  logic [10:0] st_occ [T];
  logic [6:0] st_pib_count [T];
  logic [7:0] st_win [T];
  logic [T-1:0] st_win_unlimited, st_decr, st_incr, st_capped;
  logic [4:0] st_disp_fifo [DW];
  logic [1:0] st_pred_src [2];

  zephyr_top dut (.*);
  always #5 clk = ~clk;

  int cyc = 0, checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL cyc %0d %s", cyc, what); end
  endtask

  // ---------------- static programs ----------------
  typedef struct {
    op_e op;
    bit s1v, s2v, dv;
    int s1, s2, d;
    int base, stride;   // loads
  } sinst_t;
  sinst_t prog [T][PROG];

  // ---------------- rename state ----------------
  int map [T][64];
  bit p_done [NPREG];      // producer completed (value exists)
  int p_ready_at [NPREG];  // cycle from which the value can be read
  int p_readers [NPREG];
  bit p_mapped [NPREG];
  int free_pool [$];
  int retiring [$];
  int pc_idx [T];
  int iter [T];
  int seq [T];
  uop_t pend [T][$];
  int inflight [T];
  int oldest [T];            // oldest unissued sequence number (ROB-like window of 128)
  bit done_f [T][256];

  // scoreboard: key = tid*256 + tag
  bit live [int];
  int waitq_p [$];        // pending writebacks
  int waitq_t [$];

  // memory model
  int l1_tag [512];
  bit l1_v [512];
  int l1_ready_at [512];
  int l2_tag [8192];
  bit l2_v [8192];
  int ev_upd_pc [$], ev_upd_addr [$], ev_upd_lat [$], ev_upd_t [$];
  int ev_fill [$], ev_fill_t [$], ev_evict [$], ev_evict_t [$];
  int ld_addr_of [int];

  // counters
  int n_disp = 0, n_iss = 0, n_stall = 0, n_rep = 0, n_haz = 0;
  int n_decr = 0, n_incr = 0, n_cap = 0, n_preset = 0;
  int n_cls [5];
  int n_src [4];
  int n_iss_t [T];
  int n_miss = 0;
  int rep_hist [T][16];

  function automatic int fifo_cls(int f);
    if (f < 6) return 0;
    if (f < 10) return 1;
    if (f < 12) return 2;
    if (f < 14) return 3;
    return 4;
  endfunction

  function automatic int op_lat(op_e op);
    case (op)
      OP_ALU, OP_STORE: return 1;
      OP_MUL: return 5;
      OP_DIV: return 25;
      OP_FADD: return 2;
      OP_FMUL: return 10;
      OP_FDIV: return 30;
      default: return 2;
    endcase
  endfunction

  // cache access: returns latency, updates the tags, queues training events
  function automatic int mem_access(int addr, int t_now);
    int i1, i2, lat;
    i1 = (addr >> 5) & 511;
    i2 = (addr >> 6) & 8191;
    if (l1_v[i1] && l1_tag[i1] == (addr >> 14))
      return (l1_ready_at[i1] - t_now > 2) ? l1_ready_at[i1] - t_now : 2;   // block still in flight
    lat = (l2_v[i2] && l2_tag[i2] == (addr >> 19)) ? 12 : 164;
    if (l1_v[i1]) begin ev_evict.push_back(l1_tag[i1] << 14 | i1 << 5); ev_evict_t.push_back(t_now); end
    l1_v[i1] = 1; l1_tag[i1] = addr >> 14; l1_ready_at[i1] = t_now + lat;
    l2_v[i2] = 1; l2_tag[i2] = addr >> 19;
    ev_fill.push_back(addr); ev_fill_t.push_back(t_now + lat);
    return lat;
  endfunction

  // build the next renamed instruction of thread t
  function automatic bit gen(int t, output uop_t u);
    sinst_t s;
    int pd, a;
    s = prog[t][pc_idx[t]];
    if (s.dv && free_pool.size() == 0) return 0;
    u = '0;
    u.tid = TID_W'(t);
    u.pc = 32'(t * 4096 + t * 256 + pc_idx[t] * 4);   // threads use distinct table entries
    u.op = s.op;
    u.src1_v = s.s1v; u.src2_v = s.s2v; u.dst_v = s.dv;
    u.lsrc1 = LREG_W'(s.s1); u.lsrc2 = LREG_W'(s.s2); u.ldst = LREG_W'(s.d);
    u.psrc1 = PREG_W'(map[t][s.s1]); u.psrc2 = PREG_W'(map[t][s.s2]);
    if (s.s1v) p_readers[map[t][s.s1]]++;
    if (s.s2v) p_readers[map[t][s.s2]]++;
    if (s.dv) begin
      pd = free_pool.pop_front();
      p_mapped[map[t][s.d]] = 0;
      retiring.push_back(map[t][s.d]);
      map[t][s.d] = pd;
      p_mapped[pd] = 1; p_done[pd] = 0; p_ready_at[pd] = 1 << 30; p_readers[pd] = 0;
      u.pdst = PREG_W'(pd);
    end
    u.tag = TAG_W'(seq[t]);
    done_f[t][seq[t] % 256] = 0;
    if (s.op == OP_LOAD) begin
      if (t == 0) a = ($urandom_range(0, 7) == 0) ? 32'h100 + 32 * $urandom_range(0, 7)
                                                   : 32'h0100_0000 + 64 * $urandom_range(0, 1 << 18);
      else a = s.base + s.stride * iter[t];
      ld_addr_of[t * 256 + seq[t] % 256] = a;
    end
    seq[t]++;
    pc_idx[t]++;
    if (pc_idx[t] == PROG) begin pc_idx[t] = 0; iter[t]++; end
    return 1;
  endfunction

  initial begin : watchdog
    repeat (RUN_CYCLES + 3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int rr_t;
    // programs
    for (int t = 0; t < T; t++) begin
      for (int i = 0; i < PROG; i++) begin
        sinst_t s;
        int r;
        s.s1v = 1; s.s2v = ($urandom_range(0, 1) == 1); s.dv = 1;
        s.s1 = $urandom_range(0, 7); s.s2 = $urandom_range(0, 7); s.d = $urandom_range(0, 7);
        s.base = 32'h0020_0000 * (t + 1); s.stride = 8;
        r = $urandom_range(0, 19);
        if (i % 8 == 0) s.op = OP_LOAD;
        else if (r == 0) s.op = OP_MUL;
        else if (r == 1) s.op = (t == 2) ? OP_FDIV : OP_DIV;
        else if (r == 2) s.op = OP_FADD;
        else if (r == 3) s.op = OP_FMUL;
        else if (r == 4) begin s.op = OP_STORE; s.dv = 0; end
        else s.op = OP_ALU;
        if (t == 0 && i % 8 != 0) begin
          // every instruction of the group hangs off the unpredictable load
          s.s1 = prog[t][i - i % 8].d;
          if (s.d == s.s1) s.d = (s.d + 1) % 8;
        end
        if (t != 0 && i % 8 != 0) s.s1 = $urandom_range(0, 15);   // half the sources long ready
        if (i % 8 == 0) s.base = s.base + (t * 4 + i / 8) * 32'h400;   // own L1 sets per static load
        if (t == 3 && i % 8 == 0) s.stride = 4096;   // regular L1 misses
        if (s.op == OP_LOAD) s.s2v = 0;
        if (s.op == OP_LOAD && t != 0) s.s1v = 0;   // address from an induction variable
        prog[t][i] = s;
      end
    end
    // rename state
    for (int p = 0; p < NPREG; p++) begin
      p_done[p] = 1; p_ready_at[p] = 0; p_readers[p] = 0; p_mapped[p] = 0;
    end
    for (int t = 0; t < T; t++) for (int r = 0; r < 64; r++) begin map[t][r] = t * 64 + r; p_mapped[t * 64 + r] = 1; end
    for (int p = T * 64; p < NPREG; p++) free_pool.push_back(p);
    for (int t = 0; t < T; t++) begin pc_idx[t] = 0; iter[t] = 0; seq[t] = 0; oldest[t] = 0; inflight[t] = 0; n_iss_t[t] = 0; end
    for (int i = 0; i < 512; i++) l1_v[i] = 0;
    for (int i = 0; i < 8192; i++) l2_v[i] = 0;
    for (int c = 0; c < 5; c++) n_cls[c] = 0;
    for (int c = 0; c < 4; c++) n_src[c] = 0;

    disp_valid = '0; wb_valid = '0;
    for (int i = 0; i < DW; i++) disp_uop[i] = '0;
    for (int w = 0; w < WBP; w++) wb_preg[w] = '0;
    ld_upd_valid = 0; fill_valid = 0; evict_valid = 0; miss_valid = 0;
    ld_upd_pc = '0; ld_upd_addr = '0; ld_upd_lat = '0; fill_addr = '0; evict_addr = '0;
    miss_addr = '0; miss_done_ts = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    rr_t = 0;

    for (int c = 0; c < RUN_CYCLES + 1500; c++) begin
      int dt, noff, nwb;
      bit feed;
      feed = c < RUN_CYCLES;
      // ---- recycle registers ----
      for (int k = retiring.size() - 1; k >= 0; k--) begin
        int p;
        p = retiring[k];
        if (p_done[p] && p_readers[p] == 0 && !p_mapped[p]) begin
          free_pool.push_back(p);
          retiring.delete(k);
        end
      end
      // ---- dispatch offer: one thread per cycle ----
      dt = -1;
      for (int k = 0; k < T && feed; k++) begin
        int t;
        t = (rr_t + k) % T;
        if (t != 0 && cyc < SOLO_CYCLES) continue;   // thread 0 runs alone first
        while (oldest[t] < seq[t] && done_f[t][oldest[t] % 256]) oldest[t]++;
        while (pend[t].size() < DW && inflight[t] + pend[t].size() < 64 && seq[t] - oldest[t] < 128) begin
          uop_t u;
          if (!gen(t, u)) break;
          pend[t].push_back(u);
        end
        if (dt < 0 && pend[t].size() > 0) dt = t;
      end
      rr_t = (rr_t + 1) % T;
      disp_valid = '0;
      noff = 0;
      if (dt >= 0) begin
        for (int i = 0; i < DW && i < pend[dt].size(); i++) begin
          disp_uop[i] = pend[dt][i];
          disp_valid[i] = 1;
          noff++;
        end
      end
      // ---- training events ----
      ld_upd_valid = 0; fill_valid = 0; evict_valid = 0; miss_valid = 0;
      if (ev_upd_t.size() > 0 && ev_upd_t[0] <= cyc) begin
        ld_upd_valid = 1; ld_upd_pc = 32'(ev_upd_pc[0]); ld_upd_addr = 32'(ev_upd_addr[0]);
        ld_upd_lat = WAIT_W'(ev_upd_lat[0]);
        void'(ev_upd_pc.pop_front()); void'(ev_upd_addr.pop_front());
        void'(ev_upd_lat.pop_front()); void'(ev_upd_t.pop_front());
      end
      for (int k = 0; k < ev_fill_t.size(); k++)
        if (ev_fill_t[k] <= cyc) begin
          fill_valid = 1; fill_addr = 32'(ev_fill[k]);
          ev_fill.delete(k); ev_fill_t.delete(k);
          break;
        end
      if (ev_evict_t.size() > 0) begin
        evict_valid = 1; evict_addr = 32'(ev_evict[0]);
        void'(ev_evict.pop_front()); void'(ev_evict_t.pop_front());
      end
      #1;
      // ---- issue: check true readiness, schedule writebacks ----
      nwb = 0;
      wb_valid = '0;
      for (int l = 0; l < IW; l++) begin
        if (iss_valid[l]) begin
          uop_t u;
          int key, lat;
          u = iss_uop[l];
          key = int'(u.tid) * 256 + int'(u.tag);
          check(live.exists(key), $sformatf("issued instruction is live (t%0d tag %0d)", u.tid, u.tag));
          live.delete(key);
          if (u.src1_v) begin
            check(p_done[u.psrc1] && p_ready_at[u.psrc1] <= cyc, $sformatf("src1 p%0d not ready", u.psrc1));
            p_readers[u.psrc1]--;
          end
          if (u.src2_v) begin
            check(p_done[u.psrc2] && p_ready_at[u.psrc2] <= cyc, $sformatf("src2 p%0d not ready", u.psrc2));
            p_readers[u.psrc2]--;
          end
          lat = op_lat(u.op);
          if (u.op == OP_LOAD) begin
            int a;
            a = ld_addr_of[key];
            lat = mem_access(a, cyc);
            if (lat > 2) begin
              n_miss++;
              miss_valid = 1; miss_addr = 32'(a); miss_done_ts = now + TS_W'(lat);
            end
            ev_upd_pc.push_back(int'(u.pc)); ev_upd_addr.push_back(a);
            ev_upd_lat.push_back(lat); ev_upd_t.push_back(cyc + 1);   // trained in issue order
          end
          if (u.dst_v) begin
            waitq_p.push_back(int'(u.pdst));
            waitq_t.push_back(cyc + lat - 1);   // wb in this cycle -> readable next cycle
            p_ready_at[u.pdst] = cyc + lat;
          end
          inflight[u.tid]--;
          done_f[u.tid][u.tag] = 1;
          n_iss++;
          n_iss_t[u.tid]++;
        end
        if (st_replay[l]) n_rep++;
      end
      for (int k = 0; k < waitq_t.size() && nwb < WBP; k++) begin
        if (waitq_t[k] <= cyc) begin
          wb_valid[nwb] = 1;
          wb_preg[nwb] = PREG_W'(waitq_p[k]);
          p_done[waitq_p[k]] = 1;
          if (waitq_t[k] < cyc) p_ready_at[waitq_p[k]] = cyc + 1;
          waitq_p.delete(k); waitq_t.delete(k);
          k--;
          nwb++;
        end
      end
      // ---- dispatch result ----
      #1;
      if (dt >= 0) begin
        if (int'(disp_count) < noff) n_stall++;
        for (int i = 0; i < int'(disp_count); i++) begin
          uop_t u;
          u = pend[dt].pop_front();
          live[int'(u.tid) * 256 + int'(u.tag)] = 1;
          inflight[dt]++;
          n_disp++;
          n_cls[fifo_cls(int'(st_disp_fifo[i]))]++;
        end
      end
      for (int p = 0; p < 2; p++) n_src[st_pred_src[p]]++;
      n_haz += int'(st_hazards);
      for (int t = 0; t < T; t++) begin
        if (st_decr[t]) n_decr++;
        if (st_incr[t]) n_incr++;
        if (st_capped[t]) n_cap++;
      end
      if (dut.g_sw[0].u_sw.period_reset) n_preset++;
      for (int t = 0; t < T; t++) rep_hist[t][dut.rep_cnt[t]]++;
      @(negedge clk);
      cyc++;
    end
    // ---- drained ----
    check(live.num() == 0, $sformatf("%0d dispatched instructions never issued", live.num()));
    for (int t = 0; t < T; t++) begin
      check(st_occ[t] == 0 && st_pib_count[t] == 0, $sformatf("thread %0d queues empty after drain", t));
      check(n_iss_t[t] > 0, $sformatf("thread %0d issued", t));
    end
    check(n_disp == n_iss, "issued == dispatched");
    check(n_stall > 0, "dispatch stall seen");
    for (int k = 0; k < 5; k++) check(n_cls[k] > 0, $sformatf("sorting queue class %0d used", k));
    check(n_rep > 0, "replays seen");
    check(n_haz > 0, "switchback hazards seen");
    check(n_decr > 0, "Sliding Window decrement seen");
    check(n_incr > 0, "Sliding Window increment seen");
    check(n_cap > 0, "a thread held back by WIN");
    check(n_preset > 0, "periodic WIN reset seen");
    check(n_src[1] > 0 && n_src[2] > 0 && n_src[3] > 0, "LHT, SILO and miss-detection predictions seen");
    $display("cycles=%0d dispatched=%0d issued=%0d IPC=%0.2f", cyc, n_disp, n_iss, real'(n_iss) / real'(cyc));
    $display("per-thread issued %0d %0d %0d %0d, load misses %0d", n_iss_t[0], n_iss_t[1], n_iss_t[2], n_iss_t[3], n_miss);
    $display("replays=%0d (%0.2f per issued) hazards=%0d stalls=%0d", n_rep, real'(n_rep) / real'(n_iss), n_haz, n_stall);
    $display("queue classes 1/5/10/20/150: %0d %0d %0d %0d %0d", n_cls[0], n_cls[1], n_cls[2], n_cls[3], n_cls[4]);
    $display("window: decr=%0d incr=%0d capped=%0d period resets=%0d", n_decr, n_incr, n_cap, n_preset);
    $display("predictor sources default/LHT/SILO/miss: %0d %0d %0d %0d", n_src[0], n_src[1], n_src[2], n_src[3]);
    for (int t = 0; t < T; t++) begin
      $write("thread %0d replay histogram:", t);
      for (int k = 0; k <= 8; k++) $write(" %0d", rep_hist[t][k]);
      $display("");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
