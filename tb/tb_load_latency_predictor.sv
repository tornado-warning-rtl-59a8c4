// tb_load_latency_predictor: self-checking test of the hybrid load latency
// predictor.
//
// Directed steps with independently worked-out answers:
//  1. an unseen load gets the L1 hit latency (2) from no component;
//  2. a load that keeps seeing 12 cycles becomes LHT-confident after three
//     completions and is then predicted at 12 by the LHT; a different latency
//     drops the confidence;
//  3. a strided load with changing latencies is left to CLP: once its stride
//     is confident, the next block (never filled) is a definite miss -> 12;
//     after an L1 fill of that block it is a maybe-hit -> 2; after the
//     eviction it is a definite miss again;
//  4. a miss to that block registered in the SILO returning 100 cycles later
//     gives a prediction that counts down with time, and the entry retires
//     when the data returns;
//  5. both ports answer independently in the same cycle.
// Then a random phase: eight load PCs with stride or irregular addresses and
// latencies drawn from {2, 12, 164}, random L1 fills/evictions and SILO
// misses, both ports queried every cycle. A reference model kept here (last
// value + 2-bit confidence, stride + 2-bit confidence, resident-block
// counters, SILO entries alive until their return cycle) predicts every
// answer. Addresses stay below 32 KB so the miss-detection hash is the
// identity, and at most 12 misses are outstanding so no SILO entry is
// replaced; the replacement policy is not checked.
`timescale 1ns/1ps
module tb_load_latency_predictor;
  import zephyr_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] now;
  logic [1:0] q_valid;
  logic [31:0] q_pc [2];
  logic [WAIT_W-1:0] q_lat [2];
  logic [1:0] q_src [2];
  logic upd_valid, fill_valid, evict_valid, miss_valid;
  logic [31:0] upd_pc, upd_addr, fill_addr, evict_addr, miss_addr;
  logic [WAIT_W-1:0] upd_lat;
  logic [TS_W-1:0] miss_done_ts;
  int cyc = 0, checks = 0, failures = 0;

  load_latency_predictor dut (.*);
  assign now = TS_W'(cyc);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL cyc %0d %s", cyc, what); end
  endtask

  task automatic tick();
    @(posedge clk); @(negedge clk); cyc++;
    upd_valid = 0; fill_valid = 0; evict_valid = 0; miss_valid = 0;
  endtask

  task automatic complete(logic [31:0] pc, logic [31:0] addr, int lat);
    upd_valid = 1; upd_pc = pc; upd_addr = addr; upd_lat = WAIT_W'(lat);
    tick();
  endtask

  task automatic expect_pred(int p, logic [31:0] pc, int lat, int src, string what);
    q_valid[p] = 1; q_pc[p] = pc;
    #1;
    check(int'(q_lat[p]) == lat && int'(q_src[p]) == src,
          $sformatf("%s: lat %0d src %0d, expected %0d/%0d", what, q_lat[p], q_src[p], lat, src));
  endtask


  // ---------------- reference model for the random phase ----------------
  bit          m_lv [1024];  int m_llat [1024];  int m_lconf [1024];
  bit          m_av [1024];  int m_alast [1024]; int m_astr [1024]; int m_aconf [1024];
  int          m_cnt [1024];
  int          s_blk [$], s_ts [$];
  int          n_rsrc [4];

  function automatic void model_pred(logic [31:0] pc, output int lat, output int src);
    int li, pa, sl;
    bit sh;
    li = (pc >> 2) & 1023;
    lat = 2; src = 0;
    if (m_lv[li] && m_lconf[li] >= 2) begin lat = m_llat[li]; src = 1; return; end
    if (!(m_av[li] && m_aconf[li] >= 2)) return;
    pa = m_alast[li] + m_astr[li];
    sh = 0;
    foreach (s_blk[k]) if (s_blk[k] == (pa >>> 5) && cyc <= s_ts[k]) begin sh = 1; sl = s_ts[k] - cyc; end
    if (sh) begin lat = (sl > 2) ? sl : 2; src = 2; end
    else if (m_cnt[(pa >> 5) & 1023] == 0) begin lat = 12; src = 3; end
  endfunction

  task automatic random_phase(int n);
    logic [31:0] pcs [8];
    int base [8], it [8];
    for (int i = 0; i < 8; i++) begin pcs[i] = 32'h2000 + 32'(i * 4); base[i] = 1024 * i; it[i] = 0; end
    for (int c = 0; c < n; c++) begin
      int e_lat [2], e_src [2], k, li, st, a;
      // queries
      for (int p = 0; p < 2; p++) begin
        q_valid[p] = 1; q_pc[p] = pcs[$urandom_range(0, 7)];
      end
      // training for this cycle
      upd_valid = ($urandom_range(0, 1) == 1);
      k = $urandom_range(0, 7);
      a = (k < 5) ? base[k] + 8 * it[k] : 32'($urandom_range(0, 32767));
      it[k]++;
      upd_pc = pcs[k]; upd_addr = 32'(a & 32'h7fff);
      upd_lat = WAIT_W'((k < 3) ? 12 : ($urandom_range(0, 2) == 0 ? 2 : ($urandom_range(0, 1) ? 12 : 164)));
      fill_valid = ($urandom_range(0, 2) == 0);  fill_addr = 32'($urandom_range(0, 32767));
      evict_valid = ($urandom_range(0, 2) == 0); evict_addr = 32'($urandom_range(0, 32767));
      miss_valid = 0;
      if ($urandom_range(0, 3) == 0 && s_blk.size() < 12) begin
        k = $urandom_range(3, 4);   // half of them where a strided load goes next
        miss_addr = $urandom_range(0, 1) ? 32'(base[k] + 8 * it[k] + 8) & 32'h7fff : 32'($urandom_range(0, 32767));
        miss_done_ts = now + TS_W'($urandom_range(1, 60));
        miss_valid = 1;
        foreach (s_blk[j]) if (s_blk[j] == int'(miss_addr >> 5)) miss_valid = 0;
      end
      #1;
      for (int p = 0; p < 2; p++) begin
        model_pred(q_pc[p], e_lat[p], e_src[p]);
        n_rsrc[e_src[p]]++;
        check(int'(q_lat[p]) == e_lat[p] && int'(q_src[p]) == e_src[p],
              $sformatf("random port %0d pc %h: %0d/%0d expected %0d/%0d", p, q_pc[p], q_lat[p], q_src[p], e_lat[p], e_src[p]));
      end
      // the same training applied to the model
      if (upd_valid) begin
        li = (upd_pc >> 2) & 1023;
        if (m_lv[li] && m_llat[li] == int'(upd_lat)) begin if (m_lconf[li] < 3) m_lconf[li]++; end
        else begin m_llat[li] = int'(upd_lat); m_lconf[li] = 0; end
        m_lv[li] = 1;
        st = int'(upd_addr) - m_alast[li];
        if (m_av[li] && st == m_astr[li]) begin if (m_aconf[li] < 3) m_aconf[li]++; end
        else begin m_astr[li] = m_av[li] ? st : 0; m_aconf[li] = 0; end
        m_av[li] = 1; m_alast[li] = int'(upd_addr);
      end
      if (fill_valid && !(evict_valid && ((fill_addr >> 5) & 1023) == ((evict_addr >> 5) & 1023))) begin
        if (m_cnt[(fill_addr >> 5) & 1023] < 7) m_cnt[(fill_addr >> 5) & 1023]++;
      end
      if (evict_valid && !(fill_valid && ((fill_addr >> 5) & 1023) == ((evict_addr >> 5) & 1023))) begin
        if (m_cnt[(evict_addr >> 5) & 1023] > 0) m_cnt[(evict_addr >> 5) & 1023]--;
      end
      for (int j = s_blk.size() - 1; j >= 0; j--)
        if (cyc >= s_ts[j]) begin s_blk.delete(j); s_ts.delete(j); end
      if (miss_valid) begin s_blk.push_back(int'(miss_addr >> 5)); s_ts.push_back(int'(miss_done_ts)); end
      tick();
    end
  endtask

  initial begin : watchdog
    repeat (8000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    q_valid = '0; q_pc[0] = '0; q_pc[1] = '0;
    upd_valid = 0; fill_valid = 0; evict_valid = 0; miss_valid = 0;
    upd_pc = '0; upd_addr = '0; upd_lat = '0; fill_addr = '0; evict_addr = '0;
    miss_addr = '0; miss_done_ts = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    expect_pred(0, 32'h400, 2, 0, "unseen load");
    // LHT
    // irregular addresses keep the address predictor unconfident
    complete(32'h400, 32'h8000, 12);
    expect_pred(0, 32'h400, 2, 0, "one sample");
    complete(32'h400, 32'h9000, 12);
    expect_pred(0, 32'h400, 2, 0, "two samples");
    complete(32'h400, 32'h8400, 12);
    expect_pred(0, 32'h400, 12, 1, "LHT confident");
    complete(32'h400, 32'hB000, 2);
    expect_pred(0, 32'h400, 2, 0, "LHT confidence lost");

    // CLP: stride 32, alternating latencies keep the LHT unconfident
    for (int i = 0; i < 4; i++) complete(32'h500, 32'h10000 + 32 * i, (i % 2) ? 12 : 2);
    expect_pred(0, 32'h500, 12, 3, "definite miss on predicted block 0x10080");
    fill_valid = 1; fill_addr = 32'h10080; tick();
    expect_pred(0, 32'h500, 2, 0, "maybe hit after fill");
    evict_valid = 1; evict_addr = 32'h10084; tick();
    expect_pred(0, 32'h500, 12, 3, "definite miss after eviction");

    // SILO
    miss_valid = 1; miss_addr = 32'h10090; miss_done_ts = now + 16'd100; tick();
    expect_pred(0, 32'h500, 99, 2, "SILO in-flight miss");
    repeat (40) tick();
    expect_pred(0, 32'h500, 59, 2, "SILO counts down");
    // port 1 in the same cycle: the LHT-trained load
    for (int i = 0; i < 3; i++) complete(32'h404, 32'h0, 30);
    expect_pred(1, 32'h404, 30, 1, "second port");
    expect_pred(0, 32'h500, 56, 2, "first port alongside");
    repeat (60) tick();
    expect_pred(0, 32'h500, 12, 3, "SILO entry retired");

    // random phase against the reference model, from a fresh reset
    q_valid = '0;
    rst_n = 0; tick(); tick(); rst_n = 1;
    random_phase(3000);
    $display("random phase sources default/LHT/SILO/definite miss: %0d %0d %0d %0d",
             n_rsrc[0], n_rsrc[1], n_rsrc[2], n_rsrc[3]);
    check(n_rsrc[0] > 0 && n_rsrc[1] > 0 && n_rsrc[2] > 0 && n_rsrc[3] > 0, "every source seen in the random phase");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
