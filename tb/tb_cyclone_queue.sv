// tb_cyclone_queue: self-checking test of the Cyclone switchback queues.
//
// Two instances. A one-lane queue runs a directed switchback conflict: an
// instruction A with a long wait is passing down the main queue exactly when
// a later instruction B wants to switch into the slot in front of it, so B
// must record one hazard and reach the head two cycles late while A is on
// time. A four-lane queue (16 columns) runs random traffic with random ready
// answers and re-evaluated waits, and a scoreboard checks for every
// instruction: the lane it was placed in (round-robin over the lanes without
// a replay), that it reaches the head no earlier than 2k+2 cycles after
// entering (k = turn column from its wait) and later only by whole hazard
// penalties of 2 cycles, that a replay comes back by the same rule, that
// every instruction issues exactly once, free_lanes, and the per-thread
// occupancy.
`timescale 1ns/1ps
module tb_cyclone_queue;
  import zephyr_pkg::*;
  localparam int W = 4, L = 16, T = 4;

  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] now;
  int cyc = 0;
  int checks = 0, failures = 0;
  assign now = TS_W'(cyc);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 15) $display("FAIL cyc %0d %s", cyc, what); end
  endtask

  function automatic int turn(int w, int len);
    int k;
    k = (w <= 2) ? 0 : (w - 2) / 2;
    return k > len - 1 ? len - 1 : k;
  endfunction

  // ---------------- one-lane directed instance ----------------
  logic [0:0] a_in_valid, a_head_valid, a_head_ready, a_iss, a_rep;
  uop_t a_in_uop [1], a_head_uop [1];
  logic [WAIT_W-1:0] a_rp [1];
  logic [3:0] a_free;
  logic [10:0] a_haz, a_occ [T];
  cyclone_queue #(.ISSUE_W(1), .LEN(L), .THREADS(T)) dut1 (
    .clk, .rst_n, .now, .in_valid(a_in_valid), .in_uop(a_in_uop), .free_lanes(a_free),
    .head_valid(a_head_valid), .head_uop(a_head_uop), .head_ready(a_head_ready), .rp_wait(a_rp),
    .iss_valid(a_iss), .replay(a_rep), .hazards(a_haz), .occ(a_occ));

  // ---------------- four-lane random instance ----------------
  logic [W-1:0] in_valid, head_valid, head_ready, iss_valid, replay;
  uop_t in_uop [W], head_uop [W];
  logic [WAIT_W-1:0] rp_wait [W];
  logic [3:0] free_lanes;
  logic [10:0] hazards, occ [T];
  cyclone_queue #(.ISSUE_W(W), .LEN(L), .THREADS(T)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoreboard
  int sb_lane [int];
  int sb_early [int];
  int sb_tid [int];
  int m_occ [T];
  int rr = 0, id = 1, n_iss = 0, n_rep = 0, n_haz = 0, n_late = 0, n_in = 0;

  initial begin
    int t0, tA, tB, hz;
    a_in_valid = '0; a_head_ready = '1; a_rp[0] = '0; a_in_uop[0] = '0;
    in_valid = '0; head_ready = '0;
    for (int i = 0; i < W; i++) begin in_uop[i] = '0; rp_wait[i] = '0; end
    for (int t = 0; t < T; t++) m_occ[t] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- directed conflict on the one-lane instance ----
    // A: wait 22 -> turn 10, at the head 22 cycles after entry.
    // B: wait 8 -> turn 3, entered 14 cycles after A: it reaches countdown
    //    column 3 when A sits in main column 4, so its switch is refused.
    t0 = cyc; tA = -1; tB = -1; hz = 0;
    for (int i = 0; i < 40; i++) begin
      a_in_valid = '0;
      a_in_uop[0] = '0;
      if (i == 0)  begin a_in_valid = 1'b1; a_in_uop[0].pc = 32'hA; a_in_uop[0].ready_ts = now + 16'd22; end
      if (i == 14) begin a_in_valid = 1'b1; a_in_uop[0].pc = 32'hB; a_in_uop[0].ready_ts = now + 16'd8; end
      #1;
      hz += int'(a_haz);
      if (a_iss[0] && a_head_uop[0].pc == 32'hA) tA = cyc - t0;
      if (a_iss[0] && a_head_uop[0].pc == 32'hB) tB = cyc - t0 - 14;
      @(negedge clk); cyc++;
    end
    check(tA == 22, $sformatf("A issues after %0d cycles, expected 22", tA));
    check(tB == 10, $sformatf("B issues after %0d cycles, expected 8 + 2 for the hazard", tB));
    check(hz == 1, $sformatf("one switchback hazard, saw %0d", hz));

    // ---- exact delay of a lone instruction for every wait ----
    for (int w = 0; w < 2 * L + 4; w++) begin
      int got;
      got = -1;
      t0 = cyc;
      for (int i = 0; i < 2 * L + 6; i++) begin
        a_in_valid = (i == 0);
        a_in_uop[0] = '0;
        a_in_uop[0].pc = 32'(w);
        a_in_uop[0].ready_ts = now + TS_W'(w);
        #1;
        if (a_iss[0]) got = cyc - t0;
        @(negedge clk); cyc++;
      end
      check(got == 2 * turn(w, L) + 2, $sformatf("wait %0d: head after %0d cycles", w, got));
      if (w >= 2 && w < 2 * L) check(got <= w && got >= w - 1, "never later than the wait, at most one early");
    end

    // ---- random traffic on the four-lane instance ----
    for (int it = 0; it < 6000; it++) begin
      int n, placed;
      bit busy;
      busy = (it % 1000) < 700;
      // heads: random readiness; new ones: a random number up to free lanes
      for (int l = 0; l < W; l++) begin
        head_ready[l] = $urandom_range(0, 9) < 7;
        rp_wait[l] = WAIT_W'($urandom_range(0, 12));
      end
      #1;
      n = 0;
      for (int l = 0; l < W; l++) if (head_valid[l] && !head_ready[l]) n++;
      check(int'(free_lanes) == W - n, "free_lanes");
      n = busy ? $urandom_range(0, int'(free_lanes)) : 0;
      in_valid = '0;
      for (int k = 0; k < W; k++) begin
        int w;
        w = ($urandom_range(0, 3) == 0) ? $urandom_range(10, 40) : $urandom_range(0, 8);
        in_uop[k] = '0;
        in_uop[k].pc = 32'(id + k);
        in_uop[k].tid = TID_W'($urandom_range(0, T - 1));
        in_uop[k].ready_ts = now + TS_W'(w);
        in_valid[k] = k < n;
      end
      #1;
      n_haz += int'(hazards);
      // heads
      for (int l = 0; l < W; l++) begin
        if (head_valid[l]) begin
          int u;
          u = int'(head_uop[l].pc);
          check(sb_lane.exists(u), "head is a live instruction");
          if (sb_lane.exists(u)) begin
            check(sb_lane[u] == l, $sformatf("id %0d in lane %0d, placed in %0d", u, l, sb_lane[u]));
            check(cyc >= sb_early[u] && ((cyc - sb_early[u]) % 2) == 0,
                  $sformatf("id %0d at head %0d cycles after its earliest time", u, cyc - sb_early[u]));
            if (cyc > sb_early[u]) n_late++;
            check(iss_valid[l] == head_ready[l] && replay[l] == !head_ready[l], "issue/replay decision");
            if (head_ready[l]) begin
              m_occ[sb_tid[u]]--;
              sb_lane.delete(u);
              n_iss++;
            end else begin
              sb_early[u] = cyc + 2 * turn(int'(rp_wait[l]), L) + 2;
              n_rep++;
            end
          end
        end else begin
          check(!iss_valid[l] && !replay[l], "idle lane");
        end
      end
      // placement: k-th new instruction to k-th free lane from the pointer
      placed = 0;
      for (int k = 0; k < W && placed < n; k++) begin
        int l;
        l = (rr + k) % W;
        if (!(head_valid[l] && !head_ready[l])) begin
          int u;
          u = id + placed;
          sb_lane[u] = l;
          sb_early[u] = cyc + 2 * turn(int'(ts_remaining(in_uop[placed].ready_ts, now)), L) + 2;
          sb_tid[u] = int'(in_uop[placed].tid);
          m_occ[sb_tid[u]]++;
          placed++;
          if (placed == n) rr = (l + 1) % W;
        end
      end
      n_in += n;
      id += W;
      @(negedge clk); cyc++;
      for (int t = 0; t < T; t++) check(int'(occ[t]) == m_occ[t], $sformatf("occ[%0d] %0d exp %0d", t, occ[t], m_occ[t]));
    end
    // drain
    in_valid = '0; head_ready = '1;
    repeat (4 * L) begin
      #1;
      for (int l = 0; l < W; l++)
        if (head_valid[l] && sb_lane.exists(int'(head_uop[l].pc))) begin
          sb_lane.delete(int'(head_uop[l].pc)); n_iss++;
        end
      @(negedge clk); cyc++;
    end
    check(sb_lane.num() == 0, $sformatf("%0d instructions never issued", sb_lane.num()));
    check(n_iss == n_in, "every instruction issued once");
    check(n_haz > 0 && n_rep > 0 && n_late > 0, "hazards and replays seen");
    $display("inserted=%0d issued=%0d replays=%0d hazards=%0d late-by-hazard=%0d", n_in, n_iss, n_rep, n_haz, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
