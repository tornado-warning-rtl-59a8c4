// cyclone_queue: the Cyclone switchback queues (Zephyr's fine-grain sorting
// engine) with selective replay.
//
// ISSUE_W lanes, one per issue slot. Every lane has LEN columns and two
// shift registers over them: the countdown queue, which moves one column per
// cycle away from the execution end (column 0 -> LEN-1), and the main queue,
// which moves one column per cycle back towards it (LEN-1 -> 0). An
// instruction enters a lane at countdown column 0 with a turn column k
// chosen from its predicted wait. When it reaches column >= k it tries to
// switch back into the main queue at the same column; the main-queue slot it
// needs is also wanted by the main-queue entry one column further out, which
// has priority. A refused switch is a switchback hazard: the instruction
// keeps moving out and tries again one column later (two cycles later at the
// head). At the last column the switch always succeeds.
// The main-queue head (column 0) leaves every cycle. The ready-bit table
// checks its sources: if all are ready it issues to execution, otherwise it
// is replayed, i.e. re-enters the countdown queue of the same lane with a
// turn column from its re-evaluated wait. A replay takes the lane's entry
// slot, so new instructions go only to lanes whose head does not replay;
// they are placed over those free lanes round-robin.
//
// Delay: an instruction presented in cycle t with turn column k reaches the
// head in cycle t + 2k + 2 if it meets no hazard, so k = (wait - 2) / 2
// (k = 0 for waits up to 2), never later than its predicted wait.
// Interface: in_* is a contiguous list of at most free_lanes new
// instructions; head_uop/head_valid go to the ready table and timing table,
// which answer head_ready and rp_wait in the same cycle. occ counts, per
// thread, instructions in the queues (new ones in, issued ones out).
// Counter-flowing countdown/main queues, switchback conflicts, ready check at
// the head, replay with timing-table re-evaluation and round-robin placement
// follow the published scheduler; the lane/column geometry, the delay rule
// and the entry priority of replays are this design's reading of it.
module cyclone_queue
  import zephyr_pkg::*;
#(
  parameter int ISSUE_W = 8,
  parameter int LEN     = 100,
  parameter int THREADS = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [TS_W-1:0]     now,
  // new instructions from a PIB
  input  logic [ISSUE_W-1:0]  in_valid,
  input  uop_t                in_uop  [ISSUE_W],
  output logic [3:0]          free_lanes,
  // main-queue heads
  output logic [ISSUE_W-1:0]  head_valid,
  output uop_t                head_uop [ISSUE_W],
  input  logic [ISSUE_W-1:0]  head_ready,
  input  logic [WAIT_W-1:0]   rp_wait  [ISSUE_W],
  // results
  output logic [ISSUE_W-1:0]  iss_valid,
  output logic [ISSUE_W-1:0]  replay,
  output logic [10:0]         hazards,
  output logic [10:0]         occ      [THREADS]
);

  localparam int CW = $clog2(LEN);
  localparam int LW = (ISSUE_W > 1) ? $clog2(ISSUE_W) : 1;

  logic            cd_v    [ISSUE_W][LEN];
  uop_t            cd_u    [ISSUE_W][LEN];
  logic [CW-1:0]   cd_turn [ISSUE_W][LEN];
  logic            mq_v    [ISSUE_W][LEN];
  uop_t            mq_u    [ISSUE_W][LEN];
  logic [LW-1:0]   rr;

  // lane entry: replay or a new instruction
  logic [ISSUE_W-1:0] ent_v, ent_new;
  uop_t               ent_u    [ISSUE_W];
  logic [CW-1:0]      ent_turn [ISSUE_W];
  logic [LW-1:0]      rr_next;

  function automatic logic [CW-1:0] turn_of(logic [WAIT_W-1:0] w);
    int k;
    k = (int'(w) <= 2) ? 0 : (int'(w) - 2) / 2;
    if (k > LEN - 1) k = LEN - 1;
    return CW'(k);
  endfunction

  always_comb begin
    for (int l = 0; l < ISSUE_W; l++) begin
      head_valid[l] = mq_v[l][0];
      head_uop[l]   = mq_u[l][0];
      iss_valid[l]  = mq_v[l][0] && head_ready[l];
      replay[l]     = mq_v[l][0] && !head_ready[l];
    end
  end

  // placement of replays and new instructions
  always_comb begin
    free_lanes = '0;
    for (int l = 0; l < ISSUE_W; l++)
      if (!replay[l]) free_lanes = free_lanes + 4'd1;
  end

  always_comb begin
    int n, last, ln;
    for (int l = 0; l < ISSUE_W; l++) begin
      ent_v[l]    = replay[l];
      ent_new[l]  = 1'b0;
      ent_u[l]    = mq_u[l][0];
      ent_turn[l] = turn_of(rp_wait[l]);
    end
    n    = 0;
    last = -1;
    ln   = 0;
    for (int k = 0; k < ISSUE_W; k++) begin
      ln = (int'(rr) + k) % ISSUE_W;
      if (!replay[ln] && n < ISSUE_W && in_valid[n]) begin
        ent_v[ln]    = 1'b1;
        ent_new[ln]  = 1'b1;
        ent_u[ln]    = in_uop[n];
        ent_turn[ln] = turn_of(ts_remaining(in_uop[n].ready_ts, now));
        n++;
        last = ln;
      end
    end
    rr_next = (last < 0) ? rr : LW'((last + 1) % ISSUE_W);
  end

  // switchback requests and hazards
  logic sw_req [ISSUE_W][LEN];
  logic sw_ok  [ISSUE_W][LEN];
  always_comb begin
    hazards = '0;
    for (int l = 0; l < ISSUE_W; l++) begin
      for (int c = 0; c < LEN; c++) begin
        sw_req[l][c] = cd_v[l][c] && (c == LEN - 1 || 32'(cd_turn[l][c]) <= c);
        if (c == LEN - 1) sw_ok[l][c] = sw_req[l][c];
        else              sw_ok[l][c] = sw_req[l][c] && !mq_v[l][c+1];
        if (sw_req[l][c] && !sw_ok[l][c]) hazards = hazards + 11'd1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int l = 0; l < ISSUE_W; l++)
        for (int c = 0; c < LEN; c++) begin
          cd_v[l][c] <= 1'b0;
          mq_v[l][c] <= 1'b0;
        end
      rr <= '0;
    end else begin
      rr <= rr_next;
      for (int l = 0; l < ISSUE_W; l++) begin
        // countdown queue: moves outwards
        cd_v[l][0]    <= ent_v[l];
        cd_u[l][0]    <= ent_u[l];
        cd_turn[l][0] <= ent_turn[l];
        for (int c = 1; c < LEN; c++) begin
          cd_v[l][c]    <= cd_v[l][c-1] && !sw_ok[l][c-1];
          cd_u[l][c]    <= cd_u[l][c-1];
          cd_turn[l][c] <= cd_turn[l][c-1];
        end
        // main queue: moves inwards, fed by switchbacks
        for (int c = 0; c < LEN - 1; c++) begin
          mq_v[l][c] <= mq_v[l][c+1] || sw_ok[l][c];
          mq_u[l][c] <= mq_v[l][c+1] ? mq_u[l][c+1] : cd_u[l][c];
        end
        mq_v[l][LEN-1] <= sw_ok[l][LEN-1];
        mq_u[l][LEN-1] <= cd_u[l][LEN-1];
      end
    end
  end

  // per-thread occupancy: new instructions in, issued instructions out
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < THREADS; t++) occ[t] <= '0;
    end else begin
      for (int t = 0; t < THREADS; t++) begin
        logic [10:0] o;
        o = occ[t];
        for (int l = 0; l < ISSUE_W; l++) begin
          if (ent_new[l] && int'(ent_u[l].tid) == t) o = o + 11'd1;
          if (iss_valid[l] && int'(mq_u[l][0].tid) == t) o = o - 11'd1;
        end
        occ[t] <= o;
      end
    end
  end

  a_in_fits: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(in_valid) <= int'(free_lanes));

endmodule
