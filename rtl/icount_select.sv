// icount_select: ICOUNT choice of the PreIssue Buffer that feeds Cyclone.
//
// Each cycle one thread is chosen: among threads whose PIB is not empty and
// whose Cyclone occupancy is below its Sliding Window cap WIN (or whose WIN
// is unlimited), the one with the fewest instructions in the Cyclone queues
// wins. An empty PIB is never chosen, so a thread with nothing ready to
// schedule yields its slots to the others. Ties go to the first thread at or
// after a round-robin pointer that moves past each winner. The number of
// instructions pulled is the least of the free Cyclone lanes, the PIB's
// count and the room left under WIN.
//
// Interface: purely combinational apart from the tie-break pointer.
// With SLIDING_WINDOW = 0 the caps are ignored (plain ICOUNT).
// ICOUNT on Cyclone occupancy, skipping empty PIBs and the WIN cap are the
// published policy; the tie-break and single-thread-per-cycle pull are this
// design's choices.
module icount_select #(
  parameter int THREADS        = 4,
  parameter int ISSUE_W        = 8,
  parameter bit SLIDING_WINDOW = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [10:0] occ           [THREADS],
  input  logic [6:0]  pib_count     [THREADS],
  input  logic [7:0]  win           [THREADS],
  input  logic [THREADS-1:0] win_unlimited,
  input  logic [3:0]  free_lanes,
  output logic        sel_valid,
  output logic [1:0]  sel_tid,
  output logic [3:0]  sel_n,
  output logic [THREADS-1:0] capped   // thread held back or trimmed by WIN
);

  logic [1:0] rr;

  always_comb begin
    logic [10:0] best_occ;
    logic [10:0] room;
    logic [1:0]  t;
    logic        ok;
    t         = '0;
    ok        = 1'b0;
    sel_valid = 1'b0;
    sel_tid   = '0;
    sel_n     = '0;
    best_occ  = '1;
    capped    = '0;
    room      = '0;
    for (int k = 0; k < THREADS; k++) begin
      t  = 2'((int'(rr) + k) % THREADS);
      ok = (pib_count[t] != '0);
      if (ok && SLIDING_WINDOW && !win_unlimited[t] && occ[t] >= 11'(win[t])) begin
        ok        = 1'b0;
        capped[t] = 1'b1;
      end
      if (ok && (!sel_valid || occ[t] < best_occ)) begin
        sel_valid = 1'b1;
        sel_tid   = t;
        best_occ  = occ[t];
      end
    end
    if (sel_valid && free_lanes != '0) begin
      room = (!SLIDING_WINDOW || win_unlimited[sel_tid]) ? 11'(ISSUE_W)
                                                         : 11'(win[sel_tid]) - occ[sel_tid];
      sel_n = free_lanes;
      if (11'(pib_count[sel_tid]) < 11'(sel_n)) sel_n = 4'(pib_count[sel_tid]);
      if (room < 11'(sel_n)) begin
        sel_n            = 4'(room);
        capped[sel_tid]  = 1'b1;   // WIN also limits how many it may send
      end
    end else begin
      sel_valid = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)         rr <= '0;
    else if (sel_valid) rr <= 2'((int'(sel_tid) + 1) % THREADS);
  end

endmodule
