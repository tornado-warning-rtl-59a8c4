// tb_icount_select: self-checking test of ICOUNT with Sliding Window caps.
//
// Random occupancies, PIB counts, caps and free-lane counts. The reference
// takes the eligible threads (non-empty PIB, occupancy below WIN unless WIN
// is unlimited), finds the least occupancy among them and the first thread
// with it at or after the round-robin pointer (tracked from the DUT's own
// past choices), and the pull count min(free lanes, PIB count, WIN room).
`timescale 1ns/1ps
module tb_icount_select;
  localparam int T = 4, W = 8;

  logic clk = 0, rst_n = 0;
  logic [10:0] occ [T];
  logic [6:0] pib_count [T];
  logic [7:0] win [T];
  logic [T-1:0] win_unlimited, capped;
  logic [3:0] free_lanes, sel_n;
  logic sel_valid;
  logic [1:0] sel_tid;
  bit cap_exp [T];
  int checks = 0, failures = 0, rr = 0, n_capped = 0, n_ties = 0, n_room = 0;

  icount_select #(.THREADS(T), .ISSUE_W(W)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      int best, bt, n, room, cnt_best;
      bit elig [T];
      for (int t = 0; t < T; t++) begin
        occ[t] = 11'($urandom_range(0, 40));
        if ($urandom_range(0, 3) == 0) occ[t] = 11'($urandom_range(0, 3));
        pib_count[t] = 7'(($urandom_range(0, 3) == 0) ? 0 : $urandom_range(1, 64));
        win[t] = 8'(4 * $urandom_range(1, 6));
        win_unlimited[t] = $urandom_range(0, 1);
      end
      free_lanes = 4'($urandom_range(0, W));
      #1;
      best = 1 << 30; bt = -1; cnt_best = 0;
      for (int t = 0; t < T; t++) begin
        elig[t] = pib_count[t] != 0 && (win_unlimited[t] || occ[t] < 11'(win[t]));
        if (pib_count[t] != 0 && !elig[t]) n_capped++;
        cap_exp[t] = (pib_count[t] != 0 && !elig[t]);
        if (elig[t] && int'(occ[t]) < best) best = int'(occ[t]);
      end
      for (int k = 0; k < T; k++) begin
        int t;
        t = (rr + k) % T;
        if (elig[t] && int'(occ[t]) == best) begin cnt_best++; if (bt < 0) bt = t; end
      end
      if (cnt_best > 1) n_ties++;
      if (bt < 0 || free_lanes == 0) begin
        check(!sel_valid, "no selection");
      end else begin
        room = win_unlimited[bt] ? W : int'(win[bt]) - int'(occ[bt]);
        n = int'(free_lanes);
        if (int'(pib_count[bt]) < n) n = int'(pib_count[bt]);
        if (room < n) begin n = room; n_room++; cap_exp[bt] = 1; end
        check(sel_valid && int'(sel_tid) == bt, $sformatf("thread %0d exp %0d", sel_tid, bt));
        check(int'(sel_n) == n, $sformatf("count %0d exp %0d", sel_n, n));
        rr = (bt + 1) % T;
      end
      for (int t = 0; t < T; t++) check(capped[t] == cap_exp[t], "capped flag");
      @(negedge clk);
    end
    check(n_capped > 0 && n_ties > 0 && n_room > 0, "caps, ties and WIN room limits seen");
    $display("capped=%0d ties=%0d room-limited=%0d", n_capped, n_ties, n_room);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
