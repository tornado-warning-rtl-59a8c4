// tb_coarse_sort_engine: self-checking test of the FIFO sorting stage.
//
// Sixteen queue models (lengths 1x6, 5x4, 10x2, 20x2, 150x2) mirror the
// engine. Each cycle the model releases elapsed heads to the PIBs within the
// random per-thread room (longer queues first), then places the dispatch
// group in program order: longest queue length not above the wait, else a
// shorter one, one push per queue, stopping at the first instruction with no
// queue. in_count, the chosen queue per slot, out_valid and the released
// instruction ids are compared every cycle. Every released instruction must
// have waited at least its queue length and, when the PIB had room, exactly
// that long; long waits must have used the 150-cycle queues.
`timescale 1ns/1ps
module tb_coarse_sort_engine;
  import zephyr_pkg::*;
  localparam int T = 4, D = 8, NF = 16;
  localparam int LENS [NF] = '{1, 1, 1, 1, 1, 1, 5, 5, 5, 5, 10, 10, 20, 20, 150, 150};

  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] now;
  logic [D-1:0] in_valid;
  uop_t in_uop [D];
  logic [WAIT_W-1:0] in_wait [D];
  logic [3:0] in_count;
  logic [4:0] in_fifo [D];
  logic [6:0] pib_free [T];
  logic [15:0] out_valid;
  uop_t out_uop [16];

  int checks = 0, failures = 0, cyc = 0, next_id = 0;
  int stalls = 0, fallbacks = 0, exact = 0;
  int q_id  [NF][$];
  int q_rel [NF][$];
  int q_in  [NF][$];
  int cls_used [5];

  coarse_sort_engine #(.THREADS(T), .DISP_W(D)) dut (.*);
  always #5 clk = ~clk;
  assign now = TS_W'(cyc);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL cyc %0d %s", cyc, what); end
  endtask

  function automatic int cls(int len);
    case (len) 1: return 0; 5: return 1; 10: return 2; 20: return 3; default: return 4; endcase
  endfunction

  initial begin : watchdog
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = '0;
    for (int i = 0; i < D; i++) begin in_uop[i] = '0; in_wait[i] = '0; end
    for (int t = 0; t < T; t++) pib_free[t] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 6000; it++) begin
      bit pop [NF];
      bit cpush [NF];
      bit taken [NF];
      int used [T];
      int exp_cnt, n;
      bit stop;
      int mf [D];
      // stimulus
      n = (it % 400 < 300) ? $urandom_range(0, D) : 0;
      for (int t = 0; t < T; t++) pib_free[t] = 7'((it % 500 < 50) ? 0 : $urandom_range(0, 6));
      for (int i = 0; i < D; i++) begin
        int r;
        in_uop[i] = '0;
        in_uop[i].tid = TID_W'($urandom_range(0, T - 1));
        in_uop[i].pc  = 32'((next_id + i) * T + int'(in_uop[i].tid));
        r = $urandom_range(0, 9);
        in_wait[i] = WAIT_W'((r < 5) ? $urandom_range(0, 4) : (r < 8) ? $urandom_range(5, 30)
                                                                       : $urandom_range(31, 300));
        in_valid[i] = i < n;
      end
      #1;
      // model: release
      for (int t = 0; t < T; t++) used[t] = 0;
      for (int f = NF - 1; f >= 0; f--) begin
        pop[f] = 0;
        if (q_id[f].size() > 0 && cyc >= q_rel[f][0]) begin
          int tid;
          tid = q_id[f][0] % T;
          if (used[tid] < int'(pib_free[tid])) begin pop[f] = 1; used[tid]++; end
        end
        check(out_valid[f] == pop[f], $sformatf("out_valid[%0d] dut %0b model %0b qsize %0d rel %0d pc %0d free %0d", f, out_valid[f], pop[f], q_id[f].size(), q_id[f].size() ? q_rel[f][0] : -1, out_uop[f].pc, pib_free[out_uop[f].tid]));
        if (pop[f]) begin
          check(int'(out_uop[f].pc) == q_id[f][0], "released id");
          check(cyc - q_in[f][0] >= LENS[f], "waited at least the queue length");
          if (cyc - q_in[f][0] == LENS[f]) exact++;
        end
        cpush[f] = q_id[f].size() < LENS[f] || pop[f];
        taken[f] = 0;
      end
      // model: placement
      exp_cnt = 0;
      stop = 0;
      for (int i = 0; i < D; i++) begin
        mf[i] = -1;
        if (in_valid[i] && !stop) begin
          int w, best;
          w = int'(in_wait[i]);
          best = 0;
          for (int f = 0; f < NF; f++) if (LENS[f] <= (w < 1 ? 1 : w)) best = LENS[f];
          for (int f = NF - 1; f >= 0; f--)
            if (mf[i] < 0 && cpush[f] && !taken[f] && LENS[f] <= (w < 1 ? 1 : w)) begin
              mf[i] = f; taken[f] = 1;
            end
          if (mf[i] < 0) begin stop = 1; stalls++; end
          else begin
            exp_cnt++;
            if (LENS[mf[i]] != best) fallbacks++;
            cls_used[cls(LENS[mf[i]])]++;
          end
        end
      end
      check(int'(in_count) == exp_cnt, $sformatf("in_count %0d exp %0d", in_count, exp_cnt));
      for (int i = 0; i < exp_cnt; i++) check(int'(in_fifo[i]) == mf[i], $sformatf("slot %0d fifo", i));
      @(posedge clk);
      for (int f = 0; f < NF; f++)
        if (pop[f]) begin void'(q_id[f].pop_front()); void'(q_rel[f].pop_front()); void'(q_in[f].pop_front()); end
      for (int i = 0; i < exp_cnt; i++) begin
        q_id[mf[i]].push_back(int'(in_uop[i].pc));
        q_rel[mf[i]].push_back(cyc + LENS[mf[i]]);
        q_in[mf[i]].push_back(cyc);
      end
      next_id += D;
      @(negedge clk);
      cyc++;
    end
    for (int c = 0; c < 5; c++) check(cls_used[c] > 0, $sformatf("queue class %0d used", c));
    check(stalls > 0 && fallbacks > 0 && exact > 0, "stall, fall-back and exact release seen");
    $display("stalls=%0d fallbacks=%0d exact=%0d classes=%0d/%0d/%0d/%0d/%0d", stalls, fallbacks,
             exact, cls_used[0], cls_used[1], cls_used[2], cls_used[3], cls_used[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
