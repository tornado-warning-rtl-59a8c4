// tb_timing_table: self-checking test of the timing table.
//
// The reference keeps, for every (thread, logical register), the absolute
// cycle at which the register is expected to be ready. A dispatching
// instruction's wait is max(0, ready - now) over its sources, processed in
// program order so producers earlier in the same group are seen; its
// destination becomes now + wait + latency. Random groups over a small
// register set (to force dependences inside a group), random accepted
// prefixes and random replay reads are compared every cycle.
`timescale 1ns/1ps
module tb_timing_table;
  import zephyr_pkg::*;
  localparam int T = 4, D = 8, R = 8;

  logic clk = 0, rst_n = 0;
  logic [D-1:0] d_valid, d_accept;
  uop_t d_uop [D];
  logic [WAIT_W-1:0] d_lat [D], d_wait [D];
  uop_t r_uop [R];
  logic [WAIT_W-1:0] r_wait [R];
  int checks = 0, failures = 0, bypasses = 0;
  longint now = 0;
  longint rt [T][64];

  timing_table #(.THREADS(T), .DISP_W(D), .RD_PORTS(R)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL t=%0d %s", now, what); end
  endtask

  function automatic longint lmax(longint a, longint b); return a > b ? a : b; endfunction

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_valid = '0; d_accept = '0;
    for (int i = 0; i < D; i++) begin d_uop[i] = '0; d_lat[i] = '0; end
    for (int k = 0; k < R; k++) r_uop[k] = '0;
    for (int t = 0; t < T; t++) for (int r = 0; r < 64; r++) rt[t][r] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      longint mw [D];
      longint grp [T][64];
      int nacc, nval;
      // drive at negedge
      nval = $urandom_range(0, D);
      nacc = $urandom_range(0, nval);
      for (int i = 0; i < D; i++) begin
        uop_t u;
        u = '0;
        u.tid    = TID_W'($urandom_range(0, T - 1));
        u.src1_v = 1'($urandom);
        u.src2_v = 1'($urandom);
        u.dst_v  = ($urandom_range(0, 3) != 0);
        u.lsrc1  = LREG_W'($urandom_range(0, 7));
        u.lsrc2  = LREG_W'($urandom_range(0, 7));
        u.ldst   = LREG_W'($urandom_range(0, 7));
        d_uop[i] = u;
        d_lat[i] = WAIT_W'(($urandom_range(0, 9) == 0) ? $urandom_range(100, 170) : $urandom_range(1, 12));
        d_valid[i] = i < nval;
        d_accept[i] = i < nacc;
      end
      for (int k = 0; k < R; k++) begin
        r_uop[k] = '0;
        r_uop[k].tid = TID_W'($urandom_range(0, T - 1));
        r_uop[k].src1_v = 1'($urandom);
        r_uop[k].src2_v = 1'($urandom);
        r_uop[k].lsrc1 = LREG_W'($urandom_range(0, 7));
        r_uop[k].lsrc2 = LREG_W'($urandom_range(0, 7));
      end
      #1;
      // reference, in program order
      for (int t = 0; t < T; t++) for (int r = 0; r < 64; r++) grp[t][r] = rt[t][r];
      for (int i = 0; i < D; i++) begin
        longint w;
        int t;
        t = d_uop[i].tid;
        w = 0;
        if (d_uop[i].src1_v) w = lmax(w, grp[t][d_uop[i].lsrc1] - now);
        if (d_uop[i].src2_v) w = lmax(w, grp[t][d_uop[i].lsrc2] - now);
        mw[i] = w;
        if (d_valid[i]) begin
          check(longint'(d_wait[i]) == w, $sformatf("slot %0d wait %0d exp %0d", i, d_wait[i], w));
          for (int j = 0; j < i; j++)
            if (d_valid[j] && d_uop[j].dst_v && d_uop[j].tid == d_uop[i].tid &&
                ((d_uop[i].src1_v && d_uop[i].lsrc1 == d_uop[j].ldst) ||
                 (d_uop[i].src2_v && d_uop[i].lsrc2 == d_uop[j].ldst))) bypasses++;
          if (d_uop[i].dst_v) grp[t][d_uop[i].ldst] = now + w + longint'(d_lat[i]);
        end
      end
      for (int k = 0; k < R; k++) begin
        longint w;
        w = 0;
        if (r_uop[k].src1_v) w = lmax(w, rt[r_uop[k].tid][r_uop[k].lsrc1] - now);
        if (r_uop[k].src2_v) w = lmax(w, rt[r_uop[k].tid][r_uop[k].lsrc2] - now);
        check(longint'(r_wait[k]) == w, $sformatf("replay port %0d wait %0d exp %0d", k, r_wait[k], w));
      end
      // commit accepted prefix
      for (int i = 0; i < D; i++)
        if (d_valid[i] && d_accept[i] && d_uop[i].dst_v)
          rt[d_uop[i].tid][d_uop[i].ldst] = now + mw[i] + longint'(d_lat[i]);
      @(negedge clk);
      now++;
    end
    check(bypasses > 100, "in-group dependences exercised");
    $display("in-group bypasses=%0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
