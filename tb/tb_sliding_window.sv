// tb_sliding_window: self-checking test of the per-thread Sliding Window.
//
// A cycle-by-cycle reference model (written from the rules: consecutive
// overflow/underflow counting, flags at the thresholds, WIN 24/-4/+4,
// floor 4, unlimited above 24, periodic reset) runs beside the DUT. Stimulus
// is a sequence of directed phases (long overflow, long underflow, a bounce
// in between) followed by random replay counts. Directed checks also confirm
// the exact cycle at which the first decrement lands.
`timescale 1ns/1ps
module tb_sliding_window;
  localparam int PERIOD = 700;

  logic clk = 0, rst_n = 0;
  logic [3:0] replays;
  logic win_unlimited, decr_flag, incr_flag, period_reset;
  logic [7:0] win;
  int checks = 0, failures = 0;
  int cyc = 0;

  sliding_window #(.RESET_PERIOD(PERIOD)) dut (.*);

  always #5 clk = ~clk;

  // reference model state
  int m_of, m_uf, m_win, m_period;
  bit m_unl;
  int n_decr = 0, n_incr = 0, n_preset = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL cyc %0d: %s", cyc, what);
    end
  endtask

  // compare then advance the model on every rising edge
  always @(posedge clk) begin
    if (rst_n) begin
      bit md, mi, mp;
      cyc++;
      md = m_of >= 10;
      mi = m_uf >= 5;
      mp = m_period == PERIOD - 1;
      check(decr_flag == md, "decr_flag");
      check(incr_flag == mi, "incr_flag");
      check(period_reset == mp, "period_reset");
      check(win_unlimited == m_unl, "win_unlimited");
      if (!m_unl) check(int'(win) == m_win, $sformatf("win %0d exp %0d", win, m_win));
      if (md) n_decr++;
      if (mi) n_incr++;
      if (mp) n_preset++;
      // model update
      m_period = mp ? 0 : m_period + 1;
      if (md || !(replays > 6)) m_of = 0; else m_of++;
      if (mi || !(replays <= 2)) m_uf = 0; else m_uf++;
      if (mp) begin m_unl = 1; end
      else if (md) begin
        if (m_unl) begin m_unl = 0; m_win = 24; end
        else m_win = (m_win - 4 < 4) ? 4 : m_win - 4;
      end else if (mi && !m_unl) begin
        if (m_win + 4 > 24) m_unl = 1; else m_win += 4;
      end
    end else begin
      m_of = 0; m_uf = 0; m_win = 24; m_unl = 1; m_period = 0;
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first_decr;
    replays = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // 10 cycles of overflow: flag must be seen in the 11th cycle
    first_decr = -1;
    for (int i = 0; i < 12; i++) begin
      @(negedge clk) replays = 4'd8;
      if (decr_flag && first_decr < 0) first_decr = i;
    end
    check(first_decr == 10, $sformatf("first decrement after %0d overflow cycles", first_decr));
    @(negedge clk);
    check(!win_unlimited && win == 24, "WIN set to 24 by first decrement");
    // keep overflowing: WIN walks down to the floor 4
    replays = 4'd7;
    repeat (120) @(negedge clk);
    check(!win_unlimited && win == 4, "WIN floors at 4");
    // underflow: WIN climbs back to unlimited
    replays = 4'd1;
    repeat (60) @(negedge clk);
    check(win_unlimited, "WIN back to unlimited after underflow");
    // middle band (3..6): neither counter runs
    replays = 4'd4;
    repeat (40) @(negedge clk);
    check(win_unlimited, "middle band leaves WIN alone");
    // random traffic with bursts
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if ((i / 37) % 3 == 0) replays = 4'(7 + $urandom_range(0, 1));
      else if ((i / 37) % 3 == 1) replays = 4'($urandom_range(0, 2));
      else replays = 4'($urandom_range(0, 8));
    end
    check(n_decr > 5 && n_incr > 5 && n_preset > 2, "all mechanisms exercised");
    $display("decrements=%0d increments=%0d period resets=%0d", n_decr, n_incr, n_preset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
