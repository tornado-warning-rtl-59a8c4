// sliding_window: per-thread tornado detector and occupancy cap (WIN).
//
// A thread is in overflow in a cycle when it replays more than OF_TH
// instructions, and in underflow when it replays no more than UF_TH.
// OF_Counter and UF_Counter count consecutive overflow / underflow cycles and
// clear when the condition breaks. When OF_Counter reaches DECR_TH the
// Decrement_Flag is raised for one cycle; when UF_Counter reaches INCR_TH the
// Increment_Flag is. The triggering counter clears in that cycle.
// WIN starts "unlimited"; the first decrement sets it to WIN_START, later ones
// subtract WIN_STEP down to WIN_MIN; increments add WIN_STEP and going past
// WIN_START returns to unlimited. Every RESET_PERIOD cycles WIN is forced back
// to unlimited for fairness. All thresholds and steps are the published ones.
//
// Interface: `replays` is this thread's R_Counter, the number of its
// instructions replayed at the Cyclone heads in the current cycle. `win` and
// `win_unlimited` are registered; the flags are combinational from the
// registered counters and take effect on WIN at the next clock edge.
//
// Choices of this design: overflow is "replays > OF_TH" and underflow is
// "replays <= UF_TH"; a flag is tested in the cycle after the counter reaches
// its threshold and the replays of that cycle are not counted; a decrement
// wins if both flags were ever raised together (they cannot be with
// OF_TH >= UF_TH).
module sliding_window #(
  parameter int unsigned OF_TH        = 6,
  parameter int unsigned UF_TH        = 2,
  parameter int unsigned DECR_TH      = 10,
  parameter int unsigned INCR_TH      = 5,
  parameter int unsigned WIN_START    = 24,
  parameter int unsigned WIN_STEP     = 4,
  parameter int unsigned WIN_MIN      = 4,
  parameter int unsigned RESET_PERIOD = 10000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [3:0] replays,
  output logic       win_unlimited,
  output logic [7:0] win,
  output logic       decr_flag,
  output logic       incr_flag,
  output logic       period_reset
);

  logic [7:0]  of_cnt, uf_cnt;
  logic [15:0] period_cnt;
  logic        overflow, underflow;

  assign overflow     = 32'(replays) >  OF_TH;
  assign underflow    = 32'(replays) <= UF_TH;
  assign decr_flag    = 32'(of_cnt) >= DECR_TH;
  assign incr_flag    = 32'(uf_cnt) >= INCR_TH;
  assign period_reset = 32'(period_cnt) == RESET_PERIOD - 1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      of_cnt        <= '0;
      uf_cnt        <= '0;
      period_cnt    <= '0;
      win_unlimited <= 1'b1;
      win           <= 8'(WIN_START);
    end else begin
      period_cnt <= period_reset ? '0 : period_cnt + 16'd1;

      if (decr_flag || !overflow)      of_cnt <= '0;
      else if (of_cnt != 8'hff)        of_cnt <= of_cnt + 8'd1;
      if (incr_flag || !underflow)     uf_cnt <= '0;
      else if (uf_cnt != 8'hff)        uf_cnt <= uf_cnt + 8'd1;

      if (period_reset) begin
        win_unlimited <= 1'b1;
        win           <= 8'(WIN_START);
      end else if (decr_flag) begin
        if (win_unlimited) begin
          win_unlimited <= 1'b0;
          win           <= 8'(WIN_START);
        end else if (32'(win) >= WIN_MIN + WIN_STEP) begin
          win <= win - 8'(WIN_STEP);
        end else begin
          win <= 8'(WIN_MIN);
        end
      end else if (incr_flag && !win_unlimited) begin
        if (32'(win) + WIN_STEP > WIN_START) begin
          win_unlimited <= 1'b1;
          win           <= 8'(WIN_START);
        end else begin
          win <= win + 8'(WIN_STEP);
        end
      end
    end
  end

  // WIN never leaves its published range.
  a_win_range: assert property (@(posedge clk) disable iff (!rst_n)
    win_unlimited || (32'(win) >= WIN_MIN && 32'(win) <= WIN_START));

endmodule
