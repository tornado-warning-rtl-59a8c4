// sort_fifo: one coarse-grain sorting queue of the Zephyr sorting engine.
//
// An in-order queue of DEPTH entries. Each entry is stamped on entry with the
// cycle at which its buffering length DELAY has elapsed; the head is offered
// (head_valid) only from that cycle on, so an instruction spends at least
// DELAY cycles here and no entry overtakes another inside one queue. A full
// queue can still accept an entry in a cycle in which its head leaves.
//
// Interface: push/push_uop enqueue, `can_push` says whether a push this cycle
// is taken, `pop` dequeues the head (only when head_valid). `now` is the
// shared free-running cycle counter. The queue lengths (1, 5, 10, 20, 150)
// are the published ones; the time-stamp release rule and the circular
// buffer are this design's choices.
module sort_fifo
  import zephyr_pkg::*;
#(
  parameter int DEPTH = 1,
  parameter int DELAY = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [TS_W-1:0] now,
  input  logic            push,
  input  uop_t            push_uop,
  output logic            can_push,
  output logic            head_valid,
  output uop_t            head_uop,
  input  logic            pop,
  output logic [7:0]      count
);

  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  uop_t            mem [DEPTH];
  logic [TS_W-1:0] rel [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (32'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign can_push   = (32'(count) < DEPTH) || pop;
  assign head_valid = (count != '0) && ts_reached(rel[rd_ptr], now);
  assign head_uop   = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && can_push) begin
        mem[wr_ptr] <= push_uop;
        rel[wr_ptr] <= now + TS_W'(DELAY);
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop) rd_ptr <= inc(rd_ptr);
      count <= count + 8'(push && can_push) - 8'(pop);
    end
  end

  a_pop_ok: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
