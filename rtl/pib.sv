// pib: PreIssue Buffer of one thread.
//
// Instructions that leave the sorting FIFOs are already in approximate
// execution order; the PIB keeps that order and hands its oldest entries to
// the Cyclone queues when the thread is selected by ICOUNT. It is a circular
// buffer of DEPTH entries that takes up to IN_W instructions per cycle (the
// valid inputs are appended in input-index order) and releases up to OUT_W.
//
// Interface: `free` and `count` are registered occupancy figures; the
// sorting engine must not deliver more than `free` instructions in a cycle.
// out_uop[k] is the k-th oldest entry (valid when k < count); pop_n entries
// are removed at the clock edge. DEPTH must be a power of two. The 64-entry size is the published one;
// the port counts and ordering of same-cycle arrivals are this design's.
module pib
  import zephyr_pkg::*;
#(
  parameter int DEPTH = 64,
  parameter int IN_W  = 16,
  parameter int OUT_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [IN_W-1:0] in_valid,
  input  uop_t            in_uop [IN_W],
  output logic [6:0]      free,
  output logic [6:0]      count,
  output uop_t            out_uop [OUT_W],
  input  logic [3:0]      pop_n
);

  localparam int PW = $clog2(DEPTH);

  uop_t          mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [6:0]    n_in;

  assign free = 7'(DEPTH) - count;

  always_comb begin
    n_in = '0;
    for (int i = 0; i < IN_W; i++) n_in = n_in + 7'(in_valid[i]);
    for (int k = 0; k < OUT_W; k++) out_uop[k] = mem[PW'(32'(rd_ptr) + k)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      logic [PW-1:0] p;
      p = wr_ptr;
      for (int i = 0; i < IN_W; i++) begin
        if (in_valid[i]) begin
          mem[p] <= in_uop[i];
          p = p + 1'b1;
        end
      end
      wr_ptr <= p;
      rd_ptr <= rd_ptr + PW'(pop_n);
      count  <= count + n_in - 7'(pop_n);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) n_in <= free);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) 7'(pop_n) <= count);

endmodule
