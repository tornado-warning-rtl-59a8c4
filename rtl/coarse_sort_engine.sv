// coarse_sort_engine: the FIFO stage of Zephyr that sorts instructions
// coarsely by their predicted waiting time.
//
// Sixteen sort_fifo queues with buffering lengths 1 (six queues), 5 (four),
// 10 (two), 20 (two) and 150 (two). Each cycle the dispatch group is taken
// in program order: an instruction's wait is rounded down to the longest
// queue length not above it (waits below 1 use a length-1 queue) and it is
// placed in a queue of that length that can take it; if all such queues are
// busy it falls back to a shorter length, which still never holds it past
// its predicted wait. Each queue takes at most one instruction per cycle.
// The first instruction that finds no queue stops the group: in_count is the
// accepted prefix and the rest must be offered again.
// On the output side every queue head whose buffering time has elapsed moves
// to the PreIssue Buffer of its thread, as long as that buffer has room;
// heads of longer queues are served first. Instructions therefore enter the
// queues in order but leave them out of order.
//
// Timing: in_count/in_fifo and out_valid are combinational; queue state
// changes at the clock edge. The queue mix and the round-down rule follow
// the published design; the fall-back to shorter queues, the one-push-per-
// queue limit and the output priority are this design's choices.
module coarse_sort_engine
  import zephyr_pkg::*;
#(
  parameter int THREADS = 4,
  parameter int DISP_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TS_W-1:0]   now,
  input  logic [DISP_W-1:0] in_valid,
  input  uop_t              in_uop  [DISP_W],
  input  logic [WAIT_W-1:0] in_wait [DISP_W],
  output logic [3:0]        in_count,
  output logic [4:0]        in_fifo [DISP_W],   // queue chosen per accepted slot
  input  logic [6:0]        pib_free [THREADS],
  output logic [15:0]       out_valid,
  output uop_t              out_uop [16]
);

  localparam int N_FIFO = 16;
  localparam int LENS [N_FIFO] = '{1, 1, 1, 1, 1, 1, 5, 5, 5, 5, 10, 10, 20, 20, 150, 150};

  logic [N_FIFO-1:0] can_push, push, head_valid, pop;
  uop_t              push_uop [N_FIFO];
  uop_t              head_uop [N_FIFO];
  logic [7:0]        fcount   [N_FIFO];

  for (genvar f = 0; f < N_FIFO; f++) begin : g_fifo
    sort_fifo #(.DEPTH(LENS[f]), .DELAY(LENS[f])) u_fifo (
      .clk, .rst_n, .now,
      .push(push[f]), .push_uop(push_uop[f]), .can_push(can_push[f]),
      .head_valid(head_valid[f]), .head_uop(head_uop[f]), .pop(pop[f]),
      .count(fcount[f]));
  end

  // ---- classification and placement, program order ----
  always_comb begin
    logic stop;
    logic found;
    found    = 1'b0;
    push     = '0;
    in_count = '0;
    stop     = 1'b0;
    for (int f = 0; f < N_FIFO; f++) push_uop[f] = in_uop[0];
    for (int i = 0; i < DISP_W; i++) begin
      in_fifo[i] = '0;
      if (in_valid[i] && !stop) begin
        found = 1'b0;
        for (int f = N_FIFO - 1; f >= 0; f--) begin
          if (!found && can_push[f] && !push[f] &&
              (LENS[f] == 1 || 32'(in_wait[i]) >= LENS[f])) begin
            found       = 1'b1;
            push[f]     = 1'b1;
            push_uop[f] = in_uop[i];
            in_fifo[i]  = 5'(f);
          end
        end
        if (found) in_count = in_count + 4'd1;
        else       stop     = 1'b1;
      end
    end
  end

  // ---- release to the PreIssue Buffers ----
  always_comb begin
    logic [6:0] used [THREADS];
    for (int t = 0; t < THREADS; t++) used[t] = '0;
    pop = '0;
    for (int f = N_FIFO - 1; f >= 0; f--) begin
      if (head_valid[f] && used[head_uop[f].tid] < pib_free[head_uop[f].tid]) begin
        pop[f] = 1'b1;
        used[head_uop[f].tid] = used[head_uop[f].tid] + 7'd1;
      end
    end
  end

  assign out_valid = pop;
  assign out_uop   = head_uop;

endmodule
