// tb_pib: self-checking test of the PreIssue Buffer.
//
// A queue model receives the same arrivals (valid inputs appended in input
// order, never more than `free`) and removals (pop_n up to the count and 8).
// Every cycle count, free and the eight oldest entries are compared. Phases
// drive the buffer to full and to empty.
`timescale 1ns/1ps
module tb_pib;
  import zephyr_pkg::*;
  localparam int DEPTH = 64, IN_W = 16, OUT_W = 8;

  logic clk = 0, rst_n = 0;
  logic [IN_W-1:0] in_valid;
  uop_t in_uop [IN_W];
  logic [6:0] free, count;
  uop_t out_uop [OUT_W];
  logic [3:0] pop_n;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0, id = 0;
  int q [$];

  pib #(.DEPTH(DEPTH), .IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);
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
    in_valid = '0; pop_n = '0;
    for (int i = 0; i < IN_W; i++) in_uop[i] = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      int room, nin, npop, mx;
      bit fill;
      fill = (it / 200) % 2 == 0;
      #1;
      check(int'(count) == q.size(), $sformatf("count %0d exp %0d", count, q.size()));
      check(int'(free) == DEPTH - q.size(), "free");
      for (int k = 0; k < OUT_W && k < q.size(); k++)
        check(int'(out_uop[k].pc) == q[k], $sformatf("out %0d", k));
      if (q.size() == DEPTH) n_full++;
      if (q.size() == 0) n_empty++;
      room = DEPTH - q.size();
      nin = 0;
      in_valid = '0;
      for (int i = 0; i < IN_W; i++) begin
        in_uop[i] = '0;
        in_uop[i].pc = 32'(id + i);
        if ($urandom_range(0, fill ? 2 : 9) == 0 && nin < room) begin in_valid[i] = 1; nin++; end
      end
      mx = q.size() < OUT_W ? q.size() : OUT_W;
      npop = $urandom_range(0, mx);
      if (!fill && $urandom_range(0, 1)) npop = mx;
      pop_n = 4'(npop);
      @(posedge clk);
      for (int k = 0; k < npop; k++) void'(q.pop_front());
      for (int i = 0; i < IN_W; i++) if (in_valid[i]) q.push_back(id + i);
      id += IN_W;
      @(negedge clk);
    end
    check(n_full > 0 && n_empty > 0, "buffer reached full and empty");
    $display("full=%0d empty=%0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
