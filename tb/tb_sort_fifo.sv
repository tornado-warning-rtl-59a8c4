// tb_sort_fifo: self-checking test of one sorting FIFO (5 slots, length 5).
//
// A queue model holds each pushed tag with the cycle at which it may leave
// (push cycle + 5). Every cycle the DUT's head_valid, head tag and can_push
// are compared with the model; pushes and pops are random. A directed
// section checks that an instruction pushed into an empty queue appears at
// the head exactly 5 cycles later.
`timescale 1ns/1ps
module tb_sort_fifo;
  import zephyr_pkg::*;
  localparam int DEPTH = 5, DELAY = 5;

  logic clk = 0, rst_n = 0;
  logic [TS_W-1:0] now;
  logic push, pop, can_push, head_valid;
  uop_t push_uop, head_uop;
  logic [7:0] count;
  int checks = 0, failures = 0, n_full_push = 0, n_pop = 0;
  int q_tag [$];
  int q_rel [$];
  int cyc = 0;

  sort_fifo #(.DEPTH(DEPTH), .DELAY(DELAY)) dut (.*);
  always #5 clk = ~clk;
  assign now = TS_W'(cyc);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL cyc %0d %s", cyc, what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(bit want_push, bit want_pop, int tag);
    bit exp_hv, exp_cp;
    push_uop = '0;
    push_uop.tag = TAG_W'(tag);
    exp_hv = q_tag.size() > 0 && cyc >= q_rel[0];
    pop = want_pop && exp_hv;
    exp_cp = q_tag.size() < DEPTH || pop;
    push = want_push;
    #1;
    check(head_valid == exp_hv, $sformatf("head_valid %0b exp %0b", head_valid, exp_hv));
    if (exp_hv) check(int'(head_uop.tag) == q_tag[0], "head tag");
    check(can_push == exp_cp, "can_push");
    @(posedge clk);
    if (pop) begin void'(q_tag.pop_front()); void'(q_rel.pop_front()); n_pop++; end
    if (push && exp_cp) begin
      if (q_tag.size() == DEPTH - (pop ? 1 : 0) && pop) n_full_push++;
      q_tag.push_back(tag & 8'hff); q_rel.push_back(cyc + DELAY);
    end
    @(negedge clk);
    cyc++;
  endtask

  initial begin
    push = 0; pop = 0; push_uop = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // directed latency check
    step(1, 0, 7);
    for (int i = 1; i < DELAY; i++) begin
      check(!head_valid, "not released early");
      step(0, 0, 0);
    end
    #1 check(head_valid && head_uop.tag == 7, "released after exactly DELAY cycles");
    step(0, 1, 0);
    // random traffic
    for (int i = 0; i < 5000; i++)
      step(($urandom_range(0, 3) != 0), ($urandom_range(0, 2) != 0), i);
    check(n_full_push > 10, "push into a full queue with a simultaneous pop");
    $display("pops=%0d full-with-pop pushes=%0d", n_pop, n_full_push);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
