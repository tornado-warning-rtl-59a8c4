// tb_ready_table: self-checking test of the physical register ready bits.
//
// A bit-array model applies the same allocations (clear) and writebacks
// (set, with allocation winning on the same register in one cycle); every
// cycle eight random instructions are checked against it.
`timescale 1ns/1ps
module tb_ready_table;
  import zephyr_pkg::*;
  localparam int P = 512, R = 8, WB = 16, A = 8;

  logic clk = 0, rst_n = 0;
  logic [A-1:0] alloc_valid;
  logic [PREG_W-1:0] alloc_preg [A];
  logic [WB-1:0] wb_valid;
  logic [PREG_W-1:0] wb_preg [WB];
  uop_t rd_uop [R];
  logic [R-1:0] rd_ready;
  bit m [P];
  int checks = 0, failures = 0, n_rdy = 0, n_nrdy = 0;

  ready_table #(.PREGS(P), .RD_W(R), .WB_PORTS(WB), .ALLOC_W(A)) dut (.*);
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
    alloc_valid = '0; wb_valid = '0;
    for (int i = 0; i < P; i++) m[i] = 1;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      for (int a = 0; a < A; a++) begin
        alloc_valid[a] = $urandom_range(0, 1);
        alloc_preg[a] = PREG_W'($urandom_range(0, 63));
      end
      for (int w = 0; w < WB; w++) begin
        wb_valid[w] = $urandom_range(0, 1);
        wb_preg[w] = PREG_W'($urandom_range(0, 63));
      end
      for (int k = 0; k < R; k++) begin
        rd_uop[k] = '0;
        rd_uop[k].src1_v = $urandom_range(0, 3) != 0;
        rd_uop[k].src2_v = $urandom_range(0, 1);
        rd_uop[k].psrc1 = PREG_W'($urandom_range(0, 63));
        rd_uop[k].psrc2 = PREG_W'($urandom_range(0, 63));
      end
      #1;
      for (int k = 0; k < R; k++) begin
        bit e;
        e = (!rd_uop[k].src1_v || m[rd_uop[k].psrc1]) && (!rd_uop[k].src2_v || m[rd_uop[k].psrc2]);
        check(rd_ready[k] == e, $sformatf("port %0d", k));
        if (e) n_rdy++; else n_nrdy++;
      end
      @(posedge clk);
      for (int w = 0; w < WB; w++) if (wb_valid[w]) m[wb_preg[w]] = 1;
      for (int a = 0; a < A; a++) if (alloc_valid[a]) m[alloc_preg[a]] = 0;
      @(negedge clk);
    end
    check(n_rdy > 100 && n_nrdy > 100, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
