// ready_table: physical register ready bits checked at the Cyclone heads.
//
// One bit per physical register. A register becomes not-ready when an
// instruction that writes it is accepted into the scheduler (alloc ports)
// and ready when the execution core reports that its value can be used
// (wb ports). Each read port checks both sources of one main-queue head and
// says whether the instruction may issue; an instruction whose sources are
// not all ready is replayed by Cyclone.
//
// Timing: rd_ready is combinational from the registered bits, so a wb in
// cycle t lets a dependent issue in cycle t+1. A wb and an alloc of the same
// register in one cycle leave it not-ready (the alloc is the newer event).
// The ready-bit check at the head is the published mechanism; the register
// count and port counts are this design's choices. Reset marks every
// register ready (architectural state).
module ready_table
  import zephyr_pkg::*;
#(
  parameter int PREGS    = 512,
  parameter int RD_W     = 8,
  parameter int WB_PORTS = 16,
  parameter int ALLOC_W  = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [ALLOC_W-1:0]  alloc_valid,
  input  logic [PREG_W-1:0]   alloc_preg [ALLOC_W],
  input  logic [WB_PORTS-1:0] wb_valid,
  input  logic [PREG_W-1:0]   wb_preg    [WB_PORTS],
  input  uop_t                rd_uop     [RD_W],
  output logic [RD_W-1:0]     rd_ready
);

  logic [PREGS-1:0] rdy;

  always_comb begin
    for (int k = 0; k < RD_W; k++)
      rd_ready[k] = (!rd_uop[k].src1_v || rdy[rd_uop[k].psrc1]) &&
                    (!rd_uop[k].src2_v || rdy[rd_uop[k].psrc2]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rdy <= '1;
    end else begin
      for (int w = 0; w < WB_PORTS; w++)
        if (wb_valid[w]) rdy[wb_preg[w]] <= 1'b1;
      for (int a = 0; a < ALLOC_W; a++)
        if (alloc_valid[a]) rdy[alloc_preg[a]] <= 1'b0;
    end
  end

endmodule
