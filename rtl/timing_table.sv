// timing_table: predicted register ready times for the scheduler.
//
// One entry per (thread, logical register) holds the number of cycles until
// that register is expected to be ready; every entry counts down by one per
// cycle and stops at zero. A dispatching instruction's predicted wait is the
// MAX of its source entries; its destination entry is then written with
// wait + predicted latency, so that dependents see the producer's expected
// completion. Several instructions dispatch per cycle, so a source produced
// by an older instruction of the same group and thread is taken from that
// instruction (a bypass inside the group) rather than from the table.
// RD_PORTS extra read ports serve replayed instructions, which re-evaluate
// their wait against the current table (the optimised Cyclone replay).
//
// Timing: d_wait and r_wait are combinational from the registered table and
// the inputs. Writes for the accepted prefix (d_accept) land at the clock
// edge. Indexing by logical register and thread, the MAX and the replay
// re-evaluation follow the published scheduler; the count-down encoding,
// the group bypass and the widths are this design's choices.
module timing_table
  import zephyr_pkg::*;
#(
  parameter int THREADS  = 4,
  parameter int LREGS    = 64,
  parameter int DISP_W   = 8,
  parameter int RD_PORTS = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // dispatch group (program order)
  input  logic [DISP_W-1:0]        d_valid,
  input  uop_t                     d_uop  [DISP_W],
  input  logic [WAIT_W-1:0]        d_lat  [DISP_W],
  input  logic [DISP_W-1:0]        d_accept,
  output logic [WAIT_W-1:0]        d_wait [DISP_W],
  // replay re-evaluation
  input  uop_t                     r_uop  [RD_PORTS],
  output logic [WAIT_W-1:0]        r_wait [RD_PORTS]
);

  logic [WAIT_W-1:0] cnt [THREADS][LREGS];
  logic [WAIT_W-1:0] d_done [DISP_W];   // wait + latency per slot

  function automatic logic [WAIT_W-1:0] wmax(logic [WAIT_W-1:0] a, logic [WAIT_W-1:0] b);
    return (a > b) ? a : b;
  endfunction

  always_comb begin
    for (int i = 0; i < DISP_W; i++) d_done[i] = '0;
    for (int i = 0; i < DISP_W; i++) begin
      logic [WAIT_W-1:0] s1, s2;
      s1 = d_uop[i].src1_v ? cnt[d_uop[i].tid][d_uop[i].lsrc1] : '0;
      s2 = d_uop[i].src2_v ? cnt[d_uop[i].tid][d_uop[i].lsrc2] : '0;
      // youngest older producer in the group wins
      for (int j = 0; j < i; j++) begin
        if (d_valid[j] && d_uop[j].dst_v && d_uop[j].tid == d_uop[i].tid) begin
          if (d_uop[i].src1_v && d_uop[j].ldst == d_uop[i].lsrc1) s1 = d_done[j];
          if (d_uop[i].src2_v && d_uop[j].ldst == d_uop[i].lsrc2) s2 = d_done[j];
        end
      end
      d_wait[i] = wmax(s1, s2);
      d_done[i] = sat_add(d_wait[i], d_lat[i]);
    end
  end

  always_comb begin
    for (int k = 0; k < RD_PORTS; k++) begin
      logic [WAIT_W-1:0] s1, s2;
      s1 = r_uop[k].src1_v ? cnt[r_uop[k].tid][r_uop[k].lsrc1] : '0;
      s2 = r_uop[k].src2_v ? cnt[r_uop[k].tid][r_uop[k].lsrc2] : '0;
      r_wait[k] = wmax(s1, s2);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int t = 0; t < THREADS; t++)
        for (int r = 0; r < LREGS; r++)
          cnt[t][r] <= '0;
    end else begin
      for (int t = 0; t < THREADS; t++)
        for (int r = 0; r < LREGS; r++)
          if (cnt[t][r] != '0) cnt[t][r] <= cnt[t][r] - 1'b1;
      // later slots overwrite earlier ones; one cycle passes before the read
      for (int i = 0; i < DISP_W; i++)
        if (d_valid[i] && d_accept[i] && d_uop[i].dst_v)
          cnt[d_uop[i].tid][d_uop[i].ldst] <= (d_done[i] == '0) ? '0 : d_done[i] - 1'b1;
    end
  end

endmodule
