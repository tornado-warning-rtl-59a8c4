// zephyr_pkg: types and constants shared by the Zephyr scheduler.
//
// The scheduler moves one record, uop_t, through every stage: the latency
// prediction engine fills in ready_ts (the cycle at which its operands are
// expected to be ready), the sorting FIFOs and PreIssue Buffers carry it
// unchanged, and the Cyclone queues hold it until it issues.
//
// Machine numbers follow the evaluated processor: 8-wide issue, functional
// unit latencies 1/5/25 (integer add/mult/div), 2/10/30 (FP add/mult/div),
// an L1 hit of 2 cycles and an L2 hit of 12. Register counts, tag widths and
// the 16-bit time stamp are this design's own choices.
package zephyr_pkg;

  localparam int TID_W       = 2;
  localparam int LREG_W      = 6;           // 32 integer + 32 FP logical registers
  localparam int PREG_W      = 9;           // 512 physical registers
  localparam int TAG_W       = 8;           // instruction tag (ROB has 256 entries)
  localparam int TS_W        = 16;          // free-running cycle time stamp
  localparam int WAIT_W      = 10;          // wait / latency in cycles, saturating
  localparam int WAIT_MAX    = (1 << WAIT_W) - 1;

  // Execution latencies of the evaluated machine
  localparam int LAT_ALU   = 1;
  localparam int LAT_MUL   = 5;
  localparam int LAT_DIV   = 25;
  localparam int LAT_FADD  = 2;
  localparam int LAT_FMUL  = 10;
  localparam int LAT_FDIV  = 30;
  localparam int LAT_L1    = 2;
  localparam int LAT_L2    = 12;
  localparam int LAT_MEM   = 164;

  typedef enum logic [2:0] {
    OP_ALU   = 3'd0,
    OP_MUL   = 3'd1,
    OP_DIV   = 3'd2,
    OP_LOAD  = 3'd3,
    OP_STORE = 3'd4,
    OP_FADD  = 3'd5,
    OP_FMUL  = 3'd6,
    OP_FDIV  = 3'd7
  } op_e;

  typedef struct packed {
    logic [TID_W-1:0]  tid;
    logic [31:0]       pc;
    op_e               op;
    logic              src1_v;
    logic              src2_v;
    logic              dst_v;
    logic [LREG_W-1:0] lsrc1;
    logic [LREG_W-1:0] lsrc2;
    logic [LREG_W-1:0] ldst;
    logic [PREG_W-1:0] psrc1;
    logic [PREG_W-1:0] psrc2;
    logic [PREG_W-1:0] pdst;
    logic [TAG_W-1:0]  tag;
    logic [TS_W-1:0]   ready_ts;   // predicted operand-ready cycle
  } uop_t;

  // Fixed (non-load) execution latency of an operation class.
  function automatic logic [WAIT_W-1:0] op_latency(op_e op);
    case (op)
      OP_ALU:   return WAIT_W'(LAT_ALU);
      OP_MUL:   return WAIT_W'(LAT_MUL);
      OP_DIV:   return WAIT_W'(LAT_DIV);
      OP_LOAD:  return WAIT_W'(LAT_L1);
      OP_STORE: return WAIT_W'(LAT_ALU);
      OP_FADD:  return WAIT_W'(LAT_FADD);
      OP_FMUL:  return WAIT_W'(LAT_FMUL);
      default:  return WAIT_W'(LAT_FDIV);
    endcase
  endfunction

  // Saturating add of two waits.
  function automatic logic [WAIT_W-1:0] sat_add(logic [WAIT_W-1:0] a, logic [WAIT_W-1:0] b);
    logic [WAIT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[WAIT_W] ? WAIT_W'(WAIT_MAX) : s[WAIT_W-1:0];
  endfunction

  // Cycles from now until time stamp ts, zero if ts is not in the future.
  function automatic logic [WAIT_W-1:0] ts_remaining(logic [TS_W-1:0] ts, logic [TS_W-1:0] now);
    logic [TS_W-1:0] d;
    d = ts - now;
    if (d[TS_W-1]) return '0;                       // in the past
    if (d > TS_W'(WAIT_MAX)) return WAIT_W'(WAIT_MAX);
    return d[WAIT_W-1:0];
  endfunction

  // True when time stamp ts has been reached.
  function automatic logic ts_reached(logic [TS_W-1:0] ts, logic [TS_W-1:0] now);
    logic [TS_W-1:0] d;
    d = now - ts;
    return !d[TS_W-1];
  endfunction

endpackage
