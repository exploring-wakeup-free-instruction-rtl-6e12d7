// wf_pkg: types and constants shared by the WF-Segment wakeup-free scheduler.
//
// The scheduler never broadcasts result tags. Each instruction carries a
// predicted issue latency. The latency is computed at rename from a timing
// table of per-register ready latencies. The instruction then counts that
// latency down while it sinks through a segmented issue queue. Latencies
// everywhere in this design use one rule: a stored latency gives the cycles,
// counted from the cycle in which the value is visible, until the predicted
// ready time. Every stored latency therefore drops by one at each clock edge
// and saturates at zero.
//
// The issue width, fetch width, segment count, segment size and segment
// latency ranges follow the document's WF-Segment configuration. The register
// counts, latency width, tag width and operation latencies are this design's
// own choices.
package wf_pkg;

  // ---- widths of the machine (document: 4-wide fetch/decode/issue) -------
  parameter int unsigned FETCH_W   = 4;
  parameter int unsigned ISSUE_W   = 4;

  // ---- register file (not given by the document: 32 int + 32 fp logical,
  //      128 extra physical registers to cover the 128-entry ROB) ----------
  parameter int unsigned NUM_LREGS = 64;
  parameter int unsigned NUM_PREGS = 192;
  parameter int unsigned LREG_W    = $clog2(NUM_LREGS);
  parameter int unsigned PREG_W    = $clog2(NUM_PREGS);

  // ---- latency counters (6 bits, saturating) ------------------------------
  parameter int unsigned LAT_W     = 6;
  parameter int unsigned LAT_MAX   = (1 << LAT_W) - 1;

  // ---- instruction tag (ROB index, ROB has 128 entries) -------------------
  parameter int unsigned ROB_SIZE  = 128;
  parameter int unsigned TAG_W     = $clog2(ROB_SIZE);

  // ---- load latencies: L1 hit 2 cycles, L2 hit 8 cycles (Table 1) ---------
  parameter int unsigned L1_LAT    = 2;
  parameter int unsigned L2_LAT    = 8;

  // ---- segmented queue (document: 4 segments of twice the issue width;
  //      latency ranges 0 / 1-2 / 3-4 / >4 from bottom to top) -------------
  parameter int unsigned NUM_SEGS  = 4;
  parameter int unsigned SEG_SIZE  = 2 * ISSUE_W;
  parameter int unsigned SEG_W     = $clog2(NUM_SEGS);
  // Upper latency bound of segments 0..NUM_SEGS-2; the top segment is open.
  parameter int unsigned SEG_HI [NUM_SEGS-1] = '{0, 2, 4};

  // Segment whose latency range holds latency l.
  function automatic logic [SEG_W-1:0] seg_of_lat(logic [LAT_W-1:0] l);
    for (int s = 0; s < NUM_SEGS - 1; s++)
      if (int'(l) <= int'(SEG_HI[s])) return SEG_W'(s);
    return SEG_W'(NUM_SEGS - 1);
  endfunction

  // ---- operation classes --------------------------------------------------
  typedef enum logic [2:0] {
    OP_IALU  = 3'd0,
    OP_IMUL  = 3'd1,
    OP_IDIV  = 3'd2,
    OP_FALU  = 3'd3,
    OP_FMUL  = 3'd4,
    OP_FDIV  = 3'd5,
    OP_LOAD  = 3'd6,
    OP_STORE = 3'd7   // stores and control instructions produce no register
  } op_e;

  typedef logic [LAT_W-1:0]  lat_t;
  typedef logic [PREG_W-1:0] preg_t;
  typedef logic [LREG_W-1:0] lreg_t;
  typedef logic [TAG_W-1:0]  tag_t;

  // Fixed operation latencies of the non-load classes. The document only
  // says that these are fixed; the numbers are the usual defaults of the
  // SimpleScalar tool set. Loads take their latency from the hit/miss
  // predictor.
  function automatic lat_t op_latency(op_e op);
    case (op)
      OP_IALU:  return lat_t'(1);
      OP_IMUL:  return lat_t'(3);
      OP_IDIV:  return lat_t'(20);
      OP_FALU:  return lat_t'(2);
      OP_FMUL:  return lat_t'(4);
      OP_FDIV:  return lat_t'(12);
      OP_LOAD:  return lat_t'(L1_LAT);
      default:  return lat_t'(0);
    endcase
  endfunction

  // Saturating helpers.
  function automatic lat_t lat_dec(lat_t l);
    return (l == '0) ? '0 : l - lat_t'(1);
  endfunction

  function automatic lat_t lat_add(lat_t a, lat_t b);
    logic [LAT_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[LAT_W] ? lat_t'(LAT_MAX) : s[LAT_W-1:0];
  endfunction

  function automatic lat_t lat_max(lat_t a, lat_t b);
    return (a > b) ? a : b;
  endfunction

  // Instruction as delivered by the decoder, in architectural registers.
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    op_e         op;
    logic        src1_v;
    lreg_t       src1;
    logic        src2_v;
    lreg_t       src2;
    logic        dst_v;
    lreg_t       dst;
    tag_t        tag;
  } dec_inst_t;

  // Instruction after rename: what the issue queue holds.
  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    op_e         op;
    logic        src1_v;
    preg_t       psrc1;
    logic        src2_v;
    preg_t       psrc2;
    logic        dst_v;
    preg_t       pdst;
    lat_t        dst_lat;   // predicted operation latency of the result
    tag_t        tag;
  } iq_inst_t;

  // Rename output: queue payload plus predicted issue latency and the
  // previous mapping of the destination, freed by the ROB at commit.
  typedef struct packed {
    iq_inst_t    inst;
    lat_t        issue_lat;
    preg_t       old_pdst;
  } ren_inst_t;

  // Per-cycle event counts of the segmented queue, for performance
  // counters and testbenches.
  typedef struct packed {
    logic [3:0] issued;        // instructions issued
    logic [3:0] pc_fail;       // pre-checks that found an operand not ready
    logic [3:0] switchbacks;   // failed instructions sent back up
    logic [3:0] sb_blocked;    // failed instructions with no room above
    logic [3:0] sinks;         // instructions that sank one segment
    logic [3:0] dispatched;    // instructions dispatched
    logic [3:0] disp_overflow; // dispatched above their own segment
    logic       disp_stall;    // a dispatch-buffer instruction found no room
    logic       sel_conflict;  // more requests than issue ports
    logic       escape;        // the oldest instruction jumped to the bottom
  } iq_events_t;

endpackage
