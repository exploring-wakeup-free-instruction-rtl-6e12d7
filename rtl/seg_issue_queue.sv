// seg_issue_queue: the segmented wakeup-free issue queue of WF-Segment.
//
// NUM_SEGS segments of SEG_SIZE entries each; segment s holds instructions
// whose predicted issue latency lies in its range (by default 0, 1-2, 3-4
// and above 4 cycles, from the bottom segment 0 to the top). Nothing is ever
// broadcast: each instruction in segments 1 and up carries a latency counter
// that drops by one per cycle, and once its value falls into the range of
// the segment below, the instruction sinks there. Instructions in the
// bottom segment have no counter but a ready bit. When an instruction
// arrives in the bottom segment it reads the register ready bits of its
// sources (the pre-check). If they are all set it sets its ready bit and
// requests issue in the same cycle; otherwise it is sent back up, with a
// latency recomputed from the timing table, to the segment that range
// selects. Only the bottom segment drives the selection logic.
//
// Each cycle, using the state at the start of the cycle:
//   1. bottom segment: pre-check, issue requests, selection (up to ISSUE_W);
//   2. switch-back of failed instructions into free entries of segments 1
//      and up, taking the right end of a segment first;
//   3. sinking from each segment into the free entries left in the one
//      below (left half left-first, right half right-first, see
//      sink_arbiter);
//   4. dispatch of the renamed group into what is still free, taking the
//      left end first, routed by latency and moved up when full; if the
//      top is full the rest of the group waits.
// The order gives switch-back the highest priority, then sinking, then
// dispatch, which is the document's deadlock-free policy. An entry emptied
// in a cycle (issued, sunk or switched back) is refilled from the next one.
//
// Follows the document: segment count, size, latency ranges, the three move
// kinds and their priority, the left-first/right-first sink policy, the
// pre-check on arrival and latency recomputation from the timing table.
// This design's choices: which side of a segment dispatch and switch-back
// use; that a recomputed latency is at least 1 (the operand is known not to
// be ready); that an instruction that failed its pre-check and found no room
// above stays in the bottom segment and repeats the pre-check; positional
// priority in selection; and that an instruction which passed its pre-check
// is removed when it issues, without replay.
//
// Three additions keep the queue moving, none of them in the document. A
// switch-back latency is never below SB_MIN_LAT (5, so failed instructions
// go to the top segment; the document allows a fixed switch-back latency).
// A sink request refused in one cycle is served first in the next. And the
// oldest instruction in flight (head_tag_i), whose operands are all ready,
// moves straight to the bottom segment when it has not sunk: into a free
// entry, or by swapping places with a failed instruction that found no room
// above. Without these, instructions cycling through switch-back could keep
// the producer they wait for from ever reaching the bottom.
//
// Lint notes: the router's overflow flags for switch-back (sb_ovf) and the
// free map left after dispatch (free3) are not needed, and only the source
// fields of the bottom-segment payload are read by the pre-check.
//
// Interface: disp_buf_i is the rename stage's dispatch buffer, disp_o the
// mask of its instructions placed this cycle. iss_v_o/iss_o are the issued
// instructions (combinational, same cycle). rbr_i are the register ready
// bits; tt_rd_* read the timing table for the switch-back latency;
// head_v_i/head_tag_i name the oldest instruction in flight.
module seg_issue_queue
  import wf_pkg::*;
#(
  parameter int unsigned SB_MIN_LAT = 5
)
(
  input  logic            clk,
  input  logic            rst_n,
  input  ren_inst_t       disp_buf_i [FETCH_W],
  output logic            disp_o     [FETCH_W],
  output logic            iss_v_o    [ISSUE_W],
  output iq_inst_t        iss_o      [ISSUE_W],
  input  logic [NUM_PREGS-1:0] rbr_i,
  input  logic            head_v_i,
  input  tag_t            head_tag_i,
  output preg_t           tt_rd_addr_o [2*SEG_SIZE],
  input  lat_t            tt_rd_lat_i  [2*SEG_SIZE],
  output logic [SEG_SIZE-1:0] occ_o  [NUM_SEGS],
  output iq_events_t      ev_o
);

  localparam int unsigned N  = SEG_SIZE;
  localparam int unsigned IW = $clog2(SEG_SIZE);

  typedef struct packed {
    logic     valid;
    logic     rdy;     // bottom segment only: pre-check passed
    logic     stv;     // segments 1 and up: sink request refused last cycle
    lat_t     cnt;     // segments 1 and up: latency counter
    iq_inst_t inst;
  } ent_t;

  ent_t ent_q [NUM_SEGS][N];

  // ---- 1. bottom segment: pre-check and selection -------------------------
  logic [N-1:0] free0 [NUM_SEGS];
  logic [N-1:0] req, gnt, pc_pass, pc_fail;
  logic         sb_v   [N];
  lat_t         sb_lat [N];
  logic         sel_pv [ISSUE_W];
  logic [IW-1:0] sel_pi [ISSUE_W];

  always_comb
    for (int k = 0; k < N; k++) begin
      tt_rd_addr_o[2*k]   = ent_q[0][k].inst.psrc1;
      tt_rd_addr_o[2*k+1] = ent_q[0][k].inst.psrc2;
    end

  always_comb begin
    for (int s = 0; s < NUM_SEGS; s++)
      for (int k = 0; k < N; k++) free0[s][k] = !ent_q[s][k].valid;
    for (int k = 0; k < N; k++) begin
      iq_inst_t in;
      lat_t     nl;
      in = ent_q[0][k].inst;
      pc_pass[k] = ent_q[0][k].valid && !ent_q[0][k].rdy &&
                   (!in.src1_v || rbr_i[in.psrc1]) && (!in.src2_v || rbr_i[in.psrc2]);
      pc_fail[k] = ent_q[0][k].valid && !ent_q[0][k].rdy && !pc_pass[k];
      req[k]     = (ent_q[0][k].valid && ent_q[0][k].rdy) || pc_pass[k];
      nl = lat_t'(SB_MIN_LAT);
      if (in.src1_v) nl = lat_max(nl, tt_rd_lat_i[2*k]);
      if (in.src2_v) nl = lat_max(nl, tt_rd_lat_i[2*k+1]);
      sb_v[k]   = pc_fail[k];
      sb_lat[k] = lat_dec(nl);
    end
  end

  select_logic #(.N(N), .NPORT(ISSUE_W)) u_select (
    .req(req), .gnt(gnt), .port_v(sel_pv), .port_idx(sel_pi)
  );

  always_comb
    for (int p = 0; p < ISSUE_W; p++) begin
      iss_v_o[p] = sel_pv[p];
      iss_o[p]   = ent_q[0][sel_pi[p]].inst;
    end

  // ---- 2. switch-back --------------------------------------------------------
  logic          sb_placed [N];
  logic [SEG_W-1:0] sb_seg [N];
  logic [IW-1:0] sb_idx    [N];
  logic          sb_ovf    [N];
  logic [N-1:0]  free1     [NUM_SEGS];

  seg_router #(.NIN(N), .SEGN(N), .MIN_SEG(1), .FROM_RIGHT(1'b1), .IN_ORDER(1'b0)) u_sb_router (
    .in_v(sb_v), .in_lat(sb_lat), .free_in(free0),
    .placed(sb_placed), .seg(sb_seg), .idx(sb_idx), .overflow(sb_ovf), .free_out(free1)
  );

  // ---- 3. sinking -------------------------------------------------------------
  logic [N-1:0]  sk_req  [NUM_SEGS-1];   // from segment s+1 into s
  logic [N-1:0]  sk_take [NUM_SEGS-1];
  logic [IW-1:0] sk_src  [NUM_SEGS-1][N];
  logic [N-1:0]  sk_gnt  [NUM_SEGS-1];
  logic [N-1:0]  free2   [NUM_SEGS];

  always_comb
    for (int s = 0; s < NUM_SEGS - 1; s++)
      for (int k = 0; k < N; k++)
        sk_req[s][k] = ent_q[s+1][k].valid &&
                       int'(lat_dec(ent_q[s+1][k].cnt)) <= int'(SEG_HI[s]);

  // Two passes per level: requests refused in the previous cycle (starved)
  // are served first, the rest take what is left. Without this, instructions
  // cycling through switch-back can keep a producer they wait for from ever
  // sinking (positional starvation).
  logic [N-1:0]  sk_reqa  [NUM_SEGS-1];
  logic [N-1:0]  sk_reqb  [NUM_SEGS-1];
  logic [N-1:0]  sk_takea [NUM_SEGS-1];
  logic [N-1:0]  sk_takeb [NUM_SEGS-1];
  logic [N-1:0]  sk_gnta  [NUM_SEGS-1];
  logic [N-1:0]  sk_gntb  [NUM_SEGS-1];
  logic [N-1:0]  sk_freeb [NUM_SEGS-1];
  logic [IW-1:0] sk_srca  [NUM_SEGS-1][N];
  logic [IW-1:0] sk_srcb  [NUM_SEGS-1][N];

  always_comb
    for (int s = 0; s < NUM_SEGS - 1; s++)
      for (int k = 0; k < N; k++)
        sk_reqa[s][k] = sk_req[s][k] && ent_q[s+1][k].stv;

  for (genvar s = 0; s < NUM_SEGS - 1; s++) begin : g_sink
    sink_arbiter #(.N(N)) u_sink_a (
      .up_req(sk_reqa[s]), .lo_free(free1[s]),
      .take(sk_takea[s]), .src(sk_srca[s]), .up_gnt(sk_gnta[s])
    );
    assign sk_reqb[s]  = sk_req[s] & ~sk_reqa[s];
    assign sk_freeb[s] = free1[s] & ~sk_takea[s];
    sink_arbiter #(.N(N)) u_sink_b (
      .up_req(sk_reqb[s]), .lo_free(sk_freeb[s]),
      .take(sk_takeb[s]), .src(sk_srcb[s]), .up_gnt(sk_gntb[s])
    );
  end

  always_comb
    for (int s = 0; s < NUM_SEGS - 1; s++) begin
      sk_take[s] = sk_takea[s] | sk_takeb[s];
      sk_gnt[s]  = sk_gnta[s] | sk_gntb[s];
      for (int k = 0; k < N; k++)
        sk_src[s][k] = sk_takea[s][k] ? sk_srca[s][k] : sk_srcb[s][k];
    end

  // ---- 3b. escape of the oldest instruction -----------------------------------
  // The oldest instruction in flight (the reorder-buffer head) has all its
  // operands ready. If it sits in segment 1 or up and did not sink this
  // cycle, it moves straight into a bottom entry: one left free after
  // sinking, or else the entry of a failed instruction that found no room
  // above, which takes the head's place (a swap). This guarantees forward
  // progress when the queue is full of instructions waiting on it.
  logic             esc_v, esc_found, esc_swap;
  logic [SEG_W-1:0] esc_s;
  logic [IW-1:0]    esc_k, esc_dst;

  always_comb begin
    logic dst_free, dst_blk;
    logic [IW-1:0] kf, kb;
    esc_found = 1'b0; esc_s = '0; esc_k = '0;
    for (int s = 1; s < NUM_SEGS; s++)
      for (int k = 0; k < N; k++)
        if (!esc_found && ent_q[s][k].valid && ent_q[s][k].inst.tag == head_tag_i &&
            !sk_gnt[s-1][k]) begin
          esc_found = 1'b1; esc_s = SEG_W'(s); esc_k = IW'(k);
        end
    dst_free = 1'b0; dst_blk = 1'b0; kf = '0; kb = '0;
    for (int k = 0; k < N; k++) begin
      if (!dst_free && free1[0][k] && !sk_take[0][k]) begin dst_free = 1'b1; kf = IW'(k); end
      if (!dst_blk && sb_v[k] && !sb_placed[k])       begin dst_blk  = 1'b1; kb = IW'(k); end
    end
    esc_v    = head_v_i && esc_found && (dst_free || dst_blk);
    esc_swap = !dst_free;
    esc_dst  = dst_free ? kf : kb;
  end

  always_comb begin
    for (int s = 0; s < NUM_SEGS - 1; s++) free2[s] = free1[s] & ~sk_take[s];
    free2[NUM_SEGS-1] = free1[NUM_SEGS-1];
    if (esc_v && !esc_swap) free2[0][esc_dst] = 1'b0;
  end

  // ---- 4. dispatch -------------------------------------------------------------
  logic          d_v      [FETCH_W];
  lat_t          d_lat    [FETCH_W];
  logic          d_placed [FETCH_W];
  logic [SEG_W-1:0] d_seg [FETCH_W];
  logic [IW-1:0] d_idx    [FETCH_W];
  logic          d_ovf    [FETCH_W];
  logic [N-1:0]  free3    [NUM_SEGS];

  always_comb
    for (int i = 0; i < FETCH_W; i++) begin
      d_v[i]   = disp_buf_i[i].inst.valid;
      d_lat[i] = lat_dec(disp_buf_i[i].issue_lat);
    end

  seg_router #(.NIN(FETCH_W), .SEGN(N), .MIN_SEG(0), .FROM_RIGHT(1'b0), .IN_ORDER(1'b1)) u_disp_router (
    .in_v(d_v), .in_lat(d_lat), .free_in(free2),
    .placed(d_placed), .seg(d_seg), .idx(d_idx), .overflow(d_ovf), .free_out(free3)
  );

  always_comb
    for (int i = 0; i < FETCH_W; i++) disp_o[i] = d_placed[i];

  // ---- state update -------------------------------------------------------------
  ent_t ent_d [NUM_SEGS][N];

  always_comb begin
    for (int s = 0; s < NUM_SEGS; s++)
      for (int k = 0; k < N; k++) ent_d[s][k] = ent_q[s][k];
    // entries that stay, or leave
    for (int k = 0; k < N; k++) begin
      if (gnt[k] || (sb_v[k] && sb_placed[k])) ent_d[0][k].valid = 1'b0;
      else if (pc_pass[k])                     ent_d[0][k].rdy   = 1'b1;
    end
    for (int s = 1; s < NUM_SEGS; s++)
      for (int k = 0; k < N; k++) begin
        if (sk_gnt[s-1][k]) ent_d[s][k].valid = 1'b0;
        else begin
          ent_d[s][k].cnt = lat_dec(ent_q[s][k].cnt);
          ent_d[s][k].stv = sk_req[s-1][k];
        end
      end
    // switch-back writes
    for (int k = 0; k < N; k++)
      if (sb_v[k] && sb_placed[k])
        ent_d[sb_seg[k]][sb_idx[k]] = '{valid: 1'b1, rdy: 1'b0, stv: 1'b0, cnt: sb_lat[k],
                                        inst: ent_q[0][k].inst};
    // sink writes
    for (int s = 0; s < NUM_SEGS - 1; s++)
      for (int k = 0; k < N; k++)
        if (sk_take[s][k])
          ent_d[s][k] = '{valid: 1'b1, rdy: 1'b0, stv: 1'b0,
                          cnt: lat_dec(ent_q[s+1][sk_src[s][k]].cnt),
                          inst: ent_q[s+1][sk_src[s][k]].inst};
    // escape of the oldest instruction
    if (esc_v) begin
      ent_d[0][esc_dst] = '{valid: 1'b1, rdy: 1'b0, stv: 1'b0, cnt: '0,
                            inst: ent_q[esc_s][esc_k].inst};
      if (esc_swap)
        ent_d[esc_s][esc_k] = '{valid: 1'b1, rdy: 1'b0, stv: 1'b0, cnt: sb_lat[esc_dst],
                                inst: ent_q[0][esc_dst].inst};
      else
        ent_d[esc_s][esc_k].valid = 1'b0;
    end
    // dispatch writes
    for (int i = 0; i < FETCH_W; i++)
      if (d_placed[i])
        ent_d[d_seg[i]][d_idx[i]] = '{valid: 1'b1, rdy: 1'b0, stv: 1'b0, cnt: d_lat[i],
                                      inst: disp_buf_i[i].inst};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NUM_SEGS; s++)
        for (int k = 0; k < N; k++) ent_q[s][k] <= '0;
    end else begin
      for (int s = 0; s < NUM_SEGS; s++)
        for (int k = 0; k < N; k++) ent_q[s][k] <= ent_d[s][k];
    end
  end

  // ---- occupancy and events -------------------------------------------------------
  always_comb begin
    int unsigned nreq;
    for (int s = 0; s < NUM_SEGS; s++) occ_o[s] = ~free0[s];
    ev_o = '0;
    nreq = 0;
    for (int k = 0; k < N; k++) begin
      if (req[k]) nreq++;
      if (gnt[k])     ev_o.issued  = ev_o.issued + 4'd1;
      if (pc_fail[k]) ev_o.pc_fail = ev_o.pc_fail + 4'd1;
      if (sb_v[k] &&  sb_placed[k]) ev_o.switchbacks = ev_o.switchbacks + 4'd1;
      if (sb_v[k] && !sb_placed[k]) ev_o.sb_blocked  = ev_o.sb_blocked + 4'd1;
      for (int s = 0; s < NUM_SEGS - 1; s++)
        if (sk_take[s][k]) ev_o.sinks = ev_o.sinks + 4'd1;
    end
    for (int i = 0; i < FETCH_W; i++) begin
      if (d_placed[i])              ev_o.dispatched    = ev_o.dispatched + 4'd1;
      if (d_placed[i] && d_ovf[i])  ev_o.disp_overflow = ev_o.disp_overflow + 4'd1;
      if (d_v[i] && !d_placed[i])   ev_o.disp_stall    = 1'b1;
    end
    ev_o.sel_conflict = nreq > ISSUE_W;
    ev_o.escape       = esc_v;
  end

  // Only requesting entries are granted, and never more than the ports.
  a_gnt_req: assert property (@(posedge clk) disable iff (!rst_n)
    (gnt & ~req) == '0) else $error("grant without request");
  a_gnt_ports: assert property (@(posedge clk) disable iff (!rst_n)
    $countones(gnt) <= ISSUE_W) else $error("more grants than issue ports");

endmodule
