// rename_prescheduler: register renaming and issue-latency prediction.
//
// Each cycle a group of up to FETCH_W decoded instructions is renamed. For
// every source operand the rename stage reads its physical register's
// predicted ready latency from the timing table; a source written by an
// older instruction of the same group takes that producer's predicted result
// latency instead. The predicted issue latency of an instruction is the
// largest of its source latencies and, for a load, of the latency returned
// by the load/store dependence predictor. The predicted latency of its
// result is the issue latency plus the operation latency (for a load, the
// latency chosen by the hit/miss predictor). That result latency is written
// back to the timing table, the destination's ready bit is cleared, and each
// store is entered in the not-issued store table with its issue latency.
// All of this is the document's pre-scheduling scheme.
//
// Renamed instructions wait in a one-group dispatch buffer, their latencies
// still counting down, until the dispatch routing has placed them in the
// queue. A new group is accepted only when the buffer empties in this cycle
// and the free list has a register for every destination. The document
// keeps a copy of each register's latency and ready bit in the rename table;
// here the rename table holds only the mapping and the latency is read from
// the timing table directly, which gives the same value. The free list, the
// one-group buffer and the reset mapping (logical r -> physical r) are this
// design's choices.
//
// Timing: a group presented with dec_ready high is renamed in that cycle and
// can be dispatched from the next one.
module rename_prescheduler
  import wf_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  // from the decoder
  input  dec_inst_t    dec_i        [FETCH_W],
  output logic         dec_ready_o,
  // renamed group, in the cycle of renaming (for the reorder buffer)
  output logic         ren_fire_o,
  output ren_inst_t    ren_o        [FETCH_W],
  // timing table
  output preg_t        tt_rd_addr_o [2*FETCH_W],
  input  lat_t         tt_rd_lat_i  [2*FETCH_W],
  output logic         tt_wr_en_o   [FETCH_W],
  output preg_t        tt_wr_addr_o [FETCH_W],
  output lat_t         tt_wr_lat_o  [FETCH_W],
  // ready bit register
  output logic         rbr_clr_en_o   [FETCH_W],
  output preg_t        rbr_clr_addr_o [FETCH_W],
  // load predictors (looked up with dec_i[].pc)
  input  lat_t         ld_lat_i     [FETCH_W],   // hit/miss predictor latency
  input  lat_t         dep_lat_i    [FETCH_W],   // dependence predictor latency
  output logic         dep_look_en_o[FETCH_W],
  // not-issued store table inserts
  output logic         st_ins_en_o  [FETCH_W],
  output logic [31:0]  st_ins_pc_o  [FETCH_W],
  output tag_t         st_ins_tag_o [FETCH_W],
  output lat_t         st_ins_lat_o [FETCH_W],
  // registers returned at commit
  input  logic         free_en_i    [FETCH_W],
  input  preg_t        free_reg_i   [FETCH_W],
  // dispatch buffer towards the dispatch routing
  output ren_inst_t    buf_o        [FETCH_W],
  input  logic         disp_i       [FETCH_W]
);

  preg_t     map_q [NUM_LREGS];
  ren_inst_t buf_q [FETCH_W];

  preg_t     fl_head [FETCH_W];
  logic [$clog2(NUM_PREGS-NUM_LREGS+1)-1:0] fl_avail;
  logic [$clog2(FETCH_W+1)-1:0] alloc_cnt;

  free_list u_free_list (
    .clk, .rst_n,
    .head(fl_head), .avail(fl_avail), .alloc_cnt(alloc_cnt),
    .free_en(free_en_i), .free_reg(free_reg_i)
  );

  // ---- how many destinations the group needs, whether it can go ----------
  logic any_v, buf_drains;
  int unsigned ndst;
  always_comb begin
    any_v      = 1'b0;
    buf_drains = 1'b1;
    ndst       = 0;
    for (int i = 0; i < FETCH_W; i++) begin
      if (dec_i[i].valid) any_v = 1'b1;
      if (dec_i[i].valid && dec_i[i].dst_v) ndst++;
      if (buf_q[i].inst.valid && !disp_i[i]) buf_drains = 1'b0;
    end
    dec_ready_o = buf_drains && (int'(fl_avail) >= int'(ndst));
    ren_fire_o  = dec_ready_o && any_v;
    alloc_cnt   = ren_fire_o ? ($clog2(FETCH_W+1))'(ndst) : '0;
  end

  // ---- rename and latency prediction --------------------------------------
  always_comb begin
    int unsigned a;
    a = 0;
    for (int i = 0; i < FETCH_W; i++) begin
      tt_rd_addr_o[2*i]   = map_q[dec_i[i].src1];
      tt_rd_addr_o[2*i+1] = map_q[dec_i[i].src2];
    end
    for (int i = 0; i < FETCH_W; i++) begin
      lat_t l1, l2, oplat;
      ren_o[i] = '0;
      ren_o[i].inst.valid  = dec_i[i].valid;
      ren_o[i].inst.pc     = dec_i[i].pc;
      ren_o[i].inst.op     = dec_i[i].op;
      ren_o[i].inst.tag    = dec_i[i].tag;
      ren_o[i].inst.src1_v = dec_i[i].src1_v;
      ren_o[i].inst.src2_v = dec_i[i].src2_v;
      ren_o[i].inst.dst_v  = dec_i[i].dst_v;
      ren_o[i].inst.psrc1  = map_q[dec_i[i].src1];
      ren_o[i].inst.psrc2  = map_q[dec_i[i].src2];
      ren_o[i].old_pdst    = map_q[dec_i[i].dst];
      l1 = tt_rd_lat_i[2*i];
      l2 = tt_rd_lat_i[2*i+1];
      // older producers in the same group override the mapping
      for (int j = 0; j < i; j++)
        if (dec_i[j].valid && dec_i[j].dst_v) begin
          if (dec_i[i].src1 == dec_i[j].dst) begin
            ren_o[i].inst.psrc1 = ren_o[j].inst.pdst;
            l1 = lat_add(ren_o[j].issue_lat, ren_o[j].inst.dst_lat);
          end
          if (dec_i[i].src2 == dec_i[j].dst) begin
            ren_o[i].inst.psrc2 = ren_o[j].inst.pdst;
            l2 = lat_add(ren_o[j].issue_lat, ren_o[j].inst.dst_lat);
          end
          if (dec_i[i].dst == dec_i[j].dst) ren_o[i].old_pdst = ren_o[j].inst.pdst;
        end
      if (!dec_i[i].src1_v) l1 = '0;
      if (!dec_i[i].src2_v) l2 = '0;
      ren_o[i].issue_lat = lat_max(l1, l2);
      if (dec_i[i].op == OP_LOAD) ren_o[i].issue_lat = lat_max(ren_o[i].issue_lat, dep_lat_i[i]);
      oplat = (dec_i[i].op == OP_LOAD) ? ld_lat_i[i] : op_latency(dec_i[i].op);
      ren_o[i].inst.dst_lat = dec_i[i].dst_v ? oplat : '0;
      if (dec_i[i].valid && dec_i[i].dst_v) begin
        ren_o[i].inst.pdst = fl_head[a];
        a++;
      end
    end
    for (int i = 0; i < FETCH_W; i++) begin
      logic go;
      go = ren_fire_o && dec_i[i].valid;
      tt_wr_en_o[i]     = go && dec_i[i].dst_v;
      tt_wr_addr_o[i]   = ren_o[i].inst.pdst;
      tt_wr_lat_o[i]    = lat_add(ren_o[i].issue_lat, ren_o[i].inst.dst_lat);
      rbr_clr_en_o[i]   = go && dec_i[i].dst_v;
      rbr_clr_addr_o[i] = ren_o[i].inst.pdst;
      dep_look_en_o[i]  = go && dec_i[i].op == OP_LOAD;
      st_ins_en_o[i]    = go && dec_i[i].op == OP_STORE;
      st_ins_pc_o[i]    = dec_i[i].pc;
      st_ins_tag_o[i]   = dec_i[i].tag;
      st_ins_lat_o[i]   = ren_o[i].issue_lat;
    end
  end

  always_comb
    for (int i = 0; i < FETCH_W; i++) buf_o[i] = buf_q[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NUM_LREGS; r++) map_q[r] <= preg_t'(r);
      for (int i = 0; i < FETCH_W; i++) buf_q[i] <= '0;
    end else begin
      for (int i = 0; i < FETCH_W; i++) begin
        if (ren_fire_o) begin
          buf_q[i]           <= ren_o[i];
          buf_q[i].issue_lat <= lat_dec(ren_o[i].issue_lat);
        end else if (disp_i[i]) begin
          buf_q[i].inst.valid <= 1'b0;
        end else begin
          buf_q[i].issue_lat <= lat_dec(buf_q[i].issue_lat);
        end
      end
      if (ren_fire_o)
        for (int i = 0; i < FETCH_W; i++)
          if (dec_i[i].valid && dec_i[i].dst_v) map_q[dec_i[i].dst] <= ren_o[i].inst.pdst;
    end
  end

endmodule
