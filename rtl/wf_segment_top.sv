// wf_segment_top: WF-Segment, a wakeup-free instruction scheduler with a
// segmented issue queue, for a 4-wide out-of-order core.
//
// Instead of waking instructions up by broadcasting result tags, the
// scheduler predicts at rename when each instruction's operands will be
// ready and lets the instruction count that time down. The parts, wired as
// the scheduler is drawn in the document:
//   rename_prescheduler  renames and predicts issue latencies from the
//                        timing table and the two load predictors;
//   timing_table         predicted ready latency of every physical register;
//   load_hitmiss_pred    bimodal L1 hit/miss prediction -> load latency;
//   ldst_dep_pred        dependence predictor, store PC table and NIST ->
//                        how long a load waits for an older store;
//   seg_issue_queue      dispatch routing, four segments with latency
//                        counters, sinking, pre-check, switch-back, and the
//                        selection logic on the bottom segment;
//   ready_bit_reg        register ready bits read by the pre-check;
//   issue_ports          the four issue ports, which also set the ready bits
//                        of fixed-latency results.
// What lies outside the scheduler is brought out as ports: the decoder,
// the reorder buffer (it returns freed registers at commit), the function
// units, and the memory system (it sets the ready bits of loaded registers
// and trains the load predictors).
//
// Interface and timing:
//   dec_i/dec_ready_o   a group of up to 4 instructions is taken in a cycle
//                       with dec_ready_o high; ren_fire_o/ren_o report the
//                       renaming in that cycle (physical registers, previous
//                       mapping, predicted latencies) to the reorder buffer.
//   fu_v_o/fu_inst_o    instructions issued this cycle, one per port.
//   mem_wake_*          a load's destination becomes ready: assert it one
//                       cycle before the data can be used by an issuing
//                       instruction.
//   free_*              registers freed at commit.
//   lhp_upd_*, dep_upd_* training of the two load predictors.
//   rob_head_*          tag of the oldest instruction in flight; the queue
//                       lets it jump to the bottom segment when stuck.
//   occ_o, ev_o         queue occupancy and per-cycle event counts.
// Lint notes: the predictors' hit flag (ld_hit) and dependence flag
// (dep_pred) are left unread here because the latencies they come with
// carry all the scheduler needs; they stay as ports of the predictors for
// performance counters.
module wf_segment_top
  import wf_pkg::*;
#(
  parameter int unsigned MEM_PORTS = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  dec_inst_t    dec_i        [FETCH_W],
  output logic         dec_ready_o,
  output logic         ren_fire_o,
  output ren_inst_t    ren_o        [FETCH_W],
  input  logic         free_en_i    [FETCH_W],
  input  preg_t        free_reg_i   [FETCH_W],
  output logic         fu_v_o       [ISSUE_W],
  output iq_inst_t     fu_inst_o    [ISSUE_W],
  input  logic         mem_wake_en_i  [MEM_PORTS],
  input  preg_t        mem_wake_reg_i [MEM_PORTS],
  input  logic         rob_head_v_i,
  input  tag_t         rob_head_tag_i,
  input  logic         lhp_upd_en_i,
  input  logic [31:0]  lhp_upd_pc_i,
  input  logic         lhp_upd_hit_i,
  input  logic         dep_upd_en_i,
  input  logic [31:0]  dep_upd_load_pc_i,
  input  logic         dep_upd_dep_i,
  input  logic [31:0]  dep_upd_store_pc_i,
  output logic [SEG_SIZE-1:0] occ_o [NUM_SEGS],
  output iq_events_t   ev_o
);

  localparam int unsigned NRD_REN = 2 * FETCH_W;
  localparam int unsigned NRD_IQ  = 2 * SEG_SIZE;

  // ---- timing table ---------------------------------------------------------
  preg_t ren_tt_addr [NRD_REN];
  lat_t  ren_tt_lat  [NRD_REN];
  preg_t iq_tt_addr  [NRD_IQ];
  lat_t  iq_tt_lat   [NRD_IQ];
  logic  tt_wr_en   [FETCH_W];
  preg_t tt_wr_addr [FETCH_W];
  lat_t  tt_wr_lat  [FETCH_W];

  timing_table #(.NREGS(NUM_PREGS), .NRD(NRD_REN), .NRD2(NRD_IQ), .NWR(FETCH_W)) u_timing_table (
    .clk, .rst_n,
    .rd_addr(ren_tt_addr), .rd_lat(ren_tt_lat),
    .rd2_addr(iq_tt_addr), .rd2_lat(iq_tt_lat),
    .wr_en(tt_wr_en), .wr_addr(tt_wr_addr), .wr_lat(tt_wr_lat)
  );

  // ---- load predictors ----------------------------------------------------------
  logic [31:0] dec_pc   [FETCH_W];
  logic        ld_hit   [FETCH_W];
  lat_t        ld_lat   [FETCH_W];
  lat_t        dep_lat  [FETCH_W];
  logic        dep_pred [FETCH_W];
  logic        dep_look_en [FETCH_W];
  logic        st_ins_en  [FETCH_W];
  logic [31:0] st_ins_pc  [FETCH_W];
  tag_t        st_ins_tag [FETCH_W];
  lat_t        st_ins_lat [FETCH_W];
  logic        st_rem_en  [ISSUE_W];
  tag_t        st_rem_tag [ISSUE_W];

  always_comb
    for (int i = 0; i < FETCH_W; i++) dec_pc[i] = dec_i[i].pc;

  load_hitmiss_pred u_load_hitmiss_pred (
    .clk, .rst_n,
    .look_pc(dec_pc), .pred_hit(ld_hit), .pred_lat(ld_lat),
    .upd_en(lhp_upd_en_i), .upd_pc(lhp_upd_pc_i), .upd_hit(lhp_upd_hit_i)
  );

  ldst_dep_pred u_ldst_dep_pred (
    .clk, .rst_n,
    .look_en(dep_look_en), .look_pc(dec_pc), .dep_lat(dep_lat), .dep_pred(dep_pred),
    .st_ins_en(st_ins_en), .st_ins_pc(st_ins_pc), .st_ins_tag(st_ins_tag), .st_ins_lat(st_ins_lat),
    .st_rem_en(st_rem_en), .st_rem_tag(st_rem_tag),
    .upd_en(dep_upd_en_i), .upd_load_pc(dep_upd_load_pc_i), .upd_dep(dep_upd_dep_i),
    .upd_store_pc(dep_upd_store_pc_i)
  );

  // ---- rename / pre-schedule ------------------------------------------------------
  logic      rbr_clr_en   [FETCH_W];
  preg_t     rbr_clr_addr [FETCH_W];
  ren_inst_t disp_buf [FETCH_W];
  logic      disp     [FETCH_W];

  rename_prescheduler u_rename (
    .clk, .rst_n,
    .dec_i, .dec_ready_o, .ren_fire_o, .ren_o,
    .tt_rd_addr_o(ren_tt_addr), .tt_rd_lat_i(ren_tt_lat),
    .tt_wr_en_o(tt_wr_en), .tt_wr_addr_o(tt_wr_addr), .tt_wr_lat_o(tt_wr_lat),
    .rbr_clr_en_o(rbr_clr_en), .rbr_clr_addr_o(rbr_clr_addr),
    .ld_lat_i(ld_lat), .dep_lat_i(dep_lat), .dep_look_en_o(dep_look_en),
    .st_ins_en_o(st_ins_en), .st_ins_pc_o(st_ins_pc), .st_ins_tag_o(st_ins_tag),
    .st_ins_lat_o(st_ins_lat),
    .free_en_i, .free_reg_i,
    .buf_o(disp_buf), .disp_i(disp)
  );

  // ---- ready bits -------------------------------------------------------------------
  logic [NUM_PREGS-1:0] rbr, port_set, mem_set;

  always_comb begin
    mem_set = '0;
    for (int m = 0; m < MEM_PORTS; m++)
      if (mem_wake_en_i[m]) mem_set[mem_wake_reg_i[m]] = 1'b1;
  end

  ready_bit_reg u_ready_bit_reg (
    .clk, .rst_n,
    .clr_en(rbr_clr_en), .clr_addr(rbr_clr_addr),
    .set_mask(port_set | mem_set), .ready(rbr)
  );

  // ---- segmented issue queue and issue ports -------------------------------------
  logic     iss_v [ISSUE_W];
  iq_inst_t iss   [ISSUE_W];

  seg_issue_queue u_seg_issue_queue (
    .clk, .rst_n,
    .disp_buf_i(disp_buf), .disp_o(disp),
    .iss_v_o(iss_v), .iss_o(iss),
    .rbr_i(rbr),
    .head_v_i(rob_head_v_i), .head_tag_i(rob_head_tag_i),
    .tt_rd_addr_o(iq_tt_addr), .tt_rd_lat_i(iq_tt_lat),
    .occ_o, .ev_o
  );

  issue_ports u_issue_ports (
    .clk, .rst_n,
    .iss_v(iss_v), .iss_inst(iss),
    .fu_v(fu_v_o), .fu_inst(fu_inst_o),
    .set_mask(port_set),
    .st_rem_en(st_rem_en), .st_rem_tag(st_rem_tag)
  );

endmodule
