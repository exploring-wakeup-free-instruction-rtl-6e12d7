// ldst_dep_pred: load/store dependence predictor.
//
// It predicts, at pre-scheduling time, how long a load must wait for an
// older store it depends on. Three parts, as the document describes them: a
// bimodal dependence predictor and a store PC table, both indexed by the
// load's PC, and the Not-Issued Store Table (NIST, see nist.sv). For each
// load:
//   - if the dependence predictor says "no dependence", latency 0;
//   - otherwise the store PC read from the store PC table is looked up in
//     the NIST; on a hit the latency stored there is returned (the AND of
//     "dependent" and "CAM hit" drives the output mux, as drawn);
//   - on a NIST miss the predictor entry is reset to "no dependence" and
//     latency 0 is returned.
// The predictor and the store PC table are trained with the outcome of the
// dependence check at issue: a load found dependent increments its counter
// and records the store PC; one found independent decrements it.
// The document gives 2K entries for the two tables and 16 for the NIST. The
// 2-bit counters, their reset value (strongly independent), the index bits
// and the valid bit that makes the store PC table start empty are this
// design's choices. A NIST-miss reset and a training update to the same
// entry in one cycle: the training update wins.
//
// Interface: NLOOK combinational lookups (is_load qualifies each); NIST
// insert/remove ports passed through; one training update per cycle.
// Lint note: only PC bits [12:2] index the tables; the NIST occupancy
// output is not needed here and is left unread.
module ldst_dep_pred
  import wf_pkg::*;
#(
  parameter int unsigned ENTRIES      = 2048,
  parameter int unsigned NIST_ENTRIES = 16,
  parameter int unsigned NLOOK        = FETCH_W
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookups at pre-scheduling
  input  logic        look_en   [NLOOK],
  input  logic [31:0] look_pc   [NLOOK],
  output lat_t        dep_lat   [NLOOK],
  output logic        dep_pred  [NLOOK],   // predictor said "dependent" and NIST hit
  // NIST maintenance
  input  logic        st_ins_en  [NLOOK],
  input  logic [31:0] st_ins_pc  [NLOOK],
  input  tag_t        st_ins_tag [NLOOK],
  input  lat_t        st_ins_lat [NLOOK],
  input  logic        st_rem_en  [ISSUE_W],
  input  tag_t        st_rem_tag [ISSUE_W],
  // training from the dependence check at issue
  input  logic        upd_en,
  input  logic [31:0] upd_load_pc,
  input  logic        upd_dep,
  input  logic [31:0] upd_store_pc
);

  localparam int unsigned IW = $clog2(ENTRIES);

  logic [1:0]  ctr_q   [ENTRIES];
  logic        spc_v_q [ENTRIES];
  logic [31:0] spc_q   [ENTRIES];

  function automatic logic [IW-1:0] idx(logic [31:0] pc);
    return pc[IW+1:2];
  endfunction

  logic [31:0] cam_pc  [NLOOK];
  logic        cam_hit [NLOOK];
  lat_t        cam_lat [NLOOK];
  logic        pred_d  [NLOOK];
  logic        nist_miss [NLOOK];
  logic [$clog2(NIST_ENTRIES+1)-1:0] nist_occ;

  always_comb
    for (int l = 0; l < NLOOK; l++) begin
      pred_d[l]    = ctr_q[idx(look_pc[l])][1] && spc_v_q[idx(look_pc[l])];
      cam_pc[l]    = spc_q[idx(look_pc[l])];
      dep_pred[l]  = look_en[l] && pred_d[l] && cam_hit[l];
      dep_lat[l]   = dep_pred[l] ? cam_lat[l] : '0;
      nist_miss[l] = look_en[l] && pred_d[l] && !cam_hit[l];
    end

  nist #(.ENTRIES(NIST_ENTRIES), .NLOOK(NLOOK), .NINS(NLOOK), .NREM(ISSUE_W)) u_nist (
    .clk, .rst_n,
    .look_pc (cam_pc),  .look_hit(cam_hit), .look_lat(cam_lat),
    .ins_en  (st_ins_en), .ins_pc(st_ins_pc), .ins_tag(st_ins_tag), .ins_lat(st_ins_lat),
    .rem_en  (st_rem_en), .rem_tag(st_rem_tag),
    .occupancy(nist_occ)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) begin
        ctr_q[i]   <= 2'd0;
        spc_v_q[i] <= 1'b0;
        spc_q[i]   <= '0;
      end
    end else begin
      for (int l = 0; l < NLOOK; l++)
        if (nist_miss[l]) ctr_q[idx(look_pc[l])] <= 2'd0;
      if (upd_en) begin
        if (upd_dep) begin
          ctr_q[idx(upd_load_pc)]   <= (ctr_q[idx(upd_load_pc)] == 2'd3) ? 2'd3
                                       : ctr_q[idx(upd_load_pc)] + 2'd1;
          spc_v_q[idx(upd_load_pc)] <= 1'b1;
          spc_q[idx(upd_load_pc)]   <= upd_store_pc;
        end else begin
          ctr_q[idx(upd_load_pc)]   <= (ctr_q[idx(upd_load_pc)] == 2'd0) ? 2'd0
                                       : ctr_q[idx(upd_load_pc)] - 2'd1;
        end
      end
    end
  end

endmodule
