// load_hitmiss_pred: bimodal load hit/miss predictor.
//
// A table of 2-bit saturating counters indexed by the load's PC. A counter
// of 2 or 3 predicts an L1 hit, and the load's latency is then the L1 data
// cache latency; otherwise it predicts a miss and the latency is the L2
// latency. The document names the bimodal predictor, sizes the predictors at
// about 0.5 KB (2048 2-bit counters) and sets the latencies from the L1 and
// L2 access times; the index bits, counter initial value (weakly hit) and
// update rule are the usual bimodal ones and this design's choice.
//
// Interface: NLOOK combinational lookups per cycle (one per rename slot);
// one update per cycle, at the clock edge, with the load's actual outcome.
// Lint note: only PC bits [12:2] index the table, so the other PC bits
// are unused by design.
module load_hitmiss_pred
  import wf_pkg::*;
#(
  parameter int unsigned ENTRIES = 2048,
  parameter int unsigned NLOOK   = FETCH_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] look_pc  [NLOOK],
  output logic        pred_hit [NLOOK],
  output lat_t        pred_lat [NLOOK],
  input  logic        upd_en,
  input  logic [31:0] upd_pc,
  input  logic        upd_hit
);

  localparam int unsigned IW = $clog2(ENTRIES);

  logic [1:0] ctr_q [ENTRIES];

  function automatic logic [IW-1:0] idx(logic [31:0] pc);
    return pc[IW+1:2];
  endfunction

  always_comb
    for (int l = 0; l < NLOOK; l++) begin
      pred_hit[l] = ctr_q[idx(look_pc[l])][1];
      pred_lat[l] = pred_hit[l] ? lat_t'(L1_LAT) : lat_t'(L2_LAT);
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr_q[i] <= 2'd2;
    end else if (upd_en) begin
      if (upd_hit && ctr_q[idx(upd_pc)] != 2'd3)
        ctr_q[idx(upd_pc)] <= ctr_q[idx(upd_pc)] + 2'd1;
      else if (!upd_hit && ctr_q[idx(upd_pc)] != 2'd0)
        ctr_q[idx(upd_pc)] <= ctr_q[idx(upd_pc)] - 2'd1;
    end
  end

endmodule
