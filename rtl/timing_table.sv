// timing_table: predicted ready latency of every physical register.
//
// The rename stage writes, for each renamed destination, the predicted
// latency after which that register's value will be ready (issue latency
// plus operation latency). The table then counts every entry down by one per
// cycle, saturating at zero, so a read always returns the latency left from
// the current cycle. The rename stage reads it for source operands. The
// segmented queue reads it to recompute the latency of an instruction that
// failed its pre-check. The table is indexed by physical register number, as
// the document describes; the count-down storage is this design's choice.
//
// Interface: two groups of combinational read ports, NRD (rd_*) for the
// rename stage and NRD2 (rd2_*) for the queue's latency recomputation; NWR write ports, applied at the
// clock edge (a write of latency v stores v-1, following the design-wide
// rule that stored latencies refer to the cycle in which they are visible).
// A higher-numbered write port wins when two ports write the same register.
// Reset sets every latency to zero: all architectural values are ready.
module timing_table
  import wf_pkg::*;
#(
  parameter int unsigned NREGS = NUM_PREGS,
  parameter int unsigned NRD   = 2 * FETCH_W,
  parameter int unsigned NRD2  = 2 * SEG_SIZE,
  parameter int unsigned NWR   = FETCH_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [$clog2(NREGS)-1:0]  rd_addr [NRD],
  output lat_t                      rd_lat  [NRD],
  input  logic [$clog2(NREGS)-1:0]  rd2_addr [NRD2],
  output lat_t                      rd2_lat  [NRD2],
  input  logic                      wr_en   [NWR],
  input  logic [$clog2(NREGS)-1:0]  wr_addr [NWR],
  input  lat_t                      wr_lat  [NWR]
);

  lat_t lat_q [NREGS];

  always_comb
    for (int r = 0; r < NRD; r++) rd_lat[r] = lat_q[rd_addr[r]];

  always_comb
    for (int r = 0; r < NRD2; r++) rd2_lat[r] = lat_q[rd2_addr[r]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) lat_q[i] <= '0;
    end else begin
      for (int i = 0; i < NREGS; i++) begin
        lat_t nxt;
        nxt = lat_dec(lat_q[i]);
        for (int w = 0; w < NWR; w++)
          if (wr_en[w] && int'(wr_addr[w]) == i) nxt = lat_dec(wr_lat[w]);
        lat_q[i] <= nxt;
      end
    end
  end

endmodule
