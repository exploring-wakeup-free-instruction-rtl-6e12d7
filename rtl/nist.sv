// nist: the Not-Issued Store Table of the load/store dependence predictor.
//
// Each entry holds the PC of a store that sits in the issue queue and has
// not issued yet, together with the store's predicted issue latency. The PC
// field is a content-addressable memory: a lookup compares a store PC with
// every valid entry and returns the latency of the match. Stores are
// inserted when they are pre-scheduled (renamed) and removed when they issue,
// as the document describes; the 16-entry size is the document's.
//
// This design's choices: entries are identified for removal by the store's
// instruction tag; the latency field counts down one per cycle like every
// other latency here; a store that finds the table full is not recorded (a
// dependent load then sees a miss and predicts no dependence); when several
// entries match, the largest latency is returned.
//
// Interface: NLOOK combinational CAM lookups; NINS inserts and NREM removals
// per cycle, applied at the clock edge.
module nist
  import wf_pkg::*;
#(
  parameter int unsigned ENTRIES = 16,
  parameter int unsigned NLOOK   = FETCH_W,
  parameter int unsigned NINS    = FETCH_W,
  parameter int unsigned NREM    = ISSUE_W
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] look_pc  [NLOOK],
  output logic        look_hit [NLOOK],
  output lat_t        look_lat [NLOOK],
  input  logic        ins_en   [NINS],
  input  logic [31:0] ins_pc   [NINS],
  input  tag_t        ins_tag  [NINS],
  input  lat_t        ins_lat  [NINS],
  input  logic        rem_en   [NREM],
  input  tag_t        rem_tag  [NREM],
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);

  typedef struct packed {
    logic        valid;
    logic [31:0] pc;
    tag_t        tag;
    lat_t        lat;
  } nist_ent_t;

  nist_ent_t ent_q [ENTRIES];

  // CAM compare on the store PC field.
  always_comb
    for (int l = 0; l < NLOOK; l++) begin
      look_hit[l] = 1'b0;
      look_lat[l] = '0;
      for (int e = 0; e < ENTRIES; e++)
        if (ent_q[e].valid && ent_q[e].pc == look_pc[l]) begin
          look_hit[l] = 1'b1;
          look_lat[l] = lat_max(look_lat[l], ent_q[e].lat);
        end
    end

  always_comb begin
    occupancy = '0;
    for (int e = 0; e < ENTRIES; e++)
      if (ent_q[e].valid) occupancy = occupancy + 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) ent_q[e] <= '0;
    end else begin
      nist_ent_t nxt [ENTRIES];
      logic      used [ENTRIES];
      for (int e = 0; e < ENTRIES; e++) begin
        nxt[e]     = ent_q[e];
        nxt[e].lat = lat_dec(ent_q[e].lat);
        for (int r = 0; r < NREM; r++)
          if (rem_en[r] && ent_q[e].valid && ent_q[e].tag == rem_tag[r])
            nxt[e].valid = 1'b0;
        // Only entries free at the start of the cycle take new stores.
        used[e] = ent_q[e].valid;
      end
      for (int i = 0; i < NINS; i++)
        if (ins_en[i]) begin
          logic done;
          done = 1'b0;
          for (int e = 0; e < ENTRIES; e++)
            if (!done && !used[e]) begin
              nxt[e]  = '{valid: 1'b1, pc: ins_pc[i], tag: ins_tag[i],
                          lat: lat_dec(ins_lat[i])};
              used[e] = 1'b1;
              done    = 1'b1;
            end
        end
      for (int e = 0; e < ENTRIES; e++) ent_q[e] <= nxt[e];
    end
  end

endmodule
