// seg_router: routes instructions into segments by their latency.
//
// Each instruction goes to the segment whose latency range holds its latency
// (0 / 1-2 / 3-4 / >4 by default) or, if that segment has no free entry, to
// the next higher segment with one. If even the top segment is full, the
// instruction is not placed. This is the document's dispatch routing; the
// same module also routes instructions switched back from the bottom
// segment (MIN_SEG = 1: they always go to a higher segment).
//
// This design's choices: dispatch takes free entries from the left end of a
// segment and switch-back from the right end (FROM_RIGHT), so that they use
// the two sides that the centre-seeking sink policy leaves free; with
// IN_ORDER set, an instruction that cannot be placed also holds back every
// later one, which keeps dispatch in program order.
//
// Interface: purely combinational. free_in[s][k]: entry k of segment s is
// free. placed[i], seg[i], idx[i]: where instruction i goes. free_out: the
// free map after these placements.
// Lint note: the loop index k is an int of which only the low bits
// address an entry.
module seg_router
  import wf_pkg::*;
#(
  parameter int unsigned NIN        = FETCH_W,
  parameter int unsigned SEGN       = SEG_SIZE,
  parameter int unsigned MIN_SEG    = 0,
  parameter bit          FROM_RIGHT = 1'b0,
  parameter bit          IN_ORDER   = 1'b1
) (
  input  logic                     in_v    [NIN],
  input  lat_t                     in_lat  [NIN],
  input  logic [SEGN-1:0]          free_in [NUM_SEGS],
  output logic                     placed  [NIN],
  output logic [SEG_W-1:0]         seg     [NIN],
  output logic [$clog2(SEGN)-1:0]  idx     [NIN],
  output logic                     overflow[NIN],  // placed above its own range
  output logic [SEGN-1:0]          free_out[NUM_SEGS]
);

  always_comb begin
    logic blocked;
    int   want, k;
    blocked = 1'b0;
    want    = 0;
    k       = 0;
    for (int s = 0; s < NUM_SEGS; s++) free_out[s] = free_in[s];
    for (int i = 0; i < NIN; i++) begin
      placed[i]   = 1'b0;
      seg[i]      = '0;
      idx[i]      = '0;
      overflow[i] = 1'b0;
      want = int'(seg_of_lat(in_lat[i]));
      if (want < int'(MIN_SEG)) want = int'(MIN_SEG);
      if (in_v[i] && !blocked) begin
        for (int s = 0; s < NUM_SEGS; s++)
          if (!placed[i] && s >= want && free_out[s] != '0) begin
            for (int n = 0; n < SEGN; n++) begin
              k = FROM_RIGHT ? (SEGN - 1 - n) : n;
              if (!placed[i] && free_out[s][k]) begin
                placed[i]      = 1'b1;
                seg[i]         = SEG_W'(s);
                idx[i]         = ($clog2(SEGN))'(k);
                overflow[i]    = (s != want);
                free_out[s][k] = 1'b0;
              end
            end
          end
        if (!placed[i] && IN_ORDER) blocked = 1'b1;
      end
    end
  end

endmodule
