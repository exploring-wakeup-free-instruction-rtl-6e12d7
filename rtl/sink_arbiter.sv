// sink_arbiter: grants sink moves from one segment to the segment below.
//
// Entry j of the upper segment may sink to entries j-1, j and j+1 of the
// lower one, so a free lower entry k sees up to three requests: top-left
// (upper k-1), top (upper k) and top-right (upper k+1). Free entries in the
// left half of the segment grant left-first (top-left, top, top-right); those
// in the right half grant right-first (top-right, top, top-left), so that
// instructions drift towards the centre and the two ends stay free for
// switch-back and dispatch. This policy is the document's.
//
// The document does not say how to stop one upper instruction from being
// granted by two lower entries. Here the lower entries are served one after
// the other - left half from the left end inwards, then right half from the
// right end inwards - and an upper entry already granted is not offered
// again.
//
// Interface: purely combinational. up_req[j]: upper entry j wants to sink.
// lo_free[k]: lower entry k is free for sinking. take[k]/src[k]: lower entry
// k receives upper entry src[k]. up_gnt[j]: upper entry j sinks this cycle.
module sink_arbiter #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]          up_req,
  input  logic [N-1:0]          lo_free,
  output logic [N-1:0]          take,
  output logic [$clog2(N)-1:0]  src [N],
  output logic [N-1:0]          up_gnt
);

  always_comb begin
    logic [N-1:0] avail;
    avail  = up_req;
    take   = '0;
    up_gnt = '0;
    for (int k = 0; k < N; k++) src[k] = '0;
    for (int n = 0; n < N; n++) begin
      int k;
      int cand [3];
      // service order: 0, 1, .., N/2-1, then N-1, N-2, .., N/2
      k = (n < N / 2) ? n : (N - 1 - (n - N / 2));
      if (k < N / 2) begin
        cand[0] = k - 1; cand[1] = k; cand[2] = k + 1;
      end else begin
        cand[0] = k + 1; cand[1] = k; cand[2] = k - 1;
      end
      if (lo_free[k])
        for (int c = 0; c < 3; c++)
          if (!take[k] && cand[c] >= 0 && cand[c] < N && avail[cand[c]]) begin
            take[k]          = 1'b1;
            src[k]           = ($clog2(N))'(cand[c]);
            avail[cand[c]]   = 1'b0;
            up_gnt[cand[c]]  = 1'b1;
          end
    end
  end

endmodule
