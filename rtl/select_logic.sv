// select_logic: picks up to NPORT requesting entries of the bottom segment.
//
// In WF-Segment only the bottom segment talks to the selection logic. Each
// entry whose ready bit is set (or whose pre-check passes this cycle)
// requests; the logic grants up to NPORT of them and assigns each grant to
// one issue port. The document calls this "traditional selection logic" and
// does not say which request wins; this design uses a fixed priority by
// position (entry 0 first), filling ports 0, 1, ... in that order.
//
// Interface: purely combinational. req[N] in; gnt[N] is the granted subset,
// port_v/port_idx[p] tell which entry port p carries.
module select_logic #(
  parameter int unsigned N     = 8,
  parameter int unsigned NPORT = 4
) (
  input  logic [N-1:0]          req,
  output logic [N-1:0]          gnt,
  output logic                  port_v   [NPORT],
  output logic [$clog2(N)-1:0]  port_idx [NPORT]
);

  always_comb begin
    int unsigned p;
    p   = 0;
    gnt = '0;
    for (int k = 0; k < NPORT; k++) begin
      port_v[k]   = 1'b0;
      port_idx[k] = '0;
    end
    for (int i = 0; i < N; i++)
      if (req[i] && p < NPORT) begin
        gnt[i]      = 1'b1;
        port_v[p]   = 1'b1;
        port_idx[p] = ($clog2(N))'(i);
        p++;
      end
  end

endmodule
