// issue_ports: the issue ports between the selection logic and the function
// units.
//
// Every cycle up to NPORT selected instructions leave the queue here for the
// function units. For each issued instruction with a fixed operation latency
// L and a destination register, the ports schedule the ready bit of that
// register to be set L-1 cycles after issue, one cycle before the result
// exists, as the document requires of the register ready bits. A dependent
// instruction can therefore pass its pre-check and issue exactly L cycles
// after its producer. Loads are excluded: their ready bits are set by the
// memory system when the data actually arrives. Stores leaving here are
// reported so that the load/store dependence predictor can drop them from
// its table of not-issued stores.
//
// The document only draws this box ("4 Issue Ports") and its link to the
// ready bits; the delay line below is this design's way of producing the
// ready-bit updates. It is a chain of MAXLAT-1 register masks: mask d holds
// the registers whose ready bit is set d cycles from now. A latency-1 result
// sets its bit in the issue cycle itself (visible the next cycle).
//
// Interface: iss_v/iss_inst in (combinational from selection), fu_v/fu_inst
// out to the function units in the same cycle, set_mask out to the ready
// bit register, st_rem_* out to the dependence predictor.
module issue_ports
  import wf_pkg::*;
#(
  parameter int unsigned NPORT  = ISSUE_W,
  parameter int unsigned MAXLAT = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  iss_v      [NPORT],
  input  iq_inst_t              iss_inst   [NPORT],
  output logic                  fu_v       [NPORT],
  output iq_inst_t              fu_inst    [NPORT],
  output logic [NUM_PREGS-1:0]  set_mask,
  output logic                  st_rem_en  [NPORT],
  output tag_t                  st_rem_tag [NPORT]
);

  localparam int unsigned DEPTH = MAXLAT - 1;

  logic [NUM_PREGS-1:0] line_q [DEPTH];
  logic [NUM_PREGS-1:0] now_mask;
  logic [NUM_PREGS-1:0] ins_mask [DEPTH];

  always_comb begin
    now_mask = '0;
    for (int d = 0; d < DEPTH; d++) ins_mask[d] = '0;
    for (int p = 0; p < NPORT; p++) begin
      fu_v[p]       = iss_v[p];
      fu_inst[p]    = iss_inst[p];
      st_rem_en[p]  = iss_v[p] && iss_inst[p].op == OP_STORE;
      st_rem_tag[p] = iss_inst[p].tag;
      if (iss_v[p] && iss_inst[p].dst_v && iss_inst[p].op != OP_LOAD) begin
        if (iss_inst[p].dst_lat <= lat_t'(1))
          now_mask[iss_inst[p].pdst] = 1'b1;
        else if (int'(iss_inst[p].dst_lat) - 2 < int'(DEPTH))
          ins_mask[int'(iss_inst[p].dst_lat) - 2][iss_inst[p].pdst] = 1'b1;
        else
          ins_mask[DEPTH-1][iss_inst[p].pdst] = 1'b1;
      end
    end
    set_mask = now_mask | line_q[0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < DEPTH; d++) line_q[d] <= '0;
    end else begin
      for (int d = 0; d < DEPTH - 1; d++) line_q[d] <= line_q[d+1] | ins_mask[d];
      line_q[DEPTH-1] <= ins_mask[DEPTH-1];
    end
  end

endmodule
