// ready_bit_reg: the register ready bit register (RBR), one bit per physical
// register telling whether its value is (or will be next cycle) available.
//
// A bit is cleared when the rename stage allocates the register as a new
// destination, and set by the issue ports (fixed-latency results) or by the
// memory system (load data) one cycle before the result is produced, as the
// document specifies. The pre-check in the bottom segment reads these bits.
// All bits are visible at once as a vector, so any number of pre-check reads
// can be made in a cycle.
//
// Interface: clr_* ports (NCLR) and a set mask, applied at the clock edge.
// When a clear and a set hit the same register in one cycle, the clear wins:
// a freshly allocated register cannot be made ready by an older writer. That
// priority and the reset value (all ready) are this design's choices.
module ready_bit_reg
  import wf_pkg::*;
#(
  parameter int unsigned NREGS = NUM_PREGS,
  parameter int unsigned NCLR  = FETCH_W
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      clr_en   [NCLR],
  input  logic [$clog2(NREGS)-1:0]  clr_addr [NCLR],
  input  logic [NREGS-1:0]          set_mask,
  output logic [NREGS-1:0]          ready
);

  logic [NREGS-1:0] clr_mask;

  always_comb begin
    clr_mask = '0;
    for (int c = 0; c < NCLR; c++)
      if (clr_en[c]) clr_mask[clr_addr[c]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ready <= '1;
    else        ready <= (ready | set_mask) & ~clr_mask;
  end

endmodule
