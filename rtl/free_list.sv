// free_list: FIFO of physical registers that are free for renaming.
//
// The rename stage takes up to NALLOC registers per cycle from the head; the
// reorder buffer returns up to NFREE registers per cycle at commit, appended
// at the tail in port order. At reset the list holds the registers
// NUM_LREGS..NREGS-1, because registers 0..NUM_LREGS-1 hold the initial
// architectural mapping. The document mentions renaming to physical
// registers but does not describe the free list; this circular FIFO is the
// simplest structure that does the job.
//
// Interface: head[] shows the next NALLOC free registers and avail how many
// there are. alloc_cnt (at most avail) removes that many at the clock edge.
// Timing: a register returned in cycle t can be allocated from cycle t+1.
module free_list
  import wf_pkg::*;
#(
  parameter int unsigned NREGS  = NUM_PREGS,
  parameter int unsigned NARCH  = NUM_LREGS,
  parameter int unsigned NALLOC = FETCH_W,
  parameter int unsigned NFREE  = FETCH_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  output logic [$clog2(NREGS)-1:0]     head      [NALLOC],
  output logic [$clog2(NREGS-NARCH+1)-1:0] avail,
  input  logic [$clog2(NALLOC+1)-1:0]  alloc_cnt,
  input  logic                         free_en   [NFREE],
  input  logic [$clog2(NREGS)-1:0]     free_reg  [NFREE]
);

  localparam int unsigned DEPTH = NREGS - NARCH;
  localparam int unsigned PW    = $clog2(DEPTH);
  localparam int unsigned CW    = $clog2(DEPTH + 1);

  logic [$clog2(NREGS)-1:0] fifo_q [DEPTH];
  logic [PW-1:0] rd_q, wr_q;
  logic [CW-1:0] cnt_q;

  function automatic logic [PW-1:0] wrap(int unsigned p);
    return PW'(p % DEPTH);
  endfunction

  always_comb begin
    for (int a = 0; a < NALLOC; a++) head[a] = fifo_q[wrap(int'(rd_q) + a)];
    avail = cnt_q;
  end

  int unsigned nfree;
  always_comb begin
    nfree = 0;
    for (int f = 0; f < NFREE; f++) if (free_en[f]) nfree++;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) fifo_q[i] <= ($clog2(NREGS))'(NARCH + i);
      rd_q  <= '0;
      wr_q  <= '0;
      cnt_q <= CW'(DEPTH);
    end else begin
      int unsigned k;
      k = 0;
      for (int f = 0; f < NFREE; f++)
        if (free_en[f]) begin
          fifo_q[wrap(int'(wr_q) + k)] <= free_reg[f];
          k++;
        end
      rd_q  <= wrap(int'(rd_q) + int'(alloc_cnt));
      wr_q  <= wrap(int'(wr_q) + nfree);
      cnt_q <= CW'(int'(cnt_q) + nfree - int'(alloc_cnt));
    end
  end

  // The rename stage never takes more than is there, the ROB never returns
  // more than was taken.
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(alloc_cnt) <= int'(cnt_q)) else $error("free_list underflow");
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    int'(cnt_q) + nfree - int'(alloc_cnt) <= DEPTH) else $error("free_list overflow");

endmodule
