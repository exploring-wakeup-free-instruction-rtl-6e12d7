// tb_seg_issue_queue: tests the segmented queue on its own, with the ready
// bits and timing table played by the testbench.
//   1. Timing: an instruction dispatched alone with latency B (operands
//      ready) must issue exactly max(B,1) cycles after dispatch, having sunk
//      through the segments on the way.
//   2. Pre-check: an instruction whose operand is not ready when it reaches
//      the bottom is sent back up with the timing-table latency L and issues
//      L cycles later, once the operand is ready.
//   3. Random traffic: every dispatched instruction issues exactly once, at
//      most ISSUE_W per cycle, never before its operands' ready bits are set
//      and never before its predicted latency. Sinking, switch-back,
//      overflow routing, dispatch stalls and issue-port conflicts must each
//      happen.
module tb_seg_issue_queue;
  import wf_pkg::*;
  logic clk = 0, rst_n = 0;
  ren_inst_t disp_buf_i [FETCH_W];
  logic disp_o [FETCH_W];
  logic iss_v_o [ISSUE_W];
  iq_inst_t iss_o [ISSUE_W];
  logic [NUM_PREGS-1:0] rbr_i;
  preg_t tt_rd_addr_o [2*SEG_SIZE];
  lat_t  tt_rd_lat_i  [2*SEG_SIZE];
  logic [SEG_SIZE-1:0] occ_o [NUM_SEGS];
  iq_events_t ev_o;
  logic  head_v_i = 1'b0;    // escape path is exercised by the top-level test
  tag_t  head_tag_i = '0;

  int checks = 0, failures = 0;
  int cyc = 0;
  int ready_at [NUM_PREGS];
  int disp_cyc [int], min_issue [int];
  int issued_cnt [int];
  int n_sink = 0, n_sb = 0, n_ovf = 0, n_stall = 0, n_conf = 0, n_fail = 0;
  int next_id = 1;
  int next_reg = 32;
  int recent [16] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 14, 15};

  localparam int unsigned SBL = 5;   // fixed switch-back latency floor
  seg_issue_queue #(.SB_MIN_LAT(SBL)) dut (.*);

  always #5 clk = ~clk;

  always_comb begin
    for (int p = 0; p < NUM_PREGS; p++) rbr_i[p] = (cyc >= ready_at[p]);
    for (int r = 0; r < 2*SEG_SIZE; r++)
      tt_rd_lat_i[r] = lat_t'((ready_at[tt_rd_addr_o[r]] > cyc) ?
                              ((ready_at[tt_rd_addr_o[r]] - cyc > 60) ? 60 : ready_at[tt_rd_addr_o[r]] - cyc) : 0);
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (cycle %0d)", what, cyc); end
  endtask

  function automatic ren_inst_t mk(int id, int s1, int s2, int lat);
    ren_inst_t r;
    r = '0;
    r.inst.valid = 1; r.inst.pc = 32'(id); r.inst.op = OP_IALU;
    r.inst.src1_v = (s1 >= 0); r.inst.psrc1 = preg_t'((s1 < 0) ? 0 : s1);
    r.inst.src2_v = (s2 >= 0); r.inst.psrc2 = preg_t'((s2 < 0) ? 0 : s2);
    r.inst.dst_v = 1; r.inst.pdst = preg_t'(100); r.inst.dst_lat = 1;
    r.issue_lat = lat_t'(lat);
    return r;
  endfunction

  // One clock: evaluate outputs for this cycle, score them, advance the
  // dispatch buffer model, step to the next cycle.
  logic took [FETCH_W];
  task automatic step();
    #1;
    for (int i = 0; i < FETCH_W; i++)
      if (disp_o[i]) begin
        int id;
        id = int'(disp_buf_i[i].inst.pc);
        disp_cyc[id]   = cyc;
        min_issue[id]  = cyc + ((disp_buf_i[i].issue_lat == 0) ? 1 : int'(disp_buf_i[i].issue_lat));
        issued_cnt[id] = 0;
      end
    for (int p = 0; p < ISSUE_W; p++)
      if (iss_v_o[p]) begin
        int id;
        id = int'(iss_o[p].pc);
        chk(issued_cnt.exists(id) && issued_cnt[id] == 0, $sformatf("inst %0d issued once", id));
        if (issued_cnt.exists(id)) issued_cnt[id]++;
        chk((!iss_o[p].src1_v || rbr_i[iss_o[p].psrc1]) && (!iss_o[p].src2_v || rbr_i[iss_o[p].psrc2]),
            $sformatf("inst %0d operands ready at issue", id));
        chk(min_issue.exists(id) && cyc >= min_issue[id], $sformatf("inst %0d not before its latency", id));
      end
    n_sink  += int'(ev_o.sinks);
    n_sb    += int'(ev_o.switchbacks);
    n_fail  += int'(ev_o.pc_fail);
    n_ovf   += int'(ev_o.disp_overflow);
    n_stall += int'(ev_o.disp_stall);
    n_conf  += int'(ev_o.sel_conflict);
    for (int i = 0; i < FETCH_W; i++) took[i] = disp_o[i];
    @(posedge clk);
    #1;
    for (int i = 0; i < FETCH_W; i++)
      if (took[i]) disp_buf_i[i].inst.valid = 1'b0;
      else disp_buf_i[i].issue_lat = lat_dec(disp_buf_i[i].issue_lat);
    @(negedge clk);
    cyc++;
  endtask

  int last_issue [int];
  always @(negedge clk)
    for (int p = 0; p < ISSUE_W; p++)
      if (iss_v_o[p]) last_issue[int'(iss_o[p].pc)] = cyc;

  initial begin
    for (int p = 0; p < NUM_PREGS; p++) ready_at[p] = 0;
    for (int i = 0; i < FETCH_W; i++) disp_buf_i[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- 1. issue timing for each latency ---------------------------------
    for (int b = 0; b <= 12; b++) begin
      int id, t0;
      id = next_id++;
      disp_buf_i[0] = mk(id, 1, 2, b);
      t0 = cyc;
      step();
      chk(disp_cyc.exists(id) && disp_cyc[id] == t0, $sformatf("latency %0d dispatched at once", b));
      repeat (20) step();
      chk(last_issue.exists(id) && last_issue[id] == t0 + ((b == 0) ? 1 : b),
          $sformatf("latency %0d issues after %0d cycles (got %0d)", b, (b == 0) ? 1 : b,
                    last_issue.exists(id) ? last_issue[id] - t0 : -1));
    end

    // ---- 2. pre-check failure and switch-back -----------------------------
    begin
      int id, t0;
      id = next_id++;
      ready_at[5] = cyc + 7;          // operand ready 7 cycles from now
      disp_buf_i[0] = mk(id, 5, -1, 3);  // but predicted ready in 3
      t0 = cyc;
      repeat (30) step();
      // fails at t0+3, timing table then says 4 more cycles, floored at SBL
      chk(last_issue.exists(id) && last_issue[id] == t0 + 3 + ((SBL > 4) ? SBL : 4),
          $sformatf("switched-back instruction issues when ready (got %0d)",
                    last_issue.exists(id) ? last_issue[id] - t0 : -1));
      chk(n_fail >= 1 && n_sb >= 1, "pre-check failure and switch-back seen");
    end

    // ---- 3. random traffic ----------------------------------------------------
    for (int t = 0; t < 4000; t++) begin
      bit empty;
      empty = 1;
      for (int i = 0; i < FETCH_W; i++) if (disp_buf_i[i].inst.valid) empty = 0;
      if (empty && t < 3500) begin
        for (int i = 0; i < FETCH_W; i++)
          if ($urandom_range(0, 3) != 0) begin
            int s1, s2, lat, pred;
            s1 = recent[$urandom_range(0, 15)]; s2 = recent[$urandom_range(0, 15)];
            lat = 0;
            if (ready_at[s1] - cyc > lat) lat = ready_at[s1] - cyc;
            if (ready_at[s2] - cyc > lat) lat = ready_at[s2] - cyc;
            pred = lat + int'($urandom_range(0, 4)) - 2;     // prediction error
            if (pred < 0) pred = 0;
            if ($urandom_range(0, 9) == 0) pred = $urandom_range(5, 20);
            disp_buf_i[i] = mk(next_id++, s1, s2, pred);
          end
        // new producers: fresh registers (as renaming would give), ready
        // some cycles from now, become the likely sources of later groups
        for (int k = 0; k < 2; k++) begin
          ready_at[next_reg] = cyc + $urandom_range(1, 14);
          recent[$urandom_range(0, 15)] = next_reg;
          next_reg = (next_reg == NUM_PREGS - 1) ? 32 : next_reg + 1;
        end
      end
      step();
    end
    repeat (200) step();
    foreach (issued_cnt[id])
      chk(issued_cnt[id] == 1, $sformatf("inst %0d issued exactly once", id));
    $display("events: sinks=%0d precheck_fail=%0d switchbacks=%0d overflow=%0d disp_stall=%0d sel_conflict=%0d insts=%0d",
             n_sink, n_fail, n_sb, n_ovf, n_stall, n_conf, issued_cnt.size());
    chk(n_sink > 0, "sinking happened");
    chk(n_sb > 0, "switch-back happened");
    chk(n_ovf > 0, "overflow routing happened");
    chk(n_stall > 0, "dispatch stall happened");
    chk(n_conf > 0, "issue port conflict happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
