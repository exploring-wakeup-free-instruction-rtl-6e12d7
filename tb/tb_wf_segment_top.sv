// tb_wf_segment_top: runs the whole scheduler, at its default parameters, on
// a looping synthetic program of integer, floating-point, load and store
// instructions. The testbench plays the parts around the scheduler:
//   - a decoder that presents the program four instructions at a time;
//   - a reorder buffer (at most 120 in flight) that commits in order once
//     results are available and returns the previous destination mappings
//     to the free list;
//   - function units, whose fixed latencies the scheduler itself announces
//     through its issue ports;
//   - a memory system that decides load hits and misses (some load PCs miss
//     most of the time), sets the ready bit of a loaded register one cycle
//     before the data arrives (at most MEM_PORTS per cycle), and trains the
//     hit/miss predictor and, with the true store-to-load order, the
//     dependence predictor.
// Checks: every source register an instruction names is the one a rename
// model of the testbench expects; every instruction issues exactly once and
// only after the values of its sources exist; everything commits. Each
// mechanism of the design must occur at least once: sinking, pre-check
// failure, switch-back, dispatch to a higher segment, dispatch stall, issue
// port conflict, same-group dependences, predicted load misses, predicted
// store dependences (NIST hits) and rename stalls.
module tb_wf_segment_top;
  import wf_pkg::*;
  localparam int MEM_PORTS = 2;
  localparam int N_INSTS   = 6000;
  localparam int PROG_LEN  = 48;

  logic clk = 0, rst_n = 0;
  dec_inst_t  dec_i [FETCH_W];
  logic       dec_ready_o, ren_fire_o;
  ren_inst_t  ren_o [FETCH_W];
  logic       free_en_i [FETCH_W];
  preg_t      free_reg_i [FETCH_W];
  logic       fu_v_o [ISSUE_W];
  iq_inst_t   fu_inst_o [ISSUE_W];
  logic       mem_wake_en_i [MEM_PORTS];
  preg_t      mem_wake_reg_i [MEM_PORTS];
  logic       rob_head_v_i;
  tag_t       rob_head_tag_i;
  logic       lhp_upd_en_i, lhp_upd_hit_i, dep_upd_en_i, dep_upd_dep_i;
  logic [31:0] lhp_upd_pc_i, dep_upd_load_pc_i, dep_upd_store_pc_i;
  logic [SEG_SIZE-1:0] occ_o [NUM_SEGS];
  iq_events_t ev_o;

  wf_segment_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog: cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- the static program -------------------------------------------------
  typedef struct {
    op_e op; int s1, s2, d; int addr;   // addr: memory location id (0..3)
    int miss_pct;
  } sinst_t;
  sinst_t prog [PROG_LEN];

  function automatic op_e pick_op();
    int r;
    r = $urandom_range(0, 99);
    if (r < 42) return OP_IALU;
    if (r < 47) return OP_IMUL;
    if (r < 48) return OP_IDIV;
    if (r < 56) return OP_FALU;
    if (r < 61) return OP_FMUL;
    if (r < 62) return OP_FDIV;
    if (r < 84) return OP_LOAD;
    return OP_STORE;
  endfunction

  // ---- dynamic instruction records -----------------------------------------
  typedef struct {
    int      pidx;        // index in the program
    op_e     op;
    bit      dst_v;
    preg_t   pdst, old_pdst;
    bit      issued, done;
    int      avail;       // cycle from which the result can be used
    int      addr;
    logic [31:0] pc;
  } dyn_t;
  dyn_t rob [$];          // in program order, oldest first
  int   rob_base = 0;     // sequence number of rob[0]
  int   seq_next = 0;     // next sequence number to decode
  int   seq_of_tag [ROB_SIZE];

  int  map_model [NUM_LREGS];
  int  avail_at [NUM_PREGS];
  int  wake_q [int][$];   // cycle -> registers whose ready bit memory sets
  int  lhp_q [$], dep_q [$];     // training updates (packed info)
  logic [31:0] lhp_pc_q [$], dep_lpc_q [$], dep_spc_q [$];
  bit  lhp_hit_q [$], dep_dep_q [$];

  int n_sink = 0, n_fail = 0, n_sb = 0, n_ovf = 0, n_stall = 0, n_conf = 0, n_esc = 0;
  int n_intra = 0, n_missp = 0, n_deppred = 0, n_ren_stall = 0, n_issued = 0, n_commit = 0;
  int n_miss = 0;
  bit fired = 0;

  function automatic logic [31:0] pc_of(int pidx);
    return 32'h1000 + 32'(4 * pidx);
  endfunction

  // ---- drive inputs for the current cycle (called just after posedge) -----
  task automatic drive();
    int in_flight;
    // decoder: present the next group if none is waiting
    if (fired) for (int i = 0; i < FETCH_W; i++) dec_i[i] = '0;
    fired = 0;
    in_flight = seq_next - rob_base;
    if (!dec_i[0].valid && seq_next < N_INSTS && in_flight <= 120 - FETCH_W) begin
      for (int i = 0; i < FETCH_W; i++) begin
        sinst_t s;
        int pidx;
        pidx = (seq_next + i) % PROG_LEN;
        s = prog[pidx];
        dec_i[i] = '0;
        dec_i[i].valid  = (seq_next + i < N_INSTS);
        dec_i[i].pc     = pc_of(pidx);
        dec_i[i].op     = s.op;
        dec_i[i].src1_v = (s.s1 >= 0); dec_i[i].src1 = lreg_t'((s.s1 < 0) ? 0 : s.s1);
        dec_i[i].src2_v = (s.s2 >= 0); dec_i[i].src2 = lreg_t'((s.s2 < 0) ? 0 : s.s2);
        dec_i[i].dst_v  = (s.d >= 0);  dec_i[i].dst  = lreg_t'((s.d < 0) ? 0 : s.d);
        dec_i[i].tag    = tag_t'((seq_next + i) % ROB_SIZE);
      end
    end
    // reorder buffer: commit up to FETCH_W completed instructions in order
    for (int i = 0; i < FETCH_W; i++) free_en_i[i] = 0;
    for (int i = 0; i < FETCH_W; i++) begin
      if (rob.size() == 0) break;
      if (!(rob[0].issued && (!rob[0].dst_v || rob[0].avail <= cyc))) break;
      if (rob[0].dst_v) begin free_en_i[i] = 1; free_reg_i[i] = rob[0].old_pdst; end
      void'(rob.pop_front());
      rob_base++;
      n_commit++;
    end
    rob_head_v_i   = (rob.size() > 0);
    rob_head_tag_i = tag_t'(rob_base % ROB_SIZE);
    // memory: ready bits of loaded registers
    for (int m = 0; m < MEM_PORTS; m++) mem_wake_en_i[m] = 0;
    if (wake_q.exists(cyc)) begin
      for (int m = 0; m < MEM_PORTS && wake_q[cyc].size() > 0; m++) begin
        int r;
        r = wake_q[cyc].pop_front();
        mem_wake_en_i[m] = 1; mem_wake_reg_i[m] = preg_t'(r);
        avail_at[r] = cyc + 1;
      end
      // ports busy: the rest arrive a cycle later
      while (wake_q[cyc].size() > 0) wake_q[cyc + 1].push_back(wake_q[cyc].pop_front());
      wake_q.delete(cyc);
    end
    // predictor training, one update of each kind per cycle
    lhp_upd_en_i = 0; dep_upd_en_i = 0;
    if (lhp_pc_q.size() > 0) begin
      lhp_upd_en_i = 1; lhp_upd_pc_i = lhp_pc_q.pop_front(); lhp_upd_hit_i = lhp_hit_q.pop_front();
    end
    if (dep_lpc_q.size() > 0) begin
      dep_upd_en_i = 1; dep_upd_load_pc_i = dep_lpc_q.pop_front();
      dep_upd_store_pc_i = dep_spc_q.pop_front(); dep_upd_dep_i = dep_dep_q.pop_front();
    end
  endtask

  // ---- observe outputs of the current cycle (called after negedge) --------
  task automatic observe();
    n_sink  += int'(ev_o.sinks);
    n_fail  += int'(ev_o.pc_fail);
    n_sb    += int'(ev_o.switchbacks);
    n_ovf   += int'(ev_o.disp_overflow);
    n_stall += int'(ev_o.disp_stall);
    n_conf  += int'(ev_o.sel_conflict);
    n_esc   += int'(ev_o.escape);
    if (dec_i[0].valid && !dec_ready_o) n_ren_stall++;
    for (int i = 0; i < FETCH_W; i++)
      if (ren_fire_o && dut.dep_pred[i]) n_deppred++;
    // rename: compare with the model, record the instructions
    if (ren_fire_o) begin
      for (int i = 0; i < FETCH_W; i++)
        if (dec_i[i].valid) begin
          dyn_t d;
          for (int j = 0; j < i; j++)
            if (dec_i[j].dst_v && ((dec_i[i].src1_v && dec_i[i].src1 == dec_i[j].dst) ||
                                   (dec_i[i].src2_v && dec_i[i].src2 == dec_i[j].dst))) begin
              n_intra++;
              break;
            end
          if (dec_i[i].src1_v)
            chk(int'(ren_o[i].inst.psrc1) == map_model[dec_i[i].src1], "rename of source 1");
          if (dec_i[i].src2_v)
            chk(int'(ren_o[i].inst.psrc2) == map_model[dec_i[i].src2], "rename of source 2");
          d.pidx = (seq_next + i) % PROG_LEN;
          d.op = dec_i[i].op; d.dst_v = dec_i[i].dst_v; d.pc = dec_i[i].pc;
          d.pdst = ren_o[i].inst.pdst; d.old_pdst = ren_o[i].old_pdst;
          d.issued = 0; d.done = 0; d.avail = 1 << 30; d.addr = prog[d.pidx].addr;
          if (dec_i[i].dst_v) begin
            chk(int'(ren_o[i].old_pdst) == map_model[dec_i[i].dst], "previous mapping");
            map_model[dec_i[i].dst] = int'(ren_o[i].inst.pdst);
            avail_at[ren_o[i].inst.pdst] = 1 << 30;
          end
          if (dec_i[i].op == OP_LOAD && ren_o[i].inst.dst_lat == lat_t'(L2_LAT)) n_missp++;
          seq_of_tag[(seq_next + i) % ROB_SIZE] = seq_next + i;
          rob.push_back(d);
        end
      for (int i = 0; i < FETCH_W; i++) if (dec_i[i].valid) seq_next++;
      fired = 1;
    end
    // issue: operands must exist, each instruction once
    for (int p = 0; p < ISSUE_W; p++)
      if (fu_v_o[p]) begin
        int sq, k;
        iq_inst_t x;
        x = fu_inst_o[p];
        sq = seq_of_tag[x.tag];
        k  = sq - rob_base;
        n_issued++;
        chk(k >= 0 && k < rob.size(), "issued instruction is in flight");
        if (k >= 0 && k < rob.size()) begin
          chk(!rob[k].issued, "issued only once");
          rob[k].issued = 1;
          chk(!x.src1_v || avail_at[x.psrc1] <= cyc, $sformatf("source 1 (p%0d) exists at issue", x.psrc1));
          chk(!x.src2_v || avail_at[x.psrc2] <= cyc, $sformatf("source 2 (p%0d) exists at issue", x.psrc2));
          if (x.op == OP_LOAD) begin
            bit hit, dep;
            logic [31:0] spc;
            hit = ($urandom_range(0, 99) >= prog[rob[k].pidx].miss_pct);
            if (!hit) n_miss++;
            wake_q[cyc + (hit ? L1_LAT : L2_LAT) - 1].push_back(int'(x.pdst));
            lhp_pc_q.push_back(x.pc); lhp_hit_q.push_back(hit);
            // true dependence: an older store to the same location not yet issued
            dep = 0; spc = '0;
            for (int j = k - 1; j >= 0; j--)
              if (rob[j].op == OP_STORE && rob[j].addr == rob[k].addr) begin
                dep = !rob[j].issued; spc = rob[j].pc;
                break;
              end
            dep_lpc_q.push_back(x.pc); dep_spc_q.push_back(spc); dep_dep_q.push_back(dep);
          end else if (x.dst_v) begin
            rob[k].avail = cyc + ((x.dst_lat == 0) ? 1 : int'(x.dst_lat));
            avail_at[x.pdst] = rob[k].avail;
          end
          if (x.op == OP_LOAD) rob[k].avail = 1 << 30;
        end
      end
    // loads become available when memory has set their ready bit
    for (int k = 0; k < rob.size(); k++)
      if (rob[k].op == OP_LOAD && rob[k].issued && rob[k].avail > cyc && avail_at[rob[k].pdst] <= cyc + 1)
        rob[k].avail = avail_at[rob[k].pdst];
  endtask

  initial begin
    for (int i = 0; i < PROG_LEN; i++) begin
      prog[i].op = pick_op();
      prog[i].s1 = $urandom_range(1, 12);
      prog[i].s2 = ($urandom_range(0, 2) == 0) ? -1 : $urandom_range(1, 12);
      prog[i].d  = (prog[i].op == OP_STORE) ? -1 : $urandom_range(1, 12);
      prog[i].addr = $urandom_range(0, 3);
      prog[i].miss_pct = ($urandom_range(0, 3) == 0) ? 90 : 5;
    end
    for (int r = 0; r < NUM_LREGS; r++) map_model[r] = r;
    for (int r = 0; r < NUM_PREGS; r++) avail_at[r] = 0;
    for (int i = 0; i < FETCH_W; i++) begin dec_i[i] = '0; free_en_i[i] = 0; free_reg_i[i] = '0; end
    for (int m = 0; m < MEM_PORTS; m++) begin mem_wake_en_i[m] = 0; mem_wake_reg_i[m] = '0; end
    lhp_upd_en_i = 0; lhp_upd_pc_i = 0; lhp_upd_hit_i = 0;
    rob_head_v_i = 0; rob_head_tag_i = '0;
    dep_upd_en_i = 0; dep_upd_load_pc_i = 0; dep_upd_dep_i = 0; dep_upd_store_pc_i = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (n_commit < N_INSTS && cyc < 100000) begin
      @(posedge clk);
      #1;
      cyc++;
      drive();
      @(negedge clk);
      #1;
      observe();
    end
    chk(n_commit == N_INSTS, $sformatf("all %0d instructions committed (got %0d)", N_INSTS, n_commit));
    chk(n_issued == N_INSTS, "issue count equals instruction count");
    $display("cycles=%0d IPC=%0d.%02d issued=%0d", cyc, n_commit / cyc, (100 * n_commit / cyc) % 100, n_issued);
    $display("events: sinks=%0d precheck_fail=%0d switchbacks=%0d overflow=%0d disp_stall=%0d sel_conflict=%0d escapes=%0d",
             n_sink, n_fail, n_sb, n_ovf, n_stall, n_conf, n_esc);
    $display("events: same_group_deps=%0d predicted_misses=%0d actual_misses=%0d nist_hits=%0d rename_stalls=%0d",
             n_intra, n_missp, n_miss, n_deppred, n_ren_stall);
    chk(n_sink > 0,      "sinking happened");
    chk(n_fail > 0,      "pre-check failure happened");
    chk(n_sb > 0,        "switch-back happened");
    chk(n_ovf > 0,       "dispatch to a higher segment happened");
    chk(n_stall > 0,     "dispatch stall happened");
    chk(n_conf > 0,      "issue port conflict happened");
    chk(n_esc > 0,       "escape of the oldest instruction happened");
    chk(n_intra > 0,     "same-group dependence happened");
    chk(n_missp > 0,     "predicted load miss happened");
    chk(n_deppred > 0,   "predicted store dependence happened");
    chk(n_ren_stall > 0, "rename stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
