// tb_rename_prescheduler: renames a hand-worked group of four dependent
// instructions and compares every physical register, previous mapping and
// predicted latency with values computed by hand: timing-table latencies,
// a same-group producer, the load's hit/miss and dependence latencies, and a
// store's entry for the not-issued store table. It then checks that the
// dispatch buffer counts down while it waits, that a new group is refused
// while it is full, that later groups see the new mapping, and that renaming
// stalls when the free list runs dry and resumes when registers return.
module tb_rename_prescheduler;
  import wf_pkg::*;
  logic clk = 0, rst_n = 0;
  dec_inst_t dec_i [FETCH_W];
  logic dec_ready_o, ren_fire_o;
  ren_inst_t ren_o [FETCH_W], buf_o [FETCH_W];
  preg_t tt_rd_addr_o [2*FETCH_W];
  lat_t  tt_rd_lat_i  [2*FETCH_W];
  logic  tt_wr_en_o [FETCH_W];
  preg_t tt_wr_addr_o [FETCH_W];
  lat_t  tt_wr_lat_o [FETCH_W];
  logic  rbr_clr_en_o [FETCH_W];
  preg_t rbr_clr_addr_o [FETCH_W];
  lat_t  ld_lat_i [FETCH_W], dep_lat_i [FETCH_W];
  logic  dep_look_en_o [FETCH_W];
  logic  st_ins_en_o [FETCH_W];
  logic [31:0] st_ins_pc_o [FETCH_W];
  tag_t  st_ins_tag_o [FETCH_W];
  lat_t  st_ins_lat_o [FETCH_W];
  logic  free_en_i [FETCH_W];
  preg_t free_reg_i [FETCH_W];
  logic  disp_i [FETCH_W];
  lat_t  tt_model [NUM_PREGS];
  int checks = 0, failures = 0;

  rename_prescheduler dut (.*);

  always #5 clk = ~clk;
  always_comb for (int r = 0; r < 2*FETCH_W; r++) tt_rd_lat_i[r] = tt_model[tt_rd_addr_o[r]];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic dec_inst_t mk(logic [31:0] pc, op_e op, int s1, int s2, int d, int tag);
    dec_inst_t x;
    x = '0;
    x.valid = 1; x.pc = pc; x.op = op; x.tag = tag_t'(tag);
    x.src1_v = (s1 >= 0); x.src1 = lreg_t'((s1 < 0) ? 0 : s1);
    x.src2_v = (s2 >= 0); x.src2 = lreg_t'((s2 < 0) ? 0 : s2);
    x.dst_v  = (d >= 0);  x.dst  = lreg_t'((d < 0) ? 0 : d);
    return x;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int i = 0; i < NUM_PREGS; i++) tt_model[i] = '0;
    for (int i = 0; i < FETCH_W; i++) begin
      dec_i[i] = '0; ld_lat_i[i] = lat_t'(L1_LAT); dep_lat_i[i] = '0;
      free_en_i[i] = 0; free_reg_i[i] = '0; disp_i[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    tt_model[2] = 3; tt_model[3] = 5;
    dec_i[0] = mk(32'h100, OP_IALU, 2, 3, 1, 10);     // r1 = r2 + r3
    dec_i[1] = mk(32'h104, OP_IMUL, 1, 5, 4, 11);     // r4 = r1 * r5
    dec_i[2] = mk(32'h108, OP_LOAD, 4, -1, 1, 12);    // r1 = [r4]
    dec_i[3] = mk(32'h10c, OP_STORE, 1, 6, -1, 13);   // [r6] = r1
    ld_lat_i[2] = lat_t'(L2_LAT); dep_lat_i[2] = 10;
    #1;
    chk(dec_ready_o && ren_fire_o, "group accepted");
    chk(ren_o[0].inst.psrc1 == 2 && ren_o[0].inst.psrc2 == 3 && ren_o[0].inst.pdst == 64 &&
        ren_o[0].old_pdst == 1 && ren_o[0].issue_lat == 5, "I0 rename and latency");
    chk(tt_wr_en_o[0] && tt_wr_addr_o[0] == 64 && tt_wr_lat_o[0] == 6, "I0 timing table write");
    chk(ren_o[1].inst.psrc1 == 64 && ren_o[1].inst.pdst == 65 && ren_o[1].issue_lat == 6 &&
        tt_wr_lat_o[1] == 9, "I1 same-group producer");
    chk(ren_o[2].inst.psrc1 == 65 && ren_o[2].inst.pdst == 66 && ren_o[2].old_pdst == 64 &&
        ren_o[2].issue_lat == 10 && ren_o[2].inst.dst_lat == L2_LAT && tt_wr_lat_o[2] == 18,
        "I2 load with dependence and miss latency");
    chk(dep_look_en_o[2] && !dep_look_en_o[1], "dependence lookup only for the load");
    chk(ren_o[3].inst.psrc1 == 66 && ren_o[3].inst.psrc2 == 6 && ren_o[3].issue_lat == 18 &&
        !tt_wr_en_o[3], "I3 store");
    chk(st_ins_en_o[3] && st_ins_pc_o[3] == 32'h10c && st_ins_tag_o[3] == 13 &&
        st_ins_lat_o[3] == 18 && !st_ins_en_o[2], "store entered in NIST");
    chk(rbr_clr_en_o[0] && rbr_clr_addr_o[0] == 64 && rbr_clr_en_o[2] && !rbr_clr_en_o[3],
        "ready bits of new destinations cleared");
    @(negedge clk);
    dec_i[0] = mk(32'h110, OP_IALU, 1, 4, 7, 14);
    for (int i = 1; i < FETCH_W; i++) dec_i[i] = '0;
    #1;
    chk(buf_o[0].inst.valid && buf_o[0].issue_lat == 4 && buf_o[3].issue_lat == 17, "buffer holds group");
    chk(!dec_ready_o, "new group refused while buffer is full");
    @(negedge clk);
    #1 chk(buf_o[0].issue_lat == 3 && buf_o[2].issue_lat == 8, "buffer latencies count down");
    disp_i = '{1, 1, 0, 0};
    #1 chk(!dec_ready_o, "partial dispatch still blocks");
    @(negedge clk);
    #1 chk(!buf_o[0].inst.valid && buf_o[2].inst.valid, "dispatched slots leave");
    disp_i = '{0, 0, 1, 1};
    #1 chk(dec_ready_o && ren_o[0].inst.psrc1 == 66 && ren_o[0].inst.psrc2 == 65 &&
           ren_o[0].inst.pdst == 67, "later group sees new mapping");
    @(negedge clk);
    disp_i = '{1, 1, 1, 1};
    // use up the free list: 124 registers left
    for (int g = 0; g < 31; g++) begin
      for (int i = 0; i < FETCH_W; i++) dec_i[i] = mk(32'h200 + 16 * g + 4 * i, OP_IALU, 0, 0, 8 + i, 0);
      #1 chk(dec_ready_o, $sformatf("group %0d renamed", g));
      @(negedge clk);
    end
    #1 chk(!dec_ready_o, "free list empty: rename stalls");
    @(negedge clk);
    #1 chk(!dec_ready_o, "still stalled");
    free_en_i = '{1, 1, 1, 1}; free_reg_i = '{1, 2, 3, 4};
    @(negedge clk);
    free_en_i = '{0, 0, 0, 0};
    #1 chk(dec_ready_o && ren_o[0].inst.pdst == 1 && ren_o[3].inst.pdst == 4, "registers returned, rename resumes");
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
