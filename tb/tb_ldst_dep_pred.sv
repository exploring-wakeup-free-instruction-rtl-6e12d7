// tb_ldst_dep_pred: walks the predictor through its three outcomes. An
// untrained load predicts no dependence (latency 0). After training with a
// store PC, the load finds that store in the not-issued store table and gets
// the store's latency. Once the store has issued, the lookup misses, latency
// 0 comes back and the predictor is reset to "no dependence".
module tb_ldst_dep_pred;
  import wf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic look_en [2];
  logic [31:0] look_pc [2];
  lat_t dep_lat [2];
  logic dep_pred [2];
  logic st_ins_en [2];
  logic [31:0] st_ins_pc [2];
  tag_t st_ins_tag [2];
  lat_t st_ins_lat [2];
  logic st_rem_en [ISSUE_W];
  tag_t st_rem_tag [ISSUE_W];
  logic upd_en, upd_dep;
  logic [31:0] upd_load_pc, upd_store_pc;
  int checks = 0, failures = 0;

  ldst_dep_pred #(.ENTRIES(64), .NIST_ENTRIES(4), .NLOOK(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (lat %0d pred %0d)", what, dep_lat[0], dep_pred[0]); end
  endtask

  task automatic train(input logic dep);
    upd_en = 1; upd_load_pc = 32'h1000; upd_dep = dep; upd_store_pc = 32'h2000;
    @(negedge clk);
    upd_en = 0;
  endtask

  initial begin
    look_en = '{0, 0}; look_pc = '{32'h1000, 32'h1004};
    st_ins_en = '{0, 0}; st_ins_pc = '{0, 0}; st_ins_tag = '{0, 0}; st_ins_lat = '{0, 0};
    for (int p = 0; p < ISSUE_W; p++) begin st_rem_en[p] = 0; st_rem_tag[p] = '0; end
    upd_en = 0; upd_dep = 0; upd_load_pc = 0; upd_store_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // a store at 0x2000 is pre-scheduled with issue latency 12
    st_ins_en = '{1, 0}; st_ins_pc = '{32'h2000, 0}; st_ins_tag = '{7'd5, 0}; st_ins_lat = '{12, 0};
    @(negedge clk);
    st_ins_en = '{0, 0};
    look_en = '{1, 0};
    #1 chk(dep_lat[0] == 0 && !dep_pred[0], "untrained load: no dependence");
    train(1);
    #1 chk(dep_lat[0] == 0, "one dependence is not enough (weak)");
    train(1);
    #1 chk(dep_pred[0] && dep_lat[0] == 9, "trained load gets store latency");
    look_pc[1] = 32'h1004; look_en[1] = 1;
    #1 chk(!dep_pred[1] && dep_lat[1] == 0, "other load unaffected");
    look_en = '{0, 0};
    // the store issues
    st_rem_en[2] = 1; st_rem_tag[2] = 7'd5;
    @(negedge clk);
    st_rem_en[2] = 0;
    look_en = '{1, 0};
    #1 chk(!dep_pred[0] && dep_lat[0] == 0, "store issued: NIST miss gives 0");
    @(negedge clk);
    look_en = '{0, 0};
    // re-insert the store: the predictor was reset, so no dependence now
    st_ins_en = '{1, 0}; st_ins_pc = '{32'h2000, 0}; st_ins_tag = '{7'd6, 0}; st_ins_lat = '{12, 0};
    @(negedge clk);
    st_ins_en = '{0, 0};
    look_en = '{1, 0};
    #1 chk(!dep_pred[0] && dep_lat[0] == 0, "predictor reset to no dependence after miss");
    look_en = '{0, 0};
    train(1); train(1);
    look_en = '{1, 0};
    #1 chk(dep_pred[0] && dep_lat[0] == 9, "retrained");
    look_en = '{0, 0};
    train(0); train(0);
    look_en = '{1, 0};
    #1 chk(!dep_pred[0], "trained back to independent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
