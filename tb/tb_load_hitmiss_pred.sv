// tb_load_hitmiss_pred: checks the initial "hit" prediction with the L1
// latency, that two misses turn a counter to "miss" with the L2 latency, the
// saturation of the counters, that different PCs use different counters,
// and random training against a counter model.
module tb_load_hitmiss_pred;
  import wf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] look_pc [2];
  logic pred_hit [2];
  lat_t pred_lat [2];
  logic upd_en, upd_hit;
  logic [31:0] upd_pc;
  int checks = 0, failures = 0;
  int ctr [64];

  load_hitmiss_pred #(.ENTRIES(64), .NLOOK(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic upd(input logic [31:0] pc, input logic hit);
    upd_en = 1; upd_pc = pc; upd_hit = hit;
    @(negedge clk);
    upd_en = 0;
  endtask

  task automatic expect_lat(input int port, input int exp, input string what);
    #1;
    checks++;
    if (int'(pred_lat[port]) != exp || pred_hit[port] != (exp == L1_LAT)) begin
      failures++;
      $display("FAIL %s: lat %0d expected %0d", what, pred_lat[port], exp);
    end
  endtask

  initial begin
    upd_en = 0; upd_pc = 0; upd_hit = 0;
    look_pc = '{32'h100, 32'h104};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    expect_lat(0, L1_LAT, "initial prediction");
    upd(32'h100, 0);
    expect_lat(0, L2_LAT, "one miss from weakly hit");
    expect_lat(1, L1_LAT, "neighbouring PC unaffected");
    upd(32'h100, 0); upd(32'h100, 0);
    upd(32'h100, 1);
    expect_lat(0, L2_LAT, "saturated at strong miss, one hit not enough");
    upd(32'h100, 1);
    expect_lat(0, L1_LAT, "two hits");
    for (int i = 0; i < 64; i++) ctr[i] = 2;
    ctr[0] = 2;  // pc 0x100 -> index 0
    for (int t = 0; t < 500; t++) begin
      int i; logic h;
      i = $urandom_range(0, 63); h = 1'($urandom);
      upd({24'h0, 6'(i), 2'b00}, h);
      if (h && ctr[i] < 3) ctr[i]++;
      if (!h && ctr[i] > 0) ctr[i]--;
      look_pc[0] = {24'h0, 6'(i), 2'b00};
      expect_lat(0, (ctr[i] >= 2) ? L1_LAT : L2_LAT, "random training");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
