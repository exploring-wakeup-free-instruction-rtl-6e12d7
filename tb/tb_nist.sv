// tb_nist: checks insertion and CAM lookup of store PCs, the count-down of
// the stored latency, removal by instruction tag, that a full table drops
// new stores, and that several matches return the largest latency.
module tb_nist;
  import wf_pkg::*;
  localparam int E = 4;
  logic clk = 0, rst_n = 0;
  logic [31:0] look_pc [2];
  logic look_hit [2];
  lat_t look_lat [2];
  logic ins_en [2];
  logic [31:0] ins_pc [2];
  tag_t ins_tag [2];
  lat_t ins_lat [2];
  logic rem_en [1];
  tag_t rem_tag [1];
  logic [2:0] occupancy;
  int checks = 0, failures = 0;

  nist #(.ENTRIES(E), .NLOOK(2), .NINS(2), .NREM(1)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    ins_en = '{0, 0}; ins_pc = '{0, 0}; ins_tag = '{0, 0}; ins_lat = '{0, 0};
    rem_en = '{0}; rem_tag = '{0};
    look_pc = '{32'h400, 32'h500};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    #1 chk(!look_hit[0] && !look_hit[1] && occupancy == 0, "empty after reset");
    ins_en = '{1, 1}; ins_pc = '{32'h400, 32'h500}; ins_tag = '{7'd3, 7'd4}; ins_lat = '{10, 3};
    @(negedge clk);
    ins_en = '{0, 0};
    #1 chk(look_hit[0] && look_lat[0] == 9, "hit 0x400 lat 9");
    chk(look_hit[1] && look_lat[1] == 2, "hit 0x500 lat 2");
    repeat (4) @(negedge clk);
    #1 chk(look_lat[0] == 5 && look_lat[1] == 0, "latencies count down and saturate");
    // a second store with the same PC and a larger latency
    ins_en = '{1, 0}; ins_pc = '{32'h400, 0}; ins_tag = '{7'd9, 0}; ins_lat = '{30, 0};
    @(negedge clk);
    ins_en = '{0, 0};
    #1 chk(look_lat[0] == 29 && occupancy == 3, "largest of two matches");
    rem_en = '{1}; rem_tag = '{7'd9};
    @(negedge clk);
    rem_en = '{0};
    #1 chk(look_hit[0] && look_lat[0] == 3, "removed by tag, older match remains");
    rem_en = '{1}; rem_tag = '{7'd3};
    @(negedge clk);
    rem_en = '{0};
    #1 chk(!look_hit[0] && look_hit[1], "0x400 gone, 0x500 remains");
    // fill: 1 entry used, add 3, then a fifth must be dropped
    ins_en = '{1, 1}; ins_pc = '{32'h600, 32'h604}; ins_tag = '{7'd10, 7'd11}; ins_lat = '{5, 5};
    @(negedge clk);
    ins_en = '{1, 1}; ins_pc = '{32'h608, 32'h60c}; ins_tag = '{7'd12, 7'd13}; ins_lat = '{5, 5};
    @(negedge clk);
    ins_en = '{0, 0};
    look_pc = '{32'h608, 32'h60c};
    #1 chk(look_hit[0] && !look_hit[1] && occupancy == 4, "full table drops a store");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
