// tb_timing_table: checks that written latencies count down by one per
// cycle and saturate at zero, that unwritten registers keep counting, that
// the higher write port wins on a collision, and that both read groups see
// the same storage.
module tb_timing_table;
  import wf_pkg::*;
  localparam int NR = 16;
  logic clk = 0, rst_n = 0;
  logic [3:0] rd_addr [2], rd2_addr [3];
  lat_t rd_lat [2], rd2_lat [3];
  logic wr_en [2];
  logic [3:0] wr_addr [2];
  lat_t wr_lat [2];
  int checks = 0, failures = 0;

  timing_table #(.NREGS(NR), .NRD(2), .NRD2(3), .NWR(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input lat_t got, input int exp, input string what);
    checks++;
    if (int'(got) != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    wr_en = '{0, 0}; wr_addr = '{0, 0}; wr_lat = '{0, 0};
    rd_addr = '{0, 0}; rd2_addr = '{0, 0, 0};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    rd_addr = '{3, 7};
    #1 chk(rd_lat[0], 0, "reset value");
    // write latency 5 to r3 and 2 to r7
    wr_en = '{1, 1}; wr_addr = '{3, 7}; wr_lat = '{5, 2};
    @(negedge clk);
    wr_en = '{0, 0};
    rd2_addr = '{3, 7, 9};
    #1;
    chk(rd_lat[0], 4, "r3 one cycle after write");
    chk(rd_lat[1], 1, "r7 one cycle after write");
    chk(rd2_lat[0], 4, "second read group r3");
    chk(rd2_lat[2], 0, "untouched register");
    for (int c = 2; c < 8; c++) begin
      @(negedge clk); #1;
      chk(rd_lat[0], (5 - c < 0) ? 0 : 5 - c, $sformatf("r3 after %0d cycles", c));
      chk(rd_lat[1], (2 - c < 0) ? 0 : 2 - c, $sformatf("r7 after %0d cycles", c));
    end
    // collision: port 1 wins
    wr_en = '{1, 1}; wr_addr = '{9, 9}; wr_lat = '{20, 11};
    @(negedge clk);
    wr_en = '{0, 0};
    rd_addr = '{9, 9};
    #1 chk(rd_lat[0], 10, "port 1 wins collision");
    // saturation at maximum
    wr_en = '{1, 0}; wr_addr = '{1, 0}; wr_lat = '{lat_t'(LAT_MAX), 0};
    @(negedge clk);
    wr_en = '{0, 0};
    rd_addr = '{1, 1};
    #1 chk(rd_lat[0], LAT_MAX - 1, "largest latency");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
