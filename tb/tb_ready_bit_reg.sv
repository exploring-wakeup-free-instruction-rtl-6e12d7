// tb_ready_bit_reg: checks the reset value (all ready), clearing on
// allocation, setting from the set mask, and that a clear beats a set to
// the same register in the same cycle; random traffic is compared with a
// reference bit vector.
module tb_ready_bit_reg;
  localparam int NR = 32;
  logic clk = 0, rst_n = 0;
  logic clr_en [2];
  logic [4:0] clr_addr [2];
  logic [NR-1:0] set_mask, ready, ref_v;
  int checks = 0, failures = 0;

  ready_bit_reg #(.NREGS(NR), .NCLR(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clr_en = '{0, 0}; clr_addr = '{0, 0}; set_mask = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    checks++; if (ready != '1) begin failures++; $display("FAIL reset value"); end
    clr_en = '{1, 1}; clr_addr = '{4, 9};
    @(negedge clk);
    clr_en = '{0, 0};
    checks++; if (ready[4] || ready[9] || !ready[5]) begin failures++; $display("FAIL clear"); end
    set_mask = 32'h10;
    clr_en = '{1, 0}; clr_addr = '{4, 0};
    @(negedge clk);
    checks++; if (ready[4]) begin failures++; $display("FAIL clear must win"); end
    clr_en = '{0, 0}; set_mask = 32'h210;
    @(negedge clk);
    set_mask = '0;
    checks++; if (!ready[4] || !ready[9]) begin failures++; $display("FAIL set"); end
    ref_v = ready;
    for (int t = 0; t < 300; t++) begin
      logic [NR-1:0] c;
      clr_en[0] = $urandom_range(0, 1); clr_addr[0] = 5'($urandom);
      clr_en[1] = $urandom_range(0, 1); clr_addr[1] = 5'($urandom);
      set_mask  = $urandom & $urandom;
      c = '0;
      if (clr_en[0]) c[clr_addr[0]] = 1;
      if (clr_en[1]) c[clr_addr[1]] = 1;
      ref_v = (ref_v | set_mask) & ~c;
      @(negedge clk);
      checks++;
      if (ready != ref_v) begin failures++; $display("FAIL random step %0d", t); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
