// tb_issue_ports: issues instructions of known operation latency and checks
// that each destination's ready bit is requested exactly L-1 cycles after
// issue (in the issue cycle for L = 1), never for loads, and that issued
// stores are reported by tag. Random issue traffic is checked against a
// schedule kept by the testbench.
module tb_issue_ports;
  import wf_pkg::*;
  logic clk = 0, rst_n = 0;
  logic iss_v [ISSUE_W], fu_v [ISSUE_W];
  iq_inst_t iss_inst [ISSUE_W], fu_inst [ISSUE_W];
  logic [NUM_PREGS-1:0] set_mask;
  logic st_rem_en [ISSUE_W];
  tag_t st_rem_tag [ISSUE_W];
  int checks = 0, failures = 0;
  logic [NUM_PREGS-1:0] expect_at [int];
  int cyc = 0;

  issue_ports dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < ISSUE_W; p++) begin iss_v[p] = 0; iss_inst[p] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 1000; t++) begin
      logic [NUM_PREGS-1:0] used;
      used = '0;
      for (int p = 0; p < ISSUE_W; p++) begin
        op_e op;
        iss_v[p] = (t < 900) && 1'($urandom);
        op = op_e'($urandom_range(0, 7));
        iss_inst[p] = '0;
        iss_inst[p].op    = op;
        iss_inst[p].tag   = tag_t'($urandom);
        iss_inst[p].dst_v = (op != OP_STORE);
        // one register per issued instruction, never reused while pending
        iss_inst[p].pdst  = preg_t'((t * ISSUE_W + p) % NUM_PREGS);
        iss_inst[p].dst_lat = (op == OP_LOAD) ? lat_t'(L1_LAT) : op_latency(op);
        if (iss_v[p] && iss_inst[p].dst_v && op != OP_LOAD) begin
          int when;
          when = cyc + ((int'(iss_inst[p].dst_lat) <= 1) ? 0 : int'(iss_inst[p].dst_lat) - 1);
          if (!expect_at.exists(when)) expect_at[when] = '0;
          expect_at[when][iss_inst[p].pdst] = 1'b1;
        end
      end
      #1;
      for (int p = 0; p < ISSUE_W; p++) begin
        checks++;
        if (fu_v[p] != iss_v[p] || (iss_v[p] && fu_inst[p] != iss_inst[p]) ||
            st_rem_en[p] != (iss_v[p] && iss_inst[p].op == OP_STORE) ||
            (st_rem_en[p] && st_rem_tag[p] != iss_inst[p].tag)) begin
          failures++; $display("FAIL port %0d pass-through/store report at %0d", p, cyc);
        end
      end
      checks++;
      if (set_mask != (expect_at.exists(cyc) ? expect_at[cyc] : '0)) begin
        failures++; $display("FAIL ready-bit set mask at cycle %0d", cyc);
      end
      @(negedge clk);
      cyc++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
