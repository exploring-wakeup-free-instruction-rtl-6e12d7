// tb_select_logic: every request pattern of 8 entries is checked against a
// model that grants the lowest-numbered requests, at most 4, in port order.
module tb_select_logic;
  logic [7:0] req, gnt;
  logic port_v [4];
  logic [2:0] port_idx [4];
  int checks = 0, failures = 0;

  select_logic #(.N(8), .NPORT(4)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 256; r++) begin
      logic [7:0] eg;
      int pos [$];
      req = 8'(r);
      #1;
      pos.delete();
      eg = '0;
      for (int i = 0; i < 8; i++) if (req[i] && pos.size() < 4) begin eg[i] = 1; pos.push_back(i); end
      checks++;
      if (gnt != eg) begin failures++; $display("FAIL req %b gnt %b expected %b", req, gnt, eg); end
      for (int p = 0; p < 4; p++) begin
        checks++;
        if (port_v[p] != (p < pos.size()) || (p < pos.size() && int'(port_idx[p]) != pos[p])) begin
          failures++; $display("FAIL req %b port %0d", req, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
