// tb_sink_arbiter: directed cases for the left-first / right-first priority,
// then every request/free combination of an 8-entry segment checked for the
// rules: a grant only goes to a free lower entry from an adjacent requesting
// upper entry, no upper entry is granted twice, and the grant is the one the
// service order and the priority lists pick (reference model below).
module tb_sink_arbiter;
  logic [7:0] up_req, lo_free, take, up_gnt;
  logic [2:0] src [8];
  int checks = 0, failures = 0;

  sink_arbiter #(.N(8)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: req %b free %b", what, up_req, lo_free); end
  endtask

  initial begin
    // left half: entry 2 free, upper 1,2,3 request -> top-left (1) wins
    up_req = 8'b0000_1110; lo_free = 8'b0000_0100; #1;
    chk(take == 8'b0000_0100 && src[2] == 1 && up_gnt == 8'b0000_0010, "left-first");
    // right half: entry 5 free, upper 4,5,6 request -> top-right (6) wins
    up_req = 8'b0111_0000; lo_free = 8'b0010_0000; #1;
    chk(take == 8'b0010_0000 && src[5] == 6 && up_gnt == 8'b0100_0000, "right-first");
    // only top
    up_req = 8'b0000_0100; lo_free = 8'b0000_0100; #1;
    chk(take == 8'b0000_0100 && src[2] == 2, "top only");
    // not adjacent: upper 0 cannot reach lower 2
    up_req = 8'b0000_0001; lo_free = 8'b0000_0100; #1;
    chk(take == 0 && up_gnt == 0, "no path two entries away");
    // exhaustive
    for (int r = 0; r < 256; r++)
      for (int f = 0; f < 256; f++) begin
        logic [7:0] av, et, eg;
        int es [8];
        up_req = 8'(r); lo_free = 8'(f); #1;
        av = up_req; et = '0; eg = '0;
        for (int n = 0; n < 8; n++) begin
          int k; int c [3];
          k = (n < 4) ? n : 11 - n;
          es[k] = 0;
          if (k < 4) c = '{k - 1, k, k + 1}; else c = '{k + 1, k, k - 1};
          if (lo_free[k])
            foreach (c[i])
              if (!et[k] && c[i] >= 0 && c[i] < 8 && av[c[i]]) begin
                et[k] = 1; es[k] = c[i]; av[c[i]] = 0; eg[c[i]] = 1;
              end
        end
        checks++;
        if (take != et || up_gnt != eg) begin
          failures++; $display("FAIL exhaustive req %b free %b", up_req, lo_free);
        end
        for (int k = 0; k < 8; k++)
          if (take[k]) begin
            checks++;
            if (int'(src[k]) != es[k] || !lo_free[k] || !up_req[src[k]]) begin
              failures++; $display("FAIL src of %0d", k);
            end
          end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
