// tb_seg_router: checks latency-to-segment routing (0 / 1-2 / 3-4 / >4),
// the move to a higher segment when one is full, the stall when the top is
// full, in-order blocking, left-end filling for dispatch and right-end
// filling with a minimum segment of 1 for switch-back; random cases are
// compared with a reference model.
module tb_seg_router;
  import wf_pkg::*;
  logic in_v [4];
  lat_t in_lat [4];
  logic [7:0] free_in [4], free_out [4], free_out_b [4];
  logic placed [4], placed_b [4];
  logic [1:0] seg [4], seg_b [4];
  logic [2:0] idx [4], idx_b [4];
  logic ovf [4], ovf_b [4];
  int checks = 0, failures = 0;

  seg_router #(.NIN(4), .SEGN(8), .MIN_SEG(0), .FROM_RIGHT(1'b0), .IN_ORDER(1'b1)) dut (
    .in_v, .in_lat, .free_in, .placed, .seg, .idx, .overflow(ovf), .free_out);
  seg_router #(.NIN(4), .SEGN(8), .MIN_SEG(1), .FROM_RIGHT(1'b1), .IN_ORDER(1'b0)) dut_b (
    .in_v, .in_lat, .free_in, .placed(placed_b), .seg(seg_b), .idx(idx_b), .overflow(ovf_b),
    .free_out(free_out_b));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int rng(int l);
    return (l == 0) ? 0 : (l <= 2) ? 1 : (l <= 4) ? 2 : 3;
  endfunction

  task automatic model(input int minseg, input bit right, input bit inord,
                       output bit pl [4], output int sg [4], output int ix [4]);
    logic [7:0] fr [4];
    bit blk;
    fr = free_in; blk = 0;
    for (int i = 0; i < 4; i++) begin
      int w;
      pl[i] = 0; sg[i] = 0; ix[i] = 0;
      w = rng(int'(in_lat[i])); if (w < minseg) w = minseg;
      if (in_v[i] && !blk) begin
        for (int s = w; s < 4 && !pl[i]; s++)
          for (int n = 0; n < 8 && !pl[i]; n++) begin
            int k; k = right ? 7 - n : n;
            if (fr[s][k]) begin pl[i] = 1; sg[i] = s; ix[i] = k; fr[s][k] = 0; end
          end
        if (!pl[i] && inord) blk = 1;
      end
    end
  endtask

  task automatic compare(input string what);
    bit pl [4]; int sg [4]; int ix [4];
    model(0, 0, 1, pl, sg, ix);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (placed[i] != pl[i] || (pl[i] && (int'(seg[i]) != sg[i] || int'(idx[i]) != ix[i]))) begin
        failures++; $display("FAIL %s dispatch inst %0d", what, i);
      end
    end
    model(1, 1, 0, pl, sg, ix);
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (placed_b[i] != pl[i] || (pl[i] && (int'(seg_b[i]) != sg[i] || int'(idx_b[i]) != ix[i]))) begin
        failures++; $display("FAIL %s switch-back inst %0d", what, i);
      end
    end
  endtask

  initial begin
    // empty queue: latencies 0, 2, 4, 9 go to segments 0, 1, 2, 3
    free_in = '{8'hff, 8'hff, 8'hff, 8'hff};
    in_v = '{1, 1, 1, 1}; in_lat = '{0, 2, 4, 9}; #1;
    checks++;
    if (!(seg[0] == 0 && seg[1] == 1 && seg[2] == 2 && seg[3] == 3 && idx[0] == 0))
      begin failures++; $display("FAIL ranges"); end
    checks++;
    if (!(seg_b[0] == 1 && idx_b[0] == 7)) begin failures++; $display("FAIL switch-back floor/right end"); end
    compare("ranges");
    // bottom full: latency 0 moves to segment 1, flagged as overflow
    free_in = '{8'h00, 8'hff, 8'hff, 8'hff}; in_lat = '{0, 0, 1, 3}; #1;
    checks++;
    if (!(placed[0] && seg[0] == 1 && ovf[0])) begin failures++; $display("FAIL overflow up"); end
    compare("overflow");
    // only one free entry in the whole queue: first placed, rest blocked
    free_in = '{8'h00, 8'h00, 8'h00, 8'h10}; in_lat = '{9, 0, 0, 0}; #1;
    checks++;
    if (!(placed[0] && !placed[1] && !placed[2] && !placed[3] && free_out[3] == 0))
      begin failures++; $display("FAIL top full stall"); end
    compare("full");
    for (int t = 0; t < 3000; t++) begin
      for (int s = 0; s < 4; s++) free_in[s] = 8'($urandom) & 8'($urandom);
      for (int i = 0; i < 4; i++) begin in_v[i] = 1'($urandom); in_lat[i] = lat_t'($urandom_range(0, 8)); end
      #1 compare("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
