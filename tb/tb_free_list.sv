// tb_free_list: checks the reset contents (registers above the architectural
// ones, in order), allocation from the head, return at the tail in port
// order, and the count of free registers, against a queue model under random
// traffic.
module tb_free_list;
  localparam int NR = 24, NA = 8;
  logic clk = 0, rst_n = 0;
  logic [4:0] head [2];
  logic [$clog2(NR-NA+1)-1:0] avail;
  logic [1:0] alloc_cnt;
  logic free_en [2];
  logic [4:0] free_reg [2];
  int checks = 0, failures = 0;
  int q[$];
  int held[$];

  free_list #(.NREGS(NR), .NARCH(NA), .NALLOC(2), .NFREE(2)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    alloc_cnt = 0; free_en = '{0, 0}; free_reg = '{0, 0};
    for (int i = NA; i < NR; i++) q.push_back(i);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 500; t++) begin
      int na, nf;
      checks++;
      if (int'(avail) != q.size()) begin failures++; $display("FAIL avail %0d vs %0d", avail, q.size()); end
      for (int a = 0; a < 2 && a < q.size(); a++) begin
        checks++;
        if (int'(head[a]) != q[a]) begin failures++; $display("FAIL head[%0d]=%0d expected %0d", a, head[a], q[a]); end
      end
      na = $urandom_range(0, 2);
      if (na > q.size()) na = q.size();
      nf = $urandom_range(0, 2);
      if (nf > held.size()) nf = held.size();
      alloc_cnt = 2'(na);
      free_en = '{0, 0};
      for (int f = 0; f < nf; f++) begin
        int idx;
        idx = $urandom_range(0, held.size() - 1);
        free_en[f] = 1; free_reg[f] = 5'(held[idx]);
        held.delete(idx);
      end
      for (int a = 0; a < na; a++) held.push_back(q.pop_front());
      for (int f = 0; f < nf; f++) q.push_back(int'(free_reg[f]));
      @(negedge clk);
    end
    alloc_cnt = 0; free_en = '{0, 0};
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
