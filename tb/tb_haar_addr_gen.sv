// tb_haar_addr_gen: checks the addressing generator over consecutive
// transforms of every length 8 ... 1024 (plus clamped out-of-range length
// codes): the address sequence against an independent preorder walk, and
// the level, first, leaf, right-child and last flags against their
// definitions. The enable is dropped at random; the address must hold.
module tb_haar_addr_gen;
  import haar_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] log2n = 3, level, n_cur;
  logic [9:0] add;
  logic first, leaf, right, last;
  always #5 clk = !clk;

  haar_addr_gen dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", s);
    end
  endtask

  initial begin
    int codes[12] = '{3, 4, 5, 6, 7, 8, 9, 10, 0, 15, 10, 3};
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (codes[c]) begin
      int n, N;
      n = codes[c] < 3 ? 3 : (codes[c] > 10 ? 10 : codes[c]);
      N = 1 << n;
      for (int t = 0; t < N; t++) begin
        int k;
        @(negedge clk);
        en = 0;
        while ($urandom % 4 == 0) @(negedge clk);
        log2n = 4'(codes[c]);
        k = preorder_k(t, n);
        #1;
        chk(add == 10'(k), $sformatf("n=%0d t=%0d add=%0d exp %0d", n, t, add, k));
        chk(first == (k == 0), "first");
        if (k != 0) begin
          chk(level == 4'(ilog2(k)), "level");
          chk(leaf == (ilog2(k) == n - 1), "leaf");
          chk(right == (k % 2 == 1 && k != 1), "right");
          chk(last == (k == N - 1), "last");
          chk(n_cur == 4'(n), "n_cur");
        end
        en = 1;
      end
    end
    @(negedge clk);
    en = 0;
    chk(add == 0, "back to X0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
