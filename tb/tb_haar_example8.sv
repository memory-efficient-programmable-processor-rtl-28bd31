// tb_haar_example8: replays the 8-point worked example of the processor
// cycle by cycle. Coefficients X = {14, 20, -5, -15, 2, 5, 5, -16} are read
// in the order 14 20 -5 2 5 -15 5 -16. After each cycle the testbench
// checks the address, RSUM, the stack registers R0 and R1 and, for the four
// leaf cycles, the output pair:
//   1: RSUM = 14            2: RSUM = 34, R0 = -6      3: RSUM = 24, R0 = 44, R1 = -6
//   4: x0, x1 = 4, 2        5: x2, x3 = 8, 3, R0 = -6  6: RSUM = -36, R0 = 24
//   7: x4, x5 = -2, -7      8: x6, x7 = -5, 11, stack empty
// The whole transform takes 8 cycles and the first pair is out after
// log2 N + 1 = 4 cycles.
module tb_haar_example8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] log2n = 4'd3;
  logic signed [15:0] x_in = '0, x_even, x_odd;
  logic [9:0] add;
  logic valid, ms;
  always #5 clk = !clk;

  haar_ifht_proc dut (.*);

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", s);
    end
  endtask

  int X [8]        = '{14, 20, -5, -15, 2, 5, 5, -16};
  int order [8]    = '{0, 1, 2, 4, 5, 3, 6, 7};
  // expected state after each cycle; 9999 = not checked
  int e_rsum [8]   = '{14, 34, 24, 9999, 9999, -36, 9999, 9999};
  int e_r0 [8]     = '{9999, -6, 44, 9999, -6, 24, 24, 9999};
  int e_r1 [8]     = '{9999, 9999, -6, -6, 9999, 9999, 9999, 9999};
  int e_depth [8]  = '{0, 1, 2, 2, 1, 1, 1, 0};
  int e_even [8]   = '{9999, 9999, 9999, 4, 8, 9999, -2, -5};
  int e_odd [8]    = '{9999, 9999, 9999, 2, 3, 9999, -7, 11};

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 8; c++) begin
      @(negedge clk);
      en = 1;
      chk(add == 10'(order[c]), $sformatf("cycle %0d address %0d", c + 1, add));
      x_in = 16'(X[order[c]]);
      @(posedge clk);
      #1;
      if (e_rsum[c] != 9999)
        chk(dut.rsum == 26'(e_rsum[c]), $sformatf("cycle %0d RSUM %0d", c + 1, dut.rsum));
      if (e_r0[c] != 9999)
        chk(dut.u_stack.r[0] == 26'(e_r0[c]), $sformatf("cycle %0d R0 %0d", c + 1, dut.u_stack.r[0]));
      if (e_r1[c] != 9999)
        chk(dut.u_stack.r[1] == 26'(e_r1[c]), $sformatf("cycle %0d R1 %0d", c + 1, dut.u_stack.r[1]));
      chk(int'(dut.depth) == e_depth[c], $sformatf("cycle %0d stack depth %0d", c + 1, dut.depth));
      chk(valid == (e_even[c] != 9999), $sformatf("cycle %0d valid", c + 1));
      if (e_even[c] != 9999) begin
        chk(x_even == 16'(e_even[c]) && x_odd == 16'(e_odd[c]),
            $sformatf("cycle %0d outputs %0d %0d", c + 1, x_even, x_odd));
        chk(ms == (c == 7), "ms");
      end
    end
    @(negedge clk);
    en = 0;
    chk(add == 0, "ready for the next transform after 8 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
