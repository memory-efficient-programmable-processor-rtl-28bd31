// tb_haar_dp_ctrl: checks the data-path control word for every kind of
// tree position (X0, left/right internal node, X1, left/right leaf, last)
// at every level, against the rules of the processor's data flow.
module tb_haar_dp_ctrl;
  import haar_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic first, leaf, right, last;
  logic [3:0] level;
  haar_ctrl_t ctrl;
  always #5 clk = !clk;

  haar_dp_ctrl dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    for (int i = 0; i < 2000; i++) begin
      int kind;
      kind = $urandom % 5;   // 0 X0, 1 internal left, 2 internal right, 3 leaf left, 4 leaf right
      first = (kind == 0);
      leaf  = (kind >= 3);
      right = (kind == 2 || kind == 4);
      last  = (kind == 4) && ($urandom % 2 == 1);
      level = 4'($urandom % 10);
      #1;
      chk(ctrl.start == first, "start");
      chk(ctrl.last == last, "last");
      chk(ctrl.shift == (first ? 4'd0 : level), "shift");
      chk(ctrl.rsum_en == !leaf, "rsum_en");
      chk(ctrl.div2 == first, "div2");
      chk(ctrl.out_en == leaf, "out_en");
      // operand: stack top for right children, RSUM otherwise
      if (!first) chk(ctrl.selreg == right, "selreg");
      // stack: left internal pushes, right internal overwrites, right leaf pulls
      chk(ctrl.write == (kind == 1 || kind == 2), "write");
      chk(ctrl.push == (kind == 1), "push");
      chk(ctrl.pull == (kind == 4), "pull");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
