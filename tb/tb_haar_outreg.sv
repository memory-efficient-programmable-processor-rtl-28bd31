// tb_haar_outreg: checks that ROUT1/ROUT2 take the even/odd samples on a
// leaf cycle, hold otherwise, and that valid and last follow load and
// last_in by one enabled clock.
module tb_haar_outreg;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, load = 0, last_in = 0;
  logic signed [15:0] even_in = '0, odd_in = '0, rout1, rout2, m1, m2;
  logic valid, last, mv, ml;
  always #5 clk = !clk;

  haar_outreg dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    m1 = '0; m2 = '0; mv = 0; ml = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0; load = $urandom % 2; last_in = $urandom % 2;
      even_in = 16'($urandom); odd_in = 16'($urandom);
      @(posedge clk);
      if (en) begin
        mv = load; ml = load && last_in;
        if (load) begin m1 = even_in; m2 = odd_in; end
      end
      #1;
      checks++;
      if (rout1 != m1 || rout2 != m2 || valid != mv || last != ml) begin
        failures++;
        $display("FAIL %0d %0d %b %b", rout1, rout2, valid, last);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
