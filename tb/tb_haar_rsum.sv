// tb_haar_rsum: checks that RSUM loads the input data with div2 high, the
// A/S sum with div2 low, and holds when load or en is low.
module tb_haar_rsum;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, load = 0, div2 = 0;
  logic signed [25:0] x = '0, sum = '0, q, model;
  always #5 clk = !clk;

  haar_rsum dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en = $urandom % 2; load = $urandom % 2; div2 = $urandom % 2;
      x = 26'($urandom); sum = 26'($urandom);
      @(posedge clk);
      if (en && load) model = div2 ? x : sum;
      #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL q=%0d exp=%0d", q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
