// tb_haar_asl: checks the programmable left shifter ASL[p] for every shift
// amount 0..15 on random signed inputs against multiplication by 2**p,
// modulo the output width.
module tb_haar_asl;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;

  logic signed [15:0] d;
  logic [3:0] p;
  logic signed [25:0] q;

  haar_asl dut (.d, .p, .q);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      longint e;
      d = 16'($urandom);
      if (i < 16) d = -16'sd5;
      p = 4'(i);
      #1;
      e = longint'(d) * (longint'(1) << p);
      checks++;
      if (q != 26'(e)) begin
        failures++;
        $display("FAIL d=%0d p=%0d q=%0d", d, p, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
