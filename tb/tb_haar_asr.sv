// tb_haar_asr: checks ASR[log2 N] for log2 N = 0..15 on random signed
// inputs against floor division by 2**log2 N, cut to the output width.
module tb_haar_asr;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;

  logic signed [25:0] d;
  logic [3:0] n;
  logic signed [15:0] q;

  haar_asr dut (.d, .n, .q);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      longint v, e, den;
      d = 26'($urandom);
      n = 4'(i);
      #1;
      v   = longint'(d);
      den = longint'(1) << n;
      e   = (v >= 0) ? v / den : -((-v + den - 1) / den);
      checks++;
      if (q != 16'(e)) begin
        failures++;
        $display("FAIL d=%0d n=%0d q=%0d exp=%0d", d, n, q, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
