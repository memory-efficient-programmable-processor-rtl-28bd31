// tb_haar_addsub: checks the carry-select adder/subtracter against the
// language's + and - on random and corner operands, at the default width
// and at a width that is not a multiple of the block size.
module tb_haar_addsub;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = !clk;

  logic signed [25:0] a, b, s, d;
  logic signed [12:0] a2, b2, s2, d2;

  haar_addsub dut (.a(a), .b(b), .sum(s), .diff(d));
  haar_addsub #(.W(13), .BLK(3)) dut2 (.a(a2), .b(b2), .sum(s2), .diff(d2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input logic signed [25:0] x, input logic signed [25:0] y);
    logic signed [25:0] es, ed;
    a = x; b = y; a2 = 13'(x); b2 = 13'(y);
    #1;
    es = 26'(longint'(x) + longint'(y));
    ed = 26'(longint'(x) - longint'(y));
    checks += 4;
    if (s != es || d != ed) begin
      failures++;
      $display("FAIL %0d %0d: sum %0d diff %0d", x, y, s, d);
    end
    if (s2 != 13'(es)) failures++;
    if (d2 != 13'(ed)) failures++;
  endtask

  initial begin
    one(0, 0); one(-1, 1); one(26'h1ffffff, 1); one(26'h2000000, 1);
    one(34, 10); one(34, -10); one(-1, -1);
    for (int i = 0; i < 5000; i++) one(26'($urandom), 26'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
