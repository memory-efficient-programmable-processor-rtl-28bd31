// tb_ifht2d_ram: checks the 64k x 16 RAM at its default size: random
// writes and reads against an array model, the one-clock read latency and
// the read-old-data behaviour when a word is read and written on the same
// edge. Every address is written first so that no read sees an unwritten
// word.
module tb_ifht2d_ram;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [15:0] addr = '0, wdata = '0, rdata;
  logic [15:0] model [65536];
  always #5 clk = !clk;

  ifht2d_ram dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 65536; a++) begin
      @(negedge clk);
      we = 1; addr = 16'(a); wdata = 16'($urandom);
      model[a] = wdata;
    end
    for (int i = 0; i < 100000; i++) begin
      logic [15:0] exp_r;
      @(negedge clk);
      we = $urandom % 2; addr = 16'($urandom); wdata = 16'($urandom);
      exp_r = model[addr];
      if (we) model[addr] = wdata;
      @(posedge clk);
      #1;
      checks++;
      if (rdata != exp_r) begin
        failures++;
        if (failures < 10) $display("FAIL addr %0d got %h exp %h", addr, rdata, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
