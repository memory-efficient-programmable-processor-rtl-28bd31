// tb_haar_stack: drives the STACK with random legal push, replace and pull
// operations (and idle cycles with the enable low) and compares the top of
// stack and the occupancy with a queue model after every clock edge.
module tb_haar_stack;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, en = 0, write = 0, push = 0, pull = 0;
  logic signed [25:0] d = '0, top;
  logic [3:0] count;
  always #5 clk = !clk;

  haar_stack dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [25:0] model[$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int op;
      @(negedge clk);
      op    = $urandom % 4;
      en    = ($urandom % 5) != 0;
      d     = 26'($urandom);
      write = 0; push = 0; pull = 0;
      // 0: push, 1: replace, 2: pull, 3: nothing
      if (op == 0 && model.size() < 9) begin write = 1; push = 1; end
      if (op == 1 && model.size() > 0) write = 1;
      if (op == 2 && model.size() > 0) pull = 1;
      // fill and empty completely from time to time
      if ((i / 40) % 4 == 1 && model.size() < 9) begin write = 1; push = 1; pull = 0; end
      if ((i / 40) % 4 == 3 && model.size() > 0) begin write = 0; push = 0; pull = 1; end
      @(posedge clk);
      if (en) begin
        if (write && push) model.push_front(d);
        else if (write) model[0] = d;
        else if (pull) void'(model.pop_front());
      end
      #1;
      checks++;
      if (count != 4'(model.size())) begin
        failures++;
        $display("FAIL count %0d exp %0d", count, model.size());
      end
      if (model.size() > 0) begin
        checks++;
        if (top != model[0]) begin
          failures++;
          $display("FAIL top %0d exp %0d", top, model[0]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
