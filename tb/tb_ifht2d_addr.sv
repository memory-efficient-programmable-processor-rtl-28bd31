// tb_ifht2d_addr: checks the 2-D addressing circuit for an 8 x 8 image
// with a cycle-level model of what the two chips do: chip 1 walks the
// preorder addresses one per processor cycle (two clk cycles) and emits
// output samples at random moments; chip 2 presents random addresses.
// Checked every clk: the coefficient address {line, add1}; for each output
// sample the bank written and the transposed address {sample, line}; the
// bank swap after the last sample of a frame; run2 after the first swap;
// the read address {row, add2} on the other bank and the row counter.
module tb_ifht2d_addr;
  import haar_ref_pkg::*;
  localparam int L = 3, S = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [9:0] add1 = '0, add2 = '0;
  logic eo1 = 0;
  logic [5:0] coef_addr, addr_b0, addr_b1;
  logic we_b0, we_b1, rbank, run2, swap;
  always #5 clk = !clk;

  ifht2d_addr #(.LOG2_S(L)) dut (.*);

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
      if (failures < 20) $display("FAIL %s", s);
    end
  endtask

  initial begin
    int pc = 0, samples = 0, line = 0, row = 0, bank = 0, swaps = 0;
    bit phase = 1, running = 0;   // one clock edge has passed since reset
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      add1 = 10'(preorder_k(pc % S, L));
      eo1  = ($urandom % 3) != 0;
      add2 = 10'($urandom % S);
      #1;
      chk(coef_addr == 6'(line * S + int'(add1)), $sformatf("coefficient address %0d exp %0d (c=%0d)", coef_addr, line * S + int'(add1), c));
      if (eo1) begin
        int wa;
        wa = (samples % S) * S + (samples / S) % S;
        chk((bank == 0) ? (we_b0 && !we_b1 && addr_b0 == 6'(wa))
                        : (we_b1 && !we_b0 && addr_b1 == 6'(wa)), "write address and bank");
      end else chk(!we_b0 && !we_b1, "no write");
      chk(swap == (eo1 && samples % (S*S) == S*S - 1), "swap");
      chk(run2 == running, "run2");
      chk(rbank == (bank == 0 ? 1'b1 : 1'b0), "read bank");
      chk(((bank == 0) ? addr_b1 : addr_b0) == 6'(row * S + int'(add2)), "read address");
      @(posedge clk);
      // model update at the edge
      if (phase) begin
        if (int'(add1) == S - 1) line = (line + 1) % S;
        if (running && int'(add2) == S - 1) row = (row + 1) % S;
        pc++;
      end
      if (eo1) begin
        if (samples % (S*S) == S*S - 1) begin
          bank = 1 - bank; running = 1; swaps++;
        end
        samples++;
      end
      phase = !phase;
    end
    chk(swaps >= 2, "swaps happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
