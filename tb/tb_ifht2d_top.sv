// tb_ifht2d_top: end-to-end test of the 2-D IFHT processor at two reduced
// image sizes, 8 x 8 and 16 x 16, three frames each (see ifht2d_env for the
// data and checks). It also counts how often each mechanism of the design
// happened and fails if one never did: stack push, top replace and pull,
// RSUM load from the input, leaf output pairs, bank swaps, start of the
// second chip, end-of-row and end-of-frame markers.
module tb_ifht2d_top;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [5:0]  ca3;
  logic signed [24:0] cd3;
  logic signed [15:0] pix3;
  logic pv3, re3, fe3, done3;
  int ch3, fl3;

  logic [7:0]  ca4;
  logic signed [24:0] cd4;
  logic signed [15:0] pix4;
  logic pv4, re4, fe4, done4;
  int ch4, fl4;

  ifht2d_top #(.LOG2_S(3)) dut3 (.clk, .rst_n, .coef_addr(ca3), .coef_data(cd3),
    .pix(pix3), .pix_valid(pv3), .row_end(re3), .frame_end(fe3));
  ifht2d_env #(.LOG2_S(3)) env3 (.clk, .rst_n, .coef_addr(ca3), .coef_data(cd3),
    .pix(pix3), .pix_valid(pv3), .row_end(re3), .frame_end(fe3),
    .done(done3), .checks(ch3), .failures(fl3));

  ifht2d_top #(.LOG2_S(4)) dut4 (.clk, .rst_n, .coef_addr(ca4), .coef_data(cd4),
    .pix(pix4), .pix_valid(pv4), .row_end(re4), .frame_end(fe4));
  ifht2d_env #(.LOG2_S(4)) env4 (.clk, .rst_n, .coef_addr(ca4), .coef_data(cd4),
    .pix(pix4), .pix_valid(pv4), .row_end(re4), .frame_end(fe4),
    .done(done4), .checks(ch4), .failures(fl4));

  // Mechanism counters (16 x 16 instance, both chips).
  int n_push = 0, n_replace = 0, n_pull = 0, n_load = 0, n_pairs = 0;
  int n_swap = 0, n_run2 = 0, n_row = 0, n_frame = 0, n_bus_odd = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut4.u_chip1.u_proc.en) begin
      if (dut4.u_chip1.u_proc.ctrl.write && dut4.u_chip1.u_proc.ctrl.push) n_push++;
      if (dut4.u_chip1.u_proc.ctrl.write && !dut4.u_chip1.u_proc.ctrl.push) n_replace++;
      if (dut4.u_chip1.u_proc.ctrl.pull) n_pull++;
      if (dut4.u_chip1.u_proc.ctrl.div2) n_load++;
    end
    if (dut4.u_chip2.u_proc.en && dut4.u_chip2.u_proc.ctrl.out_en) n_pairs++;
    if (dut4.u_addr.swap) n_swap++;
    if (dut4.u_addr.run2 && !$past(dut4.u_addr.run2)) n_run2++;
    if (re4 && pv4) n_row++;
    if (fe4) n_frame++;
    if (pv4 && dut4.u_chip2.phase) n_bus_odd++;
  end

  int checks = 0, failures = 0;

  task automatic need(input int count, input string what);
    checks++;
    $display("mechanism %-24s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + ch3 + ch4, failures + fl3 + fl4);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (done3 && done4);
    @(negedge clk);
    need(n_push, "stack push");
    need(n_replace, "stack top replace");
    need(n_pull, "stack pull");
    need(n_load, "RSUM load of X0");
    need(n_pairs, "output pair");
    need(n_swap, "bank swap");
    need(n_run2, "second chip start");
    need(n_row, "end of row");
    need(n_frame, "end of frame");
    need(n_bus_odd, "odd sample on bus");
    $display("TB_RESULT checks=%0d failures=%0d", checks + ch3 + ch4, failures + fl3 + fl4);
    $finish;
  end
endmodule
