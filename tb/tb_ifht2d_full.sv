// tb_ifht2d_full: the 2-D IFHT processor at its full size, 256 x 256, with
// its default parameters: one image frame (exact reconstruction of a
// random 8-bit image) followed by one frame of random coefficients
// (bit-exact reference), back to back. See ifht2d_env for the checks.
module tb_ifht2d_full;
  logic clk = 0, rst_n = 0;
  always #5 clk = !clk;

  logic [15:0] coef_addr;
  logic signed [24:0] coef_data;
  logic signed [15:0] pix;
  logic pix_valid, row_end, frame_end, done;
  int checks, failures;

  ifht2d_top dut (.*);
  ifht2d_env #(.LOG2_S(8), .NFR(2)) env (.*);

  initial begin
    repeat (600000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    wait (done);
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
