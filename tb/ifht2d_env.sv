// ifht2d_env: stimulus and checker for the 2-D IFHT processor, shared by
// the end-to-end testbenches. It serves the coefficient memory (read
// without delay) and checks the pixel stream.
//
// NFR frames are sent back to back. Even frames are the 2-D forward Haar
// transform of a random image of signed 8-bit pixels (-127..127); the
// processor must return that image exactly. Odd frames hold random
// coefficients of COEF_W bits and are checked against a reference that
// models the hardware's widths (26-bit internal sums, 16-bit RAM words).
// Pixels must come out in raster order with row_end on the last two pixels
// of each row and frame_end on the last pixel of a frame, the first pixel
// exactly one frame period plus the two chip latencies after reset, and
// frames following each other without a gap. done rises when every
// expected pixel has been seen.
module ifht2d_env #(
  parameter int LOG2_S = 3,
  parameter int COEF_W = 25,
  parameter int NFR    = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [2*LOG2_S-1:0]      coef_addr,
  output logic signed [COEF_W-1:0] coef_data,
  input  logic signed [15:0]       pix,
  input  logic                     pix_valid,
  input  logic                     row_end,
  input  logic                     frame_end,
  output logic                     done,
  output int                       checks,
  output int                       failures
);
  import haar_ref_pkg::*;
  localparam int S = 1 << LOG2_S;
  localparam int SS = S * S;

  int hmat [S][S];                     // A_k * H_k(i): hmat[k][i]
  logic signed [COEF_W-1:0] coef [NFR][SS];
  int exp_pix [NFR][SS];
  int fr = 0, cyc = 0, nout = 0, first_pix = -1, last_frame_end = -1;
  logic [2*LOG2_S-1:0] addr_q = '0;
  bit wrap_now;
  int cur;

  initial begin
    checks = 0; failures = 0; done = 0;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL S=%0d %s (cycle %0d)", S, s, cyc);
    end
  endtask

  // Frame data.
  initial begin
    int img [S][S];
    longint d [S][S];
    longint s;
    for (int k = 0; k < S; k++)
      for (int i = 0; i < S; i++) hmat[k][i] = int'(a_k(k)) * haar_h(k, i, LOG2_S);
    for (int f = 0; f < NFR; f++) begin
      if (f % 2 == 0) begin
        for (int m = 0; m < S; m++)
          for (int n = 0; n < S; n++) img[m][n] = int'($urandom % 255) - 127;
        // d(l, m) = sum_n H_l(n) img(m, n); c(l, k) = sum_m H_k(m) d(l, m)
        for (int l = 0; l < S; l++)
          for (int m = 0; m < S; m++) begin
            s = 0;
            for (int n = 0; n < S; n++) s += haar_h(l, n, LOG2_S) * img[m][n];
            d[l][m] = s;
          end
        for (int l = 0; l < S; l++)
          for (int k = 0; k < S; k++) begin
            s = 0;
            for (int m = 0; m < S; m++) s += haar_h(k, m, LOG2_S) * d[l][m];
            coef[f][l * S + k] = COEF_W'(s);
          end
        for (int m = 0; m < S; m++)
          for (int n = 0; n < S; n++) exp_pix[f][m * S + n] = img[m][n];
      end else begin
        for (int a = 0; a < SS; a++) coef[f][a] = COEF_W'($urandom);
        // first pass along k, 26-bit sums, 16-bit results
        for (int l = 0; l < S; l++)
          for (int m = 0; m < S; m++) begin
            s = 0;
            for (int k = 0; k < S; k++) s += hmat[k][m] * longint'(coef[f][l * S + k]);
            d[l][m] = wrap(wrap(s, 26) >>> LOG2_S, 16);
          end
        // second pass along l
        for (int m = 0; m < S; m++)
          for (int n = 0; n < S; n++) begin
            s = 0;
            for (int l = 0; l < S; l++) s += hmat[l][n] * d[l][m];
            exp_pix[f][m * S + n] = int'(wrap(wrap(s, 26) >>> LOG2_S, 16));
          end
      end
    end
  end

  // Coefficient memory; the frame advances when chip 1 wraps to {0, 0}.
  always_comb begin
    wrap_now = (addr_q == '1) && (coef_addr == '0);
    cur      = (fr + int'(wrap_now)) < NFR ? fr + int'(wrap_now) : NFR - 1;
  end
  assign coef_data = coef[cur][coef_addr];
  always_ff @(posedge clk) begin
    addr_q <= coef_addr;
    if (wrap_now) fr <= fr + 1;
  end

  // Pixel checker.
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (pix_valid && !done) begin
      int f, a;
      f = nout / SS; a = nout % SS;
      if (nout == 0) begin
        first_pix = cyc;
        // chip 1 ends frame 0 one processor cycle after its last coefficient;
        // chip 2 then needs its own latency of log2 S + 1 processor cycles
        chk(cyc == 2 * SS + 2 + 2 * (LOG2_S + 1), $sformatf("first pixel at %0d", cyc));
      end
      chk(pix == 16'(exp_pix[f][a]), $sformatf("frame %0d pixel (%0d,%0d) got %0d exp %0d",
                                               f, a / S, a % S, pix, exp_pix[f][a]));
      chk(row_end == (a % S >= S - 2), "row_end");
      chk(frame_end == (a == SS - 1), "frame_end");
      if (a == SS - 1) begin
        // frames follow one another every 2*S*S bus cycles
        if (last_frame_end >= 0) chk(cyc - last_frame_end == 2 * SS, "frame period");
        last_frame_end = cyc;
      end
      nout++;
      if (nout == NFR * SS) done <= 1;
    end
  end
endmodule
