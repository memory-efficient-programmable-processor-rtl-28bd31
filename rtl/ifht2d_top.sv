// ifht2d_top: 2-D inverse fast Haar transform processor for S x S images
// (256 x 256 by default), built from two 1-D IFHT chips and two RAMs.
//
// The 2-D transform is separable. Chip 1 takes the coefficient matrix line
// by line, each line in the minimum-latency order, from an external memory
// it addresses through coef_addr = {line, preorder index}; it transforms
// along the preorder index and writes its output samples, transposed, into
// one RAM bank. Meanwhile chip 2 reads the previous frame from the other
// bank, row by row in the minimum-latency order, and transforms along the
// line index; its output is the image in raster order. The banks swap at
// every frame boundary, so a new frame can follow the previous one without
// a gap, and the image comes out one frame (plus the short pipeline delay
// of the chips) after its coefficients went in.
//
// With c(l, k) the coefficient at {l, k} and IFHT the 1-D inverse of each
// chip (sum_k 2**p(k) H_k(i) c_k, divided by S with rounding to minus
// infinity, kept to DW bits):
//   d(l, m)   = IFHT over k of c(l, k)        (stored at RAM row m, column l)
//   pix(m, n) = IFHT over l of d(l, m)
//
// Timing: clk is the output bus clock; one coefficient is taken every two
// clk cycles. coef_data must follow coef_addr within two clk cycles (a
// registered read is fine). pix_valid marks each output pixel, row_end the
// last two pixels of a row, frame_end the last pixel of a frame. Chip 2
// starts when chip 1 has written its first full frame. Asynchronous
// active-low reset; RAM contents are not reset.
module ifht2d_top #(
  parameter int unsigned LOG2_S = 8,
  parameter int unsigned COEF_W = 25,
  parameter int unsigned DW     = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic [2*LOG2_S-1:0]      coef_addr,
  input  logic signed [COEF_W-1:0] coef_data,
  output logic signed [DW-1:0]     pix,
  output logic                     pix_valid,
  output logic                     row_end,
  output logic                     frame_end
);
  import haar_pkg::*;

  localparam logic [HAAR_SH_W-1:0] LOG2N = HAAR_SH_W'(LOG2_S);

  logic [HAAR_LOG2_NMAX-1:0] add1, add2;
  logic signed [DW-1:0]      bus1, rd_data;
  logic                      eo1, ms1, run2, rbank, swap;
  logic [2*LOG2_S-1:0]       addr_b0, addr_b1;
  logic                      we_b0, we_b1;
  logic [DW-1:0]             rdata_b0, rdata_b1;
  logic [LOG2_S-1:0]         out_row;

  haar_ifht_chip #(.IN_W(COEF_W), .OUT_W(DW)) u_chip1 (
    .clk, .rst_n, .run(1'b1), .log2n(LOG2N), .x_in(coef_data),
    .add(add1), .dout(bus1), .eo(eo1), .ms(ms1)
  );

  ifht2d_addr #(.LOG2_S(LOG2_S)) u_addr (
    .clk, .rst_n, .add1, .eo1, .add2, .coef_addr,
    .addr_b0, .addr_b1, .we_b0, .we_b1, .rbank, .run2, .swap
  );

  ifht2d_ram #(.AW(2*LOG2_S), .DW(DW)) u_ram0 (
    .clk, .we(we_b0), .addr(addr_b0), .wdata(bus1), .rdata(rdata_b0)
  );
  ifht2d_ram #(.AW(2*LOG2_S), .DW(DW)) u_ram1 (
    .clk, .we(we_b1), .addr(addr_b1), .wdata(bus1), .rdata(rdata_b1)
  );

  assign rd_data = rbank ? rdata_b1 : rdata_b0;

  haar_ifht_chip #(.IN_W(DW), .OUT_W(DW)) u_chip2 (
    .clk, .rst_n, .run(run2), .log2n(LOG2N), .x_in(rd_data),
    .add(add2), .dout(pix), .eo(pix_valid), .ms(row_end)
  );

  // Output row counter for the end-of-frame marker.
  logic row_end_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_row   <= '0;
      row_end_q <= 1'b0;
    end else begin
      row_end_q <= row_end;
      if (row_end_q && !row_end) out_row <= out_row + 1'b1;
    end
  end
  assign frame_end = row_end && row_end_q && (out_row == '1);

  // Chip 1 ends a line exactly when its write counter reaches a line end.
  a_line_sync: assert property (@(posedge clk) disable iff (!rst_n)
    swap |-> ms1);
endmodule
