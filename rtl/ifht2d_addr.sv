// ifht2d_addr: addressing circuit of the 2-D IFHT processor, made of
// counters and multiplexers.
//
// The image is S x S, S = 2**LOG2_S. Two single-port RAMs, banks 0 and 1,
// alternate frame by frame: while the first 1-D chip writes the
// intermediate frame into the bank selected by wbank, the second chip reads
// the previous frame from the other one.
//   * Coefficient fetch for chip 1: line counter (line_in) on the high
//     address bits, the chip's own preorder address add1 on the low ones.
//     line_in advances after the chip has taken coefficient S-1 of a line.
//   * Write of chip 1's output bus: every sample with eo1 goes to address
//     {wr_pos, wr_line}, i.e. transposed: sample m of line v lands in row m,
//     column v. wr_pos counts the samples of a line, wr_line the lines;
//     after the last sample of the frame the banks swap (swap pulses).
//   * Read for chip 2: address {rd_row, add2}; rd_row advances after chip 2
//     has taken coefficient S-1 of a row. run2 rises at the first swap and
//     starts chip 2 exactly at the start of a frame.
// The bank not being written sees the read address, the other the write
// address and write enable. rbank (= !wbank) selects the read data.
// The processor clock phase is mirrored here from reset (one chip cycle is
// two clk cycles, input taken in the second) so the counters advance with
// the chips. Asynchronous active-low reset.
module ifht2d_addr #(
  parameter int unsigned LOG2_S    = 8,
  parameter int unsigned LOG2_NMAX = haar_pkg::HAAR_LOG2_NMAX
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [LOG2_NMAX-1:0]   add1,
  input  logic                   eo1,
  input  logic [LOG2_NMAX-1:0]   add2,
  output logic [2*LOG2_S-1:0]    coef_addr,
  output logic [2*LOG2_S-1:0]    addr_b0,
  output logic [2*LOG2_S-1:0]    addr_b1,
  output logic                   we_b0,
  output logic                   we_b1,
  output logic                   rbank,
  output logic                   run2,
  output logic                   swap
);
  localparam logic [LOG2_S-1:0] LAST = '1;

  logic              phase, en1, en2, wbank;
  logic [LOG2_S-1:0] line_in, wr_pos, wr_line, rd_row;
  logic [2*LOG2_S-1:0] waddr, raddr;

  assign en1  = phase;
  assign en2  = phase && run2;
  assign swap = eo1 && (wr_pos == LAST) && (wr_line == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= 1'b0;
      line_in <= '0;
      wr_pos  <= '0;
      wr_line <= '0;
      rd_row  <= '0;
      wbank   <= 1'b0;
      run2    <= 1'b0;
    end else begin
      phase <= !phase;
      if (en1 && add1[LOG2_S-1:0] == LAST) line_in <= line_in + 1'b1;
      if (eo1) begin
        wr_pos <= wr_pos + 1'b1;
        if (wr_pos == LAST) wr_line <= wr_line + 1'b1;
      end
      if (swap) begin
        wbank <= !wbank;
        run2  <= 1'b1;
      end
      if (en2 && add2[LOG2_S-1:0] == LAST) rd_row <= rd_row + 1'b1;
    end
  end

  assign coef_addr = {line_in, add1[LOG2_S-1:0]};
  assign waddr     = {wr_pos, wr_line};
  assign raddr     = {rd_row, add2[LOG2_S-1:0]};
  assign addr_b0   = wbank ? raddr : waddr;
  assign addr_b1   = wbank ? waddr : raddr;
  assign we_b0     = eo1 && !wbank;
  assign we_b1     = eo1 &&  wbank;
  assign rbank     = !wbank;
endmodule
