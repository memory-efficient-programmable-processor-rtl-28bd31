// haar_addsub: the adder/subtracter (A/S), the only arithmetic element of
// the IFHT processor.
//
// In every processor cycle the A/S takes the operand a (RSUM or the stack
// top R0) and b (the scaled input coefficient) and delivers both a + b and
// a - b, as the processor needs the two in the same cycle: the sum goes on
// down the tree (or is an even output sample), the difference is kept for
// the other branch (or is an odd output sample). Both are formed by
// carry-select adders; the difference adds the inverted b with a carry in
// of 1. Two's complement, W bits, results wrap. Combinational.
module haar_addsub #(
  parameter int unsigned W   = haar_pkg::HAAR_ACC_W,
  parameter int unsigned BLK = 4
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic signed [W-1:0] sum,
  output logic signed [W-1:0] diff
);
  haar_csel_add #(.W(W), .BLK(BLK)) u_add (.a(a), .b(b),  .cin(1'b0), .s(sum));
  haar_csel_add #(.W(W), .BLK(BLK)) u_sub (.a(a), .b(~b), .cin(1'b1), .s(diff));
endmodule
