// haar_csel_add: carry-select adder, W bits, with carry in.
//
// The operand is cut into blocks of BLK bits. Each block above the lowest
// computes its sum twice, for a carry in of 0 and of 1, and the real carry,
// rippling from block to block, only selects between the two. The lowest
// block adds with the true carry in. Purely combinational. The carry-select
// structure follows the adder of the original chip; the block size is this
// design's choice.
module haar_csel_add #(
  parameter int unsigned W   = 26,
  parameter int unsigned BLK = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s
);
  localparam int unsigned NB = (W + BLK - 1) / BLK;
  localparam int unsigned PW = NB * BLK;

  logic [PW-1:0] ap, bp, sp;
  logic [NB:0]   c;

  assign ap   = PW'(a);
  assign bp   = PW'(b);
  assign c[0] = cin;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    logic [BLK:0] s0, s1;
    assign s0 = {1'b0, ap[i*BLK +: BLK]} + {1'b0, bp[i*BLK +: BLK]};
    assign s1 = {1'b0, ap[i*BLK +: BLK]} + {1'b0, bp[i*BLK +: BLK]} + (BLK+1)'(1);
    assign sp[i*BLK +: BLK] = c[i] ? s1[BLK-1:0] : s0[BLK-1:0];
    assign c[i+1]           = c[i] ? s1[BLK]     : s0[BLK];
  end

  assign s = sp[W-1:0];
endmodule
