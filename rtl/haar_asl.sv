// haar_asl: ASL[p], the programmable arithmetic left shift that scales an
// input coefficient X_k by A_k = 2**p, p being the tree level of k.
//
// The IN_W-bit signed coefficient is sign-extended to OUT_W bits and passed
// through a logarithmic shifter, one stage per bit of p. Bits shifted out
// above OUT_W are lost (two's complement wrap, matching the A/S).
// Combinational.
module haar_asl #(
  parameter int unsigned IN_W  = haar_pkg::HAAR_IN_W,
  parameter int unsigned OUT_W = haar_pkg::HAAR_ACC_W,
  parameter int unsigned SH_W  = haar_pkg::HAAR_SH_W
) (
  input  logic signed [IN_W-1:0]  d,
  input  logic        [SH_W-1:0]  p,
  output logic signed [OUT_W-1:0] q
);
  logic [OUT_W-1:0] stage [SH_W+1];

  assign stage[0] = OUT_W'(d);   // sign extension of a signed operand

  for (genvar i = 0; i < SH_W; i++) begin : g_stage
    assign stage[i+1] = p[i] ? (stage[i] << (1 << i)) : stage[i];
  end

  assign q = stage[SH_W];
endmodule
