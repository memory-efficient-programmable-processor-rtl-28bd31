// haar_asr: ASR[log2 N], the arithmetic right shift that scales an output
// of the A/S by 1/N.
//
// The shift amount is the programmed log2 N, constant for a whole transform.
// The IN_W-bit signed value is shifted right with sign fill (division by N
// rounded towards minus infinity) and the low OUT_W bits are kept.
// Combinational.
module haar_asr #(
  parameter int unsigned IN_W  = haar_pkg::HAAR_ACC_W,
  parameter int unsigned OUT_W = haar_pkg::HAAR_OUT_W,
  parameter int unsigned SH_W  = haar_pkg::HAAR_SH_W
) (
  input  logic signed [IN_W-1:0]  d,
  input  logic        [SH_W-1:0]  n,
  output logic signed [OUT_W-1:0] q
);
  logic signed [IN_W-1:0] sh;
  assign sh = d >>> n;
  assign q  = OUT_W'(sh);
endmodule
