// haar_rsum: the RSUM register and its input multiplexer.
//
// RSUM keeps the last A/S sum, which the next coefficient of the
// minimum-latency sequence (the left child in the coefficient tree) uses.
// At the start of a transform it is loaded with the input coefficient X0
// itself instead (div2 = 1 selects the input data). Loads on a rising edge
// with en and load high; asynchronous active-low reset clears it.
module haar_rsum #(
  parameter int unsigned W = haar_pkg::HAAR_ACC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                load,
  input  logic                div2,
  input  logic signed [W-1:0] x,
  input  logic signed [W-1:0] sum,
  output logic signed [W-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          q <= '0;
    else if (en && load) q <= div2 ? x : sum;
  end
endmodule
