// haar_outreg: the output registers ROUT1 (even samples) and ROUT2 (odd
// samples) with their valid and end-of-transform flags.
//
// On a rising edge with en high the registers take the scaled A/S sum and
// difference when load is high (a leaf coefficient), so each output pair
// appears one processor cycle after the coefficient that completes it and
// stays for one processor cycle. valid marks a fresh pair; last marks the
// pair that ends a transform. Asynchronous active-low reset.
module haar_outreg #(
  parameter int unsigned W = haar_pkg::HAAR_OUT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic                load,
  input  logic                last_in,
  input  logic signed [W-1:0] even_in,
  input  logic signed [W-1:0] odd_in,
  output logic signed [W-1:0] rout1,
  output logic signed [W-1:0] rout2,
  output logic                valid,
  output logic                last
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rout1 <= '0;
      rout2 <= '0;
      valid <= 1'b0;
      last  <= 1'b0;
    end else if (en) begin
      valid <= load;
      last  <= load && last_in;
      if (load) begin
        rout1 <= even_in;
        rout2 <= odd_in;
      end
    end
  end
endmodule
