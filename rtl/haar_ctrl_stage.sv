// haar_ctrl_stage: elemental module of the addressing generator. From the
// coefficient sequence of length N = 2**J it forms the sequence of length 2N.
//
// In minimum-latency (preorder) order the 2N sequence is X0, X1, then the
// left subtree under X2 (positions 2 .. N), then the right subtree under X3
// (positions N+1 .. 2N-1). Each subtree is the N sequence without its X0,
// with one tree level added: a node 1.rest of level p becomes 10.rest
// (k + 2**p) on the left and 11.rest (k + 2**(p+1)) on the right. The left
// half lags the N sequence by one position, so this stage takes the N
// sequence through a one-cycle delay register for it; the right half is the
// N sequence itself, which repeats with period N. Position t of the shared
// counter (taken modulo 2N) selects X0, X1, the delayed left form or the
// direct right form. The output therefore depends only on the counter and
// the stages below, and each stage adds the same small amount of logic.
// Timing: k_out/lv_out are combinational from t and the stage input; the
// delay register updates on a rising edge with en high. Asynchronous
// active-low reset (the register is not read before it has been loaded).
module haar_ctrl_stage #(
  parameter int unsigned AW = haar_pkg::HAAR_LOG2_NMAX,   // address width
  parameter int unsigned LW = haar_pkg::HAAR_SH_W,        // level width
  parameter int unsigned J  = 3                           // log2 of the input length
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic [AW-1:0] t,
  input  logic [AW-1:0] k_in,
  input  logic [LW-1:0] lv_in,
  output logic [AW-1:0] k_out,
  output logic [LW-1:0] lv_out
);
  logic [AW-1:0] k_d;
  logic [LW-1:0] lv_d;
  logic [J:0]    tl;      // position modulo 2N

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_d  <= '0;
      lv_d <= '0;
    end else if (en) begin
      k_d  <= k_in;
      lv_d <= lv_in;
    end
  end

  assign tl = t[J:0];

  always_comb begin
    if (tl == '0) begin
      k_out  = '0;                                  // X0
      lv_out = '0;
    end else if (tl == (J+1)'(1)) begin
      k_out  = AW'(1);                              // X1
      lv_out = '0;
    end else if (!tl[J] || tl[J-1:0] == '0) begin   // 2 .. N: left subtree
      k_out  = k_d + (AW'(1) << lv_d);
      lv_out = lv_d + 1'b1;
    end else begin                                  // N+1 .. 2N-1: right subtree
      k_out  = k_in + (AW'(1) << (lv_in + 1'b1));
      lv_out = lv_in + 1'b1;
    end
  end
endmodule
