// haar_ifht_proc: programmable-length 1-D inverse fast Haar transform
// processor (sequential queue architecture).
//
// Input coefficients X_k arrive one per processor cycle in the
// minimum-latency (tree preorder) order, fetched from an external memory at
// the address add this block drives. Each coefficient is scaled by
// A_k = 2**p (ASL[p]) and combined by the single adder/subtracter with
// either RSUM or the stack top R0. Sums go to RSUM, differences to the
// stack, and at the leaves of the tree the sum and difference, divided by N
// (two ASR[log2 N]), are two consecutive output samples x(2j) and x(2j+1) in
// natural order. Only log2 N values are stored: log2 N - 1 stacked
// differences plus RSUM. The result is
//   x_i = floor( sum_k A_k H_k(i) X_k / N )
// with the normalised Haar functions H_k in {0, +1, -1}.
//
// Timing: one coefficient per rising clock edge with en high (en is the
// processor clock enable; tie it high for one coefficient per clock). add
// is valid for the whole cycle; x_in must be valid at the edge that ends
// it. A transform takes N cycles, transforms follow back to back. Output
// pair j is held in ROUT1/ROUT2 (even/odd) for the processor cycle after
// the leaf that completes it; valid marks it, ms marks the last pair of a
// transform. The first pair is out log2 N + 1 cycles after X0 is taken.
// log2n (3..10) is sampled with X0.
module haar_ifht_proc
  import haar_pkg::*;
#(
  parameter int unsigned LOG2_NMAX = haar_pkg::HAAR_LOG2_NMAX,
  parameter int unsigned IN_W      = haar_pkg::HAAR_IN_W,
  parameter int unsigned OUT_W     = haar_pkg::HAAR_OUT_W,
  parameter int unsigned ACC_W     = OUT_W + LOG2_NMAX
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [HAAR_SH_W-1:0]         log2n,
  input  logic signed [IN_W-1:0]  x_in,
  output logic [LOG2_NMAX-1:0]    add,
  output logic signed [OUT_W-1:0] x_even,
  output logic signed [OUT_W-1:0] x_odd,
  output logic                    valid,
  output logic                    ms
);
  localparam int unsigned DEPTH = LOG2_NMAX - 1;

  haar_ctrl_t              ctrl;
  logic [HAAR_SH_W-1:0]         level, n_cur;
  logic                    first, leaf, right, last;
  logic signed [ACC_W-1:0] xs, opnd, rsum, r0, sum, diff;
  logic signed [OUT_W-1:0] even_s, odd_s;
  logic [$clog2(DEPTH+1)-1:0] depth;

  haar_addr_gen #(.LOG2_NMAX(LOG2_NMAX)) u_addr (
    .clk, .rst_n, .en, .log2n, .add, .level, .n_cur,
    .first, .leaf, .right, .last
  );

  haar_dp_ctrl u_ctrl (.first, .leaf, .right, .last, .level, .ctrl);

  haar_asl #(.IN_W(IN_W), .OUT_W(ACC_W)) u_asl (.d(x_in), .p(ctrl.shift), .q(xs));

  // SELREG multiplexer: operand of the A/S.
  assign opnd = ctrl.selreg ? r0 : rsum;

  haar_addsub #(.W(ACC_W)) u_as (.a(opnd), .b(xs), .sum, .diff);

  haar_rsum #(.W(ACC_W)) u_rsum (
    .clk, .rst_n, .en, .load(ctrl.rsum_en), .div2(ctrl.div2),
    .x(xs), .sum, .q(rsum)
  );

  haar_stack #(.W(ACC_W), .DEPTH(DEPTH)) u_stack (
    .clk, .rst_n, .en, .write(ctrl.write), .push(ctrl.push), .pull(ctrl.pull),
    .d(diff), .top(r0), .count(depth)
  );

  haar_asr #(.IN_W(ACC_W), .OUT_W(OUT_W)) u_asr_e (.d(sum),  .n(n_cur), .q(even_s));
  haar_asr #(.IN_W(ACC_W), .OUT_W(OUT_W)) u_asr_o (.d(diff), .n(n_cur), .q(odd_s));

  haar_outreg #(.W(OUT_W)) u_out (
    .clk, .rst_n, .en, .load(ctrl.out_en), .last_in(ctrl.last),
    .even_in(even_s), .odd_in(odd_s),
    .rout1(x_even), .rout2(x_odd), .valid, .last(ms)
  );

  // Every transform leaves the stack empty.
  a_stack_empty_at_end: assert property (@(posedge clk) disable iff (!rst_n)
    (en && ctrl.last) |-> (depth == 1 && !ctrl.start));
endmodule
