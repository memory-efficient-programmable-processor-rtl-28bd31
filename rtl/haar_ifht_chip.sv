// haar_ifht_chip: the 1-D IFHT chip: the processor plus a single output bus.
//
// To save pins, the even and odd output samples share one bus, switched at
// twice the processor rate. The chip is clocked at that bus rate (clk);
// an internal phase bit divides it by two to form the processor clock
// enable, so one processor cycle is two clk cycles:
//   phase 0: the bus carries ROUT1 (even sample x(2j))
//   phase 1: the bus carries ROUT2 (odd sample x(2j+1)); the processor
//            takes its input at the edge that ends this phase.
// eo marks a valid sample on the bus, ms the two samples of the last pair
// of a transform. add changes at the start of phase 0, so an external memory
// has up to two clk cycles (one with a registered read) to return x_in.
// run low holds the chip at the start of a transform in phase 0; raising
// it starts the first transform. Asynchronous active-low reset.
module haar_ifht_chip
  import haar_pkg::*;
#(
  parameter int unsigned LOG2_NMAX = haar_pkg::HAAR_LOG2_NMAX,
  parameter int unsigned IN_W      = haar_pkg::HAAR_IN_W,
  parameter int unsigned OUT_W     = haar_pkg::HAAR_OUT_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    run,
  input  logic [HAAR_SH_W-1:0]         log2n,
  input  logic signed [IN_W-1:0]  x_in,
  output logic [LOG2_NMAX-1:0]    add,
  output logic signed [OUT_W-1:0] dout,
  output logic                    eo,
  output logic                    ms
);
  logic phase, en, valid, last;
  logic signed [OUT_W-1:0] x_even, x_odd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    phase <= 1'b0;
    else if (!run) phase <= 1'b0;
    else           phase <= !phase;
  end

  assign en = run && phase;

  haar_ifht_proc #(.LOG2_NMAX(LOG2_NMAX), .IN_W(IN_W), .OUT_W(OUT_W)) u_proc (
    .clk, .rst_n, .en, .log2n, .x_in, .add, .x_even, .x_odd, .valid, .ms(last)
  );

  // Output bus multiplexer at twice the processor rate.
  assign dout = phase ? x_odd : x_even;
  assign eo   = valid && run;
  assign ms   = last && run;
endmodule
