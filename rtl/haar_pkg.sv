// haar_pkg: types and constants shared by the inverse fast Haar transform
// (IFHT) processor and the 2-D system built from it.
//
// The processor computes the 1-D inverse Haar transform of N = 2**log2n
// coefficients, log2n programmable from LOG2_NMIN (N = 8) to LOG2_NMAX
// (N = 1024), as in the original chip. The data widths are this design's
// choice: the source of the architecture does not give them.
package haar_pkg;

  // Programmable length range: N = 8 ... 1024.
  localparam int unsigned HAAR_LOG2_NMIN = 3;
  localparam int unsigned HAAR_LOG2_NMAX = 10;

  // Width of a shift amount / log2 N value (0..15).
  localparam int unsigned HAAR_SH_W = 4;

  // Default widths: input coefficients, output samples, internal datapath.
  // The internal width holds N times an output sample, which bounds every
  // intermediate result of a transform whose outputs fit in OUT_W bits.
  localparam int unsigned HAAR_IN_W  = 16;
  localparam int unsigned HAAR_OUT_W = 16;
  localparam int unsigned HAAR_ACC_W = HAAR_OUT_W + HAAR_LOG2_NMAX;

  // Data-path control word, decoded once per processor cycle from the
  // position of the current coefficient in the minimum-latency sequence.
  typedef struct packed {
    logic            start;   // first coefficient X0 of a new transform
    logic            div2;    // RSUM input select: 1 = input data, 0 = A/S sum
    logic            rsum_en; // RSUM loads this cycle
    logic            selreg;  // A/S operand: 1 = stack top R0, 0 = RSUM
    logic            write;   // R0 is written with the A/S difference
    logic            push;    // stack shifts down (R(i+1) <= R(i)) as R0 is written
    logic            pull;    // stack shifts up (R(i) <= R(i+1)), R0 consumed
    logic            out_en;  // leaf coefficient: A/S results are output samples
    logic            last;    // last coefficient of the transform
    logic [HAAR_SH_W-1:0] shift;   // ASL amount p (level of the coefficient)
  } haar_ctrl_t;

endpackage
