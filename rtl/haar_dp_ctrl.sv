// haar_dp_ctrl: data-path control of the IFHT processor.
//
// Turns the position of the current coefficient in the tree, as reported by
// the addressing generator, into the control word of the data path:
//   X0        : START; RSUM takes the input (DIV2); no A/S result is used.
//   internal  : RSUM takes the A/S sum, R0 is written with the difference
//               (WRITE). A left child (or X1) uses RSUM as operand and
//               pushes; a right child uses R0 (SELREG) and overwrites it.
//   leaf      : the A/S sum and difference are the output pair. A left
//               leaf uses RSUM; a right leaf uses R0 and pulls the stack.
// The ASL shift is the level p of the coefficient. Combinational.
module haar_dp_ctrl
  import haar_pkg::*;
(
  input  logic            first,
  input  logic            leaf,
  input  logic            right,
  input  logic            last,
  input  logic [HAAR_SH_W-1:0] level,
  output haar_ctrl_t      ctrl
);
  always_comb begin
    ctrl        = '0;
    ctrl.start  = first;
    ctrl.last   = last;
    ctrl.shift  = first ? '0 : level;
    if (first) begin
      ctrl.div2    = 1'b1;
      ctrl.rsum_en = 1'b1;
    end else if (!leaf) begin
      ctrl.rsum_en = 1'b1;
      ctrl.selreg  = right;
      ctrl.write   = 1'b1;
      ctrl.push    = !right;
    end else begin
      ctrl.out_en  = 1'b1;
      ctrl.selreg  = right;
      ctrl.pull    = right;
    end
  end
endmodule
