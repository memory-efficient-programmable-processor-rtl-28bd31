// haar_addr_gen: addressing generator of the IFHT processor.
//
// The processor reads its input coefficients from an external memory in the
// minimum-latency order: the preorder listing of the coefficient tree in
// which X0 is the root, X1 its only child and X(2k), X(2k+1) the children of
// Xk, the leaves being X(N/2) ... X(N-1). For N = 8 the order is
// X0 X1 X2 X4 X5 X3 X6 X7. This block drives the index k of the coefficient
// of the current cycle on the address lines add (ADD_0 ... ADD_9; only the
// low log2 N lines are ever non-zero) and reports what the data-path
// control needs: the tree level p of k, whether k is X0 (first), a leaf, a
// right child (odd, k > 1) and the last coefficient of the transform.
//
// Structure, as in the original control unit: everything is derived from a
// counter t of the cycles of the transform. An initial stage gives the
// 8-point sequence straight from the three low counter bits; a cascade of
// elemental modules (haar_ctrl_stage) forms the 16-, 32-, ... 1024-point
// sequences, each from the one below it, and a multiplexer picks the
// sequence of the programmed length. Extending the range to longer
// transforms adds one elemental module per doubling.
//
// Timing: t, add and the flags belong to the current processor cycle and
// advance after a rising clock edge with en high. The counter returns to 0
// after N - 1 so transforms follow back to back. log2n (clamped to 3..10) is
// sampled on the edge that takes X0 and holds for the whole transform.
// Asynchronous active-low reset returns to X0.
module haar_addr_gen
  import haar_pkg::*;
#(
  parameter int unsigned LOG2_NMAX = haar_pkg::HAAR_LOG2_NMAX,
  parameter int unsigned LOG2_NMIN = haar_pkg::HAAR_LOG2_NMIN
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic [HAAR_SH_W-1:0] log2n,
  output logic [LOG2_NMAX-1:0] add,
  output logic [HAAR_SH_W-1:0] level,
  output logic [HAAR_SH_W-1:0] n_cur,
  output logic                 first,
  output logic                 leaf,
  output logic                 right,
  output logic                 last
);
  localparam int unsigned NST = LOG2_NMAX - 3;    // elemental modules (7 for 1024)

  logic [LOG2_NMAX-1:0] t, t_last;
  logic [HAAR_SH_W-1:0] lg_clamped;
  logic [LOG2_NMAX-1:0] k_s  [NST+1];
  logic [HAAR_SH_W-1:0] lv_s [NST+1];

  always_comb begin
    if (log2n < HAAR_SH_W'(LOG2_NMIN))      lg_clamped = HAAR_SH_W'(LOG2_NMIN);
    else if (log2n > HAAR_SH_W'(LOG2_NMAX)) lg_clamped = HAAR_SH_W'(LOG2_NMAX);
    else                                    lg_clamped = log2n;
  end

  // Cycle counter of the transform.
  assign t_last = LOG2_NMAX'((1 << n_cur) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t     <= '0;
      n_cur <= HAAR_SH_W'(LOG2_NMIN);
    end else if (en) begin
      t <= (t == t_last) ? '0 : t + 1'b1;
      if (t == '0) n_cur <= lg_clamped;
    end
  end

  // Initial stage: the 8-point sequence X0 X1 X2 X4 X5 X3 X6 X7.
  always_comb begin
    unique case (t[2:0])
      3'd0: begin k_s[0] = LOG2_NMAX'(0); lv_s[0] = 4'd0; end
      3'd1: begin k_s[0] = LOG2_NMAX'(1); lv_s[0] = 4'd0; end
      3'd2: begin k_s[0] = LOG2_NMAX'(2); lv_s[0] = 4'd1; end
      3'd3: begin k_s[0] = LOG2_NMAX'(4); lv_s[0] = 4'd2; end
      3'd4: begin k_s[0] = LOG2_NMAX'(5); lv_s[0] = 4'd2; end
      3'd5: begin k_s[0] = LOG2_NMAX'(3); lv_s[0] = 4'd1; end
      3'd6: begin k_s[0] = LOG2_NMAX'(6); lv_s[0] = 4'd2; end
      default: begin k_s[0] = LOG2_NMAX'(7); lv_s[0] = 4'd2; end
    endcase
  end

  // Elemental modules: stage i turns the 2**(i+2) sequence into 2**(i+3).
  for (genvar i = 1; i <= NST; i++) begin : g_stage
    haar_ctrl_stage #(.AW(LOG2_NMAX), .LW(HAAR_SH_W), .J(i + 2)) u_stage (
      .clk, .rst_n, .en, .t,
      .k_in(k_s[i-1]), .lv_in(lv_s[i-1]), .k_out(k_s[i]), .lv_out(lv_s[i])
    );
  end

  // Multiplexer: the sequence of the programmed length.
  localparam int unsigned SELW = $clog2(NST + 1);
  logic [SELW-1:0] sel;
  assign sel   = SELW'(n_cur - HAAR_SH_W'(3));
  assign add   = k_s[sel];
  assign level = lv_s[sel];

  assign first = (t == '0);
  assign leaf  = !first && (level == n_cur - 1'b1);
  assign right = add[0] && (add != LOG2_NMAX'(1));
  assign last  = (t == t_last);
endmodule
