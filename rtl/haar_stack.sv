// haar_stack: the STACK of the IFHT processor, DEPTH registers R0..R(DEPTH-1)
// holding the A/S differences that wait for the right-hand branch of the
// coefficient tree.
//
// R0 is the top; the registers form a bidirectional shift register:
//   write & push        : R(i+1) <= R(i), R0 <= d           (push)
//   write & !push       : R0 <= d, the rest unchanged       (replace top)
//   pull  & !write      : R(i) <= R(i+1), R(DEPTH-1) <= 0   (pull)
// Replacing the top is what a right-hand internal node does: it consumes R0
// and stores its own difference in the same register. A transform of length
// N uses log2 N - 1 registers, so DEPTH = 9 serves N up to 1024. The
// occupancy count is kept for the assertions and for observation only.
// All updates happen on a rising clock edge with en high; asynchronous
// active-low reset clears the registers.
module haar_stack #(
  parameter int unsigned W     = haar_pkg::HAAR_ACC_W,
  parameter int unsigned DEPTH = haar_pkg::HAAR_LOG2_NMAX - 1
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         en,
  input  logic                         write,
  input  logic                         push,
  input  logic                         pull,
  input  logic signed [W-1:0]          d,
  output logic signed [W-1:0]          top,
  output logic [$clog2(DEPTH+1)-1:0]   count
);
  logic signed [W-1:0] r [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) r[i] <= '0;
      count <= '0;
    end else if (en) begin
      if (write && push) begin
        for (int i = DEPTH-1; i > 0; i--) r[i] <= r[i-1];
        r[0]  <= d;
        count <= count + 1'b1;
      end else if (write) begin
        r[0] <= d;
      end else if (pull) begin
        for (int i = 0; i < DEPTH-1; i++) r[i] <= r[i+1];
        r[DEPTH-1] <= '0;
        count      <= count - 1'b1;
      end
    end
  end

  assign top = r[0];

  // A push may not overflow the stack, a pull or a replace needs an entry.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (en && write && push) |-> (32'(count) < DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    (en && (pull || (write && !push))) |-> (count != 0));
endmodule
