// tb_haar_ifht_proc: self-checking testbench of the 1-D IFHT processor.
//
// Runs, back to back: the 8-point worked example (coefficients
// 14 20 -5 -15 2 5 5 -16, which must give 4 2 8 3 -2 -7 -5 11), then for
// every length N = 8 ... 1024 one transform of the forward transform of a
// random signal (exact reconstruction expected) and one of random
// coefficients (checked against the modular reference). The length changes
// between consecutive transforms without a gap. It checks the address
// sequence against an independent preorder walk, every output sample, the
// end-of-transform flag, the N-cycle throughput and the latency of log2 N + 1
// cycles to the first output pair. A final phase repeats some transforms
// with the clock enable dropped at random.
module tb_haar_ifht_proc;
  import haar_ref_pkg::*;

  localparam int IN_W = 16, OUT_W = 16, ACC_W = 26;

  logic clk = 0, rst_n = 0, en = 0;
  logic [3:0] log2n = 3;
  logic signed [IN_W-1:0] x_in = '0;
  logic [9:0] add;
  logic signed [OUT_W-1:0] x_even, x_odd;
  logic valid, ms;

  int checks = 0, failures = 0;
  int cyc = 0, pcyc = 0;

  haar_ifht_proc dut (.*);

  always #5 clk = !clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (en) pcyc <= pcyc + 1;
  end

  initial begin
    #(5_000_000 * 10);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cyc);
    end
  endtask

  // Expected output stream.
  int exp_even[$], exp_odd[$];
  bit exp_last[$];
  int first_pcyc[$];           // processor cycle at which X0 of each transform was taken
  int first_lat[$];            // log2 N of each transform
  bit measure = 1;             // latency checked while en is held high
  int pairs_seen = 0;
  bit draining = 0;            // after the last transform: further outputs ignored

  always @(posedge clk) if (rst_n && en && valid) begin
    int e, o; bit l;
    if (exp_even.size() == 0) check(draining, "unexpected output");
    else begin
      e = exp_even.pop_front(); o = exp_odd.pop_front(); l = exp_last.pop_front();
      check(x_even == OUT_W'(e), $sformatf("even got %0d exp %0d", x_even, e));
      check(x_odd  == OUT_W'(o), $sformatf("odd got %0d exp %0d", x_odd, o));
      check(ms == l, "ms flag");
    end
  end

  // Latency: the first pair of each transform is valid log2 N + 1 processor
  // cycles after its X0 was taken.
  int tr_out = 0;
  always @(posedge clk) if (rst_n && en && valid) begin
    if (pairs_seen == 0 && first_pcyc.size() > 0) begin
      int p0, ln;
      p0 = first_pcyc.pop_front(); ln = first_lat.pop_front();
      if (measure) check(pcyc - p0 == ln + 1,
                         $sformatf("latency %0d, expected %0d", pcyc - p0, ln + 1));
    end
    pairs_seen = ms ? 0 : pairs_seen + 1;
  end

  // Run one transform: X in natural index order.
  int last_ref[];   // reference output of the latest transform, natural order

  task automatic run_transform(input int n, input longint X[], input bit stall);
    int N = 1 << n;
    // expected outputs
    last_ref = new[N];
    for (int i = 0; i < N; i++) begin
      longint s = 0;
      for (int k = 0; k < N; k++) s += a_k(k) * haar_h(k, i, n) * X[k];
      last_ref[i] = int'(wrap(wrap(s, ACC_W) >>> n, OUT_W));
    end
    for (int i = 0; i < N; i += 2) begin
      exp_even.push_back(last_ref[i]);
      exp_odd.push_back(last_ref[i + 1]);
      exp_last.push_back(i == N - 2);
    end
    for (int t = 0; t < N; t++) begin
      @(negedge clk);
      while (stall && ($urandom % 3 == 0)) begin
        en = 0;
        @(negedge clk);
      end
      en    = 1;
      log2n = 4'(n);
      check(add == 10'(preorder_k(t, n)), $sformatf("address t=%0d got %0d", t, add));
      x_in  = IN_W'(X[preorder_k(t, n)]);
      if (t == 0) begin
        first_pcyc.push_back(pcyc);
        first_lat.push_back(n);
      end
    end
  endtask

  initial begin
    longint X[];
    int n, N, p_start;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Worked example, N = 8.
    X = new[8];
    X = '{14, 20, -5, -15, 2, 5, 5, -16};
    p_start = pcyc;
    run_transform(3, X, 0);
    begin
      int want[8] = '{4, 2, 8, 3, -2, -7, -5, 11};
      for (int i = 0; i < 8; i++) check(last_ref[i] == want[i], "reference of the example");
    end

    for (n = 3; n <= 10; n++) begin
      longint x[];
      N = 1 << n;
      // forward transform of a random signal small enough for IN_W
      x = new[N];
      X = new[N];
      for (int i = 0; i < N; i++) x[i] = longint'($urandom % 61) - 30;
      for (int k = 0; k < N; k++) begin
        X[k] = 0;
        for (int i = 0; i < N; i++) X[k] += haar_h(k, i, n) * x[i];
      end
      run_transform(n, X, 0);
      // the reference must reproduce x exactly
      for (int i = 0; i < N; i++)
        check(last_ref[i] == int'(x[i]), "exact reconstruction");
      // random coefficients
      for (int k = 0; k < N; k++) X[k] = longint'($signed(16'($urandom)));
      run_transform(n, X, 0);
    end
    // throughput: back-to-back transforms without a gap
    @(negedge clk);
    en = 0;
    check(pcyc - p_start == 8 + 2 * ((1 << 11) - 8), "cycles per transform");

    // Random clock-enable stalls.
    measure = 0;
    for (n = 3; n <= 6; n++) begin
      N = 1 << n;
      X = new[N];
      for (int k = 0; k < N; k++) X[k] = longint'($signed(16'($urandom)));
      run_transform(n, X, 1);
    end
    // drain: wait until the last pair is out
    @(negedge clk);
    while (exp_even.size() != 0 && cyc < 100000) begin
      en = 1; x_in = '0;
      @(negedge clk);
    end
    draining = 1;
    log2n = 3;
    x_in  = '0;
    repeat (2) @(negedge clk);
    check(exp_even.size() == 0, "all outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
