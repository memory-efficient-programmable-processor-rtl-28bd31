// tb_haar_ifht_chip: checks the 1-D IFHT chip with its multiplexed output
// bus. The coefficient memory is modelled with a registered read (one clk
// of delay after the address). Transforms of lengths 8, 16, 64, 256 and
// 1024 of random coefficients run back to back; every sample on the bus is
// compared, in natural order, with the reference, ms must mark the last two
// samples of each transform, and the chip must deliver one sample per clk
// while eo is high and N samples every 2N clk cycles. run is held low for a
// while first: nothing may come out and the address must stay at X0.
module tb_haar_ifht_chip;
  import haar_ref_pkg::*;
  localparam int ACC_W = 26;
  int checks = 0, failures = 0, cyc = 0;
  logic clk = 0, rst_n = 0, run = 0;
  logic [3:0] log2n;
  logic signed [15:0] x_in;
  logic [9:0] add;
  logic signed [15:0] dout;
  logic eo, ms;
  always #5 clk = !clk;

  haar_ifht_chip dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", s, cyc);
    end
  endtask

  localparam int NT = 5;
  int lens[NT] = '{3, 4, 6, 8, 10};
  logic signed [15:0] coef [NT][1024];
  int exp_q[$];
  bit exp_ms[$];
  int tr = 0;           // transform whose coefficients are being read
  int eo_cycles = 0, first_eo = 0;

  // Registered-read coefficient memory; the transform index advances when
  // the chip leaves the last coefficient.
  logic [9:0] add_q = '0;
  bit  wrap_now;
  int  cur;
  always_comb begin
    wrap_now = (add_q == 10'((1 << lens[tr < NT ? tr : NT-1]) - 1)) && (add == 0);
    cur      = (tr + int'(wrap_now)) < NT ? tr + int'(wrap_now) : NT - 1;
  end
  always_ff @(posedge clk) begin
    x_in  <= coef[cur][add];
    add_q <= add;
    if (wrap_now) tr <= tr + 1;
  end
  assign log2n = 4'(lens[cur]);

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && eo) begin
      if (eo_cycles == 0) first_eo = cyc;
      eo_cycles++;
      if (exp_q.size() == 0) chk(0, "unexpected sample");
      else begin
        int e; bit m;
        e = exp_q.pop_front(); m = exp_ms.pop_front();
        chk(dout == 16'(e), $sformatf("sample %0d exp %0d", dout, e));
        chk(ms == m, "ms");
      end
    end
  end

  initial begin
    int total = 0, t0;
    for (int t = 0; t < NT; t++) begin
      int n, N;
      n = lens[t]; N = 1 << n;
      total += 2 * N;
      for (int k = 0; k < N; k++) coef[t][k] = 16'($urandom);
      for (int i = 0; i < N; i++) begin
        longint s;
        s = 0;
        for (int k = 0; k < N; k++) s += a_k(k) * haar_h(k, i, n) * longint'(coef[t][k]);
        exp_q.push_back(int'(wrap(wrap(s, ACC_W) >>> n, 16)));
        exp_ms.push_back(i >= N - 2);
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (20) begin
      @(negedge clk);
      chk(!eo && add == 0, "idle while run is low");
    end
    run = 1;
    t0 = cyc;
    while (exp_q.size() != 0) @(negedge clk);
    chk(eo_cycles == total / 2, "one sample per bus cycle");
    // back to back: the last pair follows the last coefficient by one
    // processor cycle (two bus cycles)
    chk(cyc - t0 == total + 2, $sformatf("total bus cycles %0d", cyc - t0));
    // the first sample appears log2 N + 1 processor cycles after run
    chk(first_eo - t0 == 2 * (lens[0] + 1), $sformatf("first sample at %0d", first_eo - t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
