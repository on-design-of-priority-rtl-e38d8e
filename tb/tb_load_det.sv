// Self-checking testbench of load_det, the floating-window limiter.
// Random forward strobes are fed in; a reference keeps the times of all
// forwards and, every clock, counts those younger than WIN_CYC clocks.
// `underload` must equal "count < WIN_MAX" and in_win the count capped at
// WIN_MAX. Also checks that after WIN_MAX back-to-back forwards the window
// opens again exactly WIN_CYC clocks after the oldest one.
module tb_load_det;
  localparam int K = 3, W = 40;
  logic clk = 0, rst_n = 0, fwd, underload;
  logic [1:0] in_win;
  int checks = 0, failures = 0;
  int times[$];
  int now = 0;

  load_det #(.WIN_MAX(K), .WIN_CYC(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fwd = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int cnt;
      @(negedge clk);
      cnt = 0;
      foreach (times[i]) if (now - times[i] < W) cnt++;
      checks++;
      if (underload !== (cnt < K) || int'(in_win) != ((cnt < K) ? cnt : K)) begin
        failures++;
        $display("FAIL: t=%0d cnt=%0d underload=%0b in_win=%0d", t, cnt, underload, in_win);
      end
      // forward only when allowed, as the CEU would, at a random rate
      fwd = underload && ($urandom_range(0, 3) == 0);
      if (t >= 1500 && t < 1510) fwd = underload;   // burst
      @(posedge clk);
      now++;
      if (fwd) times.push_back(now);
    end
    // exact reopening time
    @(negedge clk) fwd = 0;
    repeat (W + 2) @(negedge clk);
    for (int k = 0; k < K; k++) begin
      fwd = 1; @(negedge clk);
    end
    fwd = 0;
    checks++;
    if (underload) begin failures++; $display("FAIL: window not full after burst"); end
    repeat (W - K) @(negedge clk);   // oldest forward is now W-1 clocks old
    checks++;
    if (underload) begin failures++; $display("FAIL: window reopened early"); end
    @(negedge clk);
    checks++;
    if (!underload) begin failures++; $display("FAIL: window did not reopen at W"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
