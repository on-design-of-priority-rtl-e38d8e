// Full-size testbench of int_limiter at its default parameters (64 sources,
// 64 priority levels, 8-deep buffer per source, window of 4 forwards per
// 100000 clocks).
// One complete operation: all 64 sources get distinct priorities (source i
// gets (37*i) mod 64) through the setup port, the MCU announces its start,
// then every source fires in the same clock with its own data while the MCU
// idles at priority 0. A small MCU model runs a 16-clock ISR per forwarded
// INT. Expected: the 63 sources with priority above 0 are forwarded one by one
// in falling priority order, released by the priority condition; the source
// with priority 0 then finds the window full (4 forwards within 100000
// clocks) and is stalled until MON_SLACK rises, which releases it. Each
// forward's source, data and releasing condition is checked, as is the
// five-clock latency of the first forward.
module tb_int_limiter_full;
  import lim_pkg::*;
  localparam int N = 64, DW = 8, TW = 32;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] int_in; logic [N-1:0][DW-1:0] int_data;
  logic cfg_we; logic [5:0] cfg_idx; logic [5:0] cfg_pri; sens_e cfg_sens;
  mon_t mon_pin; logic [5:0] mon_pri_pin;
  logic [N-1:0] int_out; logic fwd_valid; logic [5:0] fwd_idx;
  logic [DW-1:0] fwd_data; logic [TW-1:0] fwd_ts;
  logic started, stall; logic [2:0] fwd_cond; logic [N-1:0] ovf;
  logic [N-1:0][3:0] pend; logic [2:0] in_win; logic [31:0] tick_cnt, tick_per;
  int checks = 0, failures = 0;
  logic isr_fwd = 0;
  int got_src[$]; logic [DW-1:0] got_data[$]; logic [2:0] got_cond[$];

  int_limiter dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int pri_of(input int i);
    return (37 * i) % 64;
  endfunction

  initial forever begin
    @(posedge clk);
    if (|int_out) begin
      repeat (3) @(negedge clk);
      isr_fwd = 1;
      repeat (16) @(negedge clk);
      isr_fwd = 0;
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (fwd_cond != 0) got_cond.push_back(fwd_cond);
    if (fwd_valid) begin got_src.push_back(int'(fwd_idx)); got_data.push_back(fwd_data); end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, t;
    int_in = '0; int_data = '0; cfg_we = 0; cfg_idx = 0; cfg_pri = 0; cfg_sens = SENS_EDGE;
    mon_pin = '0; mon_pri_pin = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk) begin cfg_we = 1; cfg_idx = 6'(i); cfg_pri = 6'(pri_of(i)); end
    end
    @(negedge clk) cfg_we = 0;
    @(negedge clk) begin mon_pin.tick = 1; mon_pin.ctx = 1; mon_pin.slack = 1; end
    mon_pin.isr = 1;
    @(negedge clk) mon_pin = '0;
    repeat (10) @(negedge clk);
    chk(started, "started");
    @(negedge clk) for (int i = 0; i < N; i++) begin int_in[i] = 1; int_data[i] = DW'(i + 100); end
    lat = 0;
    while (int_out == 0 && lat < 20) begin @(posedge clk); #1; lat++; end
    chk(lat == 5, $sformatf("first forward latency %0d, expected 5", lat));
    @(negedge clk) int_in = '0;
    // wait for the 63 priority forwards
    t = 0;
    while (got_src.size() < N - 1 && t < 100000) begin @(negedge clk); t++; end
    repeat (200) @(negedge clk);
    chk(got_src.size() == N - 1 && stall && pend[0] == 1, "source with priority 0 stalled");
    @(negedge clk) mon_pin.slack = 1;
    t = 0;
    while (got_src.size() < N && t < 1000) begin @(negedge clk); t++; end
    chk(got_src.size() == N && got_cond.size() == N, $sformatf("%0d forwards", got_src.size()));
    for (int k = 0; k < N && k < got_src.size() && k < got_cond.size(); k++) begin
      int ep, es;
      ep = 63 - k;                 // priorities 63..1, then 0
      es = 0;
      for (int i = 0; i < N; i++) if (pri_of(i) == ep) es = i;
      chk(got_src[k] == es && got_data[k] == DW'(es + 100) &&
          got_cond[k] == ((ep > 0) ? 3'b001 : 3'b100),
          $sformatf("forward %0d: src %0d data %0d cond %b, expected src %0d", k,
                    got_src[k], got_data[k], got_cond[k], es));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
