// End-to-end testbench of int_limiter at reduced size (4 sources, 8
// priority levels, 3-deep buffer, at most 2 forwards per 300-clock window).
//
// A small MCU model answers every forwarded INT: three clocks after a pin
// rises it raises MON_INT for ISR_LEN clocks (its ISR). The test script
// drives the MCU's running-task priority, MON_SLACK, MON_CTX and an OS-tick
// ISR, and checks in phases:
//   A  nothing is forwarded before the start pulse; a request caught before
//      start goes out after it; latency INT line -> MCU pin is 5 clocks;
//   B  with a high-priority task running, a low-priority INT is let through
//      by the window twice, then stalled; a higher-priority INT overtakes it
//      (priority condition); MON_SLACK then releases the stalled one;
//   C  requests beyond the buffer depth overflow; the stored ones come out in
//      order with their data once the task priority drops;
//   D  nothing is forwarded during an ISR (an OS-tick ISR here) or a
//      context switch;
//   E  a level source whose line stays high is forwarded again after the ISR.
// Every forward is compared with an expected list of (source, data,
// releasing condition). Each mechanism is counted and must occur.
module tb_int_limiter;
  import lim_pkg::*;
  localparam int N = 4, NP = 8, D = 3, DW = 8, TW = 16, K = 2, W = 300;
  localparam int ISR_LEN = 20;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] int_in; logic [N-1:0][DW-1:0] int_data;
  logic cfg_we; logic [1:0] cfg_idx; logic [2:0] cfg_pri; sens_e cfg_sens;
  mon_t mon_pin; logic [2:0] mon_pri_pin;
  logic [N-1:0] int_out; logic fwd_valid; logic [1:0] fwd_idx;
  logic [DW-1:0] fwd_data; logic [TW-1:0] fwd_ts;
  logic started, stall; logic [2:0] fwd_cond; logic [N-1:0] ovf;
  logic [N-1:0][1:0] pend; logic [1:0] in_win; logic [31:0] tick_cnt, tick_per;

  int checks = 0, failures = 0;
  logic isr_fwd = 0, isr_os = 0;
  // expected and observed forwards: {source, data, cond}
  logic [12:0] exp_q[$], got_q[$];
  logic [2:0]  cond_q[$];
  // mechanism counters
  int n_prio = 0, n_load = 0, n_slack = 0, n_stall = 0, n_ovf = 0;
  int n_held_start = 0, n_isr_block = 0, n_ctx_block = 0, n_level_re = 0;

  int_limiter #(.N_INT(N), .NUM_PRI(NP), .DEPTH(D), .DATA_W(DW), .TS_W(TW),
                .WIN_MAX(K), .WIN_CYC(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // MCU model: ISR for each forwarded INT
  initial forever begin
    @(posedge clk);
    if (|int_out) begin
      repeat (3) @(negedge clk);
      isr_fwd = 1;
      repeat (ISR_LEN) @(negedge clk);
      isr_fwd = 0;
      @(negedge clk);
      wait (int_out == 0);
    end
  end
  always_comb mon_pin.isr = isr_fwd | isr_os;

  always @(posedge clk) if (rst_n) begin
    if (fwd_cond != 0) cond_q.push_back(fwd_cond);
    if (fwd_valid) got_q.push_back({fwd_idx, fwd_data, 3'b000});
    if (fwd_cond == 3'b001) n_prio++;
    if (fwd_cond == 3'b010) n_load++;
    if (fwd_cond == 3'b100) n_slack++;
    if (|ovf) n_ovf++;
  end

  task automatic fire(input int s, input logic [DW-1:0] d);
    @(negedge clk) begin int_in[s] = 1; int_data[s] = d; end
    @(negedge clk) int_in[s] = 0;
  endtask

  task automatic expect_fwd(input int s, input logic [DW-1:0] d, input logic [2:0] c);
    exp_q.push_back({2'(s), d, c});
  endtask

  // wait until nothing is pending, in flight or in service
  task automatic settle(input bit ignore_pend = 0);
    int quiet = 0;
    while (quiet < 8) begin
      @(negedge clk);
      if ((ignore_pend || pend == '0) && int_out == 0 && !mon_pin.isr && !dut.u_ifu.v1 && !dut.u_ifu.v2) quiet++;
      else quiet = 0;
    end
  endtask

  task automatic config_src(input int s, input int p, input sens_e se);
    @(negedge clk) begin cfg_we = 1; cfg_idx = 2'(s); cfg_pri = 3'(p); cfg_sens = se; end
    @(negedge clk) cfg_we = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, seen;
    int_in = '0; int_data = '0; cfg_we = 0; cfg_idx = 0; cfg_pri = 0; cfg_sens = SENS_EDGE;
    mon_pin.tick = 0; mon_pin.ctx = 0; mon_pin.slack = 0; mon_pri_pin = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    config_src(0, 6, SENS_EDGE);
    config_src(1, 2, SENS_EDGE);
    config_src(2, 4, SENS_LEVEL);
    config_src(3, 1, SENS_EDGE);

    // ---- A: start handshake and latency
    fire(1, 8'h11);
    repeat (30) @(negedge clk);
    chk(!started && int_out == 0 && pend[1] == 1, "held before start");
    if (!started && pend[1] == 1 && int_out == 0) n_held_start++;
    @(negedge clk) begin isr_os = 1; mon_pin.tick = 1; mon_pin.ctx = 1; mon_pin.slack = 1; end
    @(negedge clk) begin isr_os = 0; mon_pin.tick = 0; mon_pin.ctx = 0; mon_pin.slack = 0; end
    expect_fwd(1, 8'h11, 3'b001);
    settle();
    chk(started, "started");
    @(negedge clk) begin int_in[1] = 1; int_data[1] = 8'h12; end
    lat = 0;
    while (int_out[1] == 0 && lat < 20) begin @(posedge clk); #1; lat++; end
    chk(lat == 5, $sformatf("INT line to MCU pin latency %0d clocks, expected 5", lat));
    @(negedge clk) int_in[1] = 0;
    expect_fwd(1, 8'h12, 3'b001);
    settle();
    repeat (W) @(negedge clk);              // empty the window

    // ---- B: window, stall, priority overtake, slack release
    mon_pri_pin = 3'd5;
    repeat (4) @(negedge clk);
    fire(3, 8'h31); expect_fwd(3, 8'h31, 3'b010); settle();
    fire(3, 8'h32); expect_fwd(3, 8'h32, 3'b010); settle();
    fire(3, 8'h33);
    seen = 0;
    repeat (40) begin @(negedge clk); if (stall) seen++; end
    chk(seen > 30 && pend[3] == 1 && int_out == 0, "low-priority INT stalled by full window");
    if (seen > 30) n_stall++;
    fire(0, 8'h01); expect_fwd(0, 8'h01, 3'b001);
    settle(1);
    chk(pend[3] == 0 ? 0 : 1, "stalled INT still waiting after the overtake");
    @(negedge clk) mon_pin.slack = 1;
    expect_fwd(3, 8'h33, 3'b100);
    settle();
    @(negedge clk) mon_pin.slack = 0;

    // ---- C: overflow and ordered release
    mon_pri_pin = 3'd7;
    repeat (4) @(negedge clk);
    fire(3, 8'h41); fire(3, 8'h42); fire(3, 8'h43); fire(3, 8'h44);
    repeat (10) @(negedge clk);
    chk(pend[3] == 2'd3 && n_ovf == 1, $sformatf("overflow: pend=%0d ovf=%0d", pend[3], n_ovf));
    repeat (W) @(negedge clk);
    // window has room again, but task priority 7 -> underload releases 2
    expect_fwd(3, 8'h41, 3'b010);
    expect_fwd(3, 8'h42, 3'b010);
    repeat (150) @(negedge clk);
    chk(pend[3] == 2'd1, $sformatf("window let two through, pend=%0d", pend[3]));
    mon_pri_pin = 3'd0;                      // idle task: priority condition
    expect_fwd(3, 8'h43, 3'b001);
    settle();

    // ---- D: no forward during an ISR or a context switch
    @(negedge clk) begin isr_os = 1; mon_pin.tick = 1; end
    @(negedge clk) mon_pin.tick = 0;
    repeat (5) @(negedge clk);
    fire(0, 8'h51);
    seen = 0;
    repeat (30) begin @(negedge clk); if (int_out != 0) seen++; end
    chk(seen == 0 && pend[0] == 1, "no forward during an ISR");
    if (seen == 0 && pend[0] == 1) n_isr_block++;
    @(negedge clk) isr_os = 0;
    expect_fwd(0, 8'h51, 3'b001);
    settle();
    chk(tick_cnt == 1, $sformatf("OS tick count %0d", tick_cnt));
    @(negedge clk) mon_pin.ctx = 1;
    repeat (3) @(negedge clk);
    fire(0, 8'h52);
    seen = 0;
    repeat (30) begin @(negedge clk); if (int_out != 0) seen++; end
    chk(seen == 0 && pend[0] == 1, "no forward during a context switch");
    if (seen == 0 && pend[0] == 1) n_ctx_block++;
    @(negedge clk) mon_pin.ctx = 0;
    expect_fwd(0, 8'h52, 3'b001);
    settle();

    // ---- E: level source stays high across one ISR
    @(negedge clk) begin int_in[2] = 1; int_data[2] = 8'h61; end
    expect_fwd(2, 8'h61, 3'b001);
    wait (isr_fwd == 1);
    wait (isr_fwd == 0);                   // line still high after the ISR
    expect_fwd(2, 8'h61, 3'b001);
    wait (isr_fwd == 1);
    @(negedge clk) int_in[2] = 0;          // serviced in the second ISR
    settle();
    n_level_re = 0;
    foreach (got_q[i]) if (got_q[i][12:11] == 2'd2) n_level_re++;
    n_level_re = n_level_re - 1;

    // ---- compare forwards with the expected list
    chk(got_q.size() == exp_q.size() && cond_q.size() == exp_q.size(),
        $sformatf("forward count %0d/%0d, expected %0d", got_q.size(), cond_q.size(), exp_q.size()));
    foreach (exp_q[i]) if (i < got_q.size() && i < cond_q.size()) begin
      chk(got_q[i][12:3] == exp_q[i][12:3] && cond_q[i] == exp_q[i][2:0],
          $sformatf("forward %0d: src %0d data %h cond %b, expected src %0d data %h cond %b", i,
                    got_q[i][12:11], got_q[i][10:3], cond_q[i],
                    exp_q[i][12:11], exp_q[i][10:3], exp_q[i][2:0]));
    end
    $display("mechanisms: held_before_start=%0d priority=%0d underload=%0d slack=%0d stall=%0d overflow=%0d isr_block=%0d ctx_block=%0d level_retrigger=%0d",
             n_held_start, n_prio, n_load, n_slack, n_stall, n_ovf, n_isr_block, n_ctx_block, n_level_re);
    chk(n_held_start > 0, "mechanism: held before start");
    chk(n_prio > 0, "mechanism: priority condition");
    chk(n_load > 0, "mechanism: underload condition");
    chk(n_slack > 0, "mechanism: slack condition");
    chk(n_stall > 0, "mechanism: stall");
    chk(n_ovf > 0, "mechanism: buffer overflow");
    chk(n_isr_block > 0, "mechanism: blocked during ISR");
    chk(n_ctx_block > 0, "mechanism: blocked during context switch");
    chk(n_level_re > 0, "mechanism: level re-trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
