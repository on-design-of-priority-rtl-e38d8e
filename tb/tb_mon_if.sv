// Self-checking testbench of mon_if, the monitoring-line receiver.
// Checks that no strobe or count appears before the start pulse, that the
// start pulse (all four single lines high together) sets `started` while a
// partial pulse does not, that ISR entry/exit strobes come three clocks after
// the pin changes, that MON_PRI is passed with two clocks of delay, and that
// the OS tick count and tick period match a tick train with a known period.
module tb_mon_if;
  import lim_pkg::*;
  logic clk = 0, rst_n = 0;
  mon_t mon_pin;
  logic [5:0] pri_pin;
  mon_t mon;
  logic [5:0] pri;
  logic started, isr_rise, isr_fall;
  logic [31:0] tick_cnt, tick_per;
  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0;

  mon_if #(.PRI_W(6)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (isr_rise) n_rise++;
    if (isr_fall) n_fall++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    mon_pin = '0; pri_pin = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n_rise = 0; n_fall = 0;
    // activity before start is ignored
    repeat (2) begin
      @(negedge clk) mon_pin.isr = 1; repeat (4) @(negedge clk); mon_pin.isr = 0;
      @(negedge clk) mon_pin.tick = 1; @(negedge clk) mon_pin.tick = 0;
    end
    repeat (5) @(negedge clk);
    chk(!started && n_rise == 0 && tick_cnt == 0,
        $sformatf("no activity before start (started=%0b rises=%0d ticks=%0d)", started, n_rise, tick_cnt));
    // three of four lines high: no start
    mon_pin = '{isr:1, tick:1, ctx:1, slack:0};
    repeat (2) @(negedge clk); mon_pin = '0; repeat (5) @(negedge clk);
    chk(!started, "partial start pulse ignored");
    // full start pulse
    mon_pin = '{isr:1, tick:1, ctx:1, slack:1};
    repeat (2) @(negedge clk); mon_pin = '0; repeat (6) @(negedge clk);
    chk(started, "started after the start pulse");
    n_rise = 0; n_fall = 0;
    // ISR entry: strobe three clocks after the pin rises
    @(negedge clk) mon_pin.isr = 1;
    for (int k = 1; k <= 6; k++) begin
      @(posedge clk); #1;
      if (isr_rise) t0 = k;
    end
    chk(t0 == 3, $sformatf("isr_rise latency %0d, expected 3", t0));
    @(negedge clk) mon_pin.isr = 0;
    for (int k = 1; k <= 6; k++) begin
      @(posedge clk); #1;
      if (isr_fall) t1 = k;
    end
    chk(t1 == 3, $sformatf("isr_fall latency %0d, expected 3", t1));
    chk(n_rise == 1 && n_fall == 1, "one strobe each");
    // priority bus: two-clock delay
    @(negedge clk) pri_pin = 6'd37;
    @(posedge clk); #1 chk(pri != 6'd37, "pri not yet through after 1 edge");
    @(posedge clk); #1 chk(pri == 6'd37, "pri through after 2 edges");
    // tick train with a 20-clock period
    for (int k = 0; k < 5; k++) begin
      @(negedge clk) mon_pin.tick = 1;
      @(negedge clk) mon_pin.tick = 0;
      repeat (18) @(negedge clk);
    end
    repeat (5) @(negedge clk);
    chk(tick_cnt == 5, $sformatf("tick_cnt %0d, expected 5", tick_cnt));
    chk(tick_per == 20, $sformatf("tick_per %0d, expected 20", tick_per));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
