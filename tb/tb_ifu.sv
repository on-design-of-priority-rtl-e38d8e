// Self-checking testbench of ifu, the forward unit.
// Checks: an edge-sensitive grant gives a one-clock pulse on the granted pin
// exactly three edges after the grant clock (one registered CEU clock plus
// the unit's two), with the buffer entry on fwd_data/fwd_ts; `ready` is low
// while a grant is in flight; a level-sensitive grant holds its pin and keeps
// `ready` low until ISR entry is seen; grants given whenever the unit is
// ready produce pins three clocks apart.
module tb_ifu;
  import lim_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic grant; logic [2:0] gidx; sens_e gsens;
  logic [7:0] sb_data; logic [15:0] sb_ts; logic isr_rise, ready;
  logic [N-1:0] int_out; logic fwd_valid; logic [2:0] fwd_idx;
  logic [7:0] fwd_data; logic [15:0] fwd_ts;
  int checks = 0, failures = 0;

  ifu #(.N(N), .DATA_W(8), .TS_W(16)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // stands in for the stall buffer: entry of the grant appears one edge later
  always_ff @(posedge clk) if (grant) begin
    sb_data <= 8'h30 + 8'(gidx);
    sb_ts   <= 16'h1000 + 16'(gidx);
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    grant = 0; gidx = 0; gsens = SENS_EDGE; isr_rise = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(ready && int_out == 0, "idle after reset");
    for (int s = 0; s < N; s++) begin
      int lat, width;
      @(negedge clk) begin grant = 1; gidx = 3'(s); gsens = SENS_EDGE; end
      @(negedge clk) grant = 0;
      chk(!ready, "busy after grant");
      lat = 1; width = 0;
      while (int_out == 0 && lat < 10) begin @(negedge clk); lat++; end
      chk(lat == 3, $sformatf("edge forward latency %0d, expected 3", lat));
      chk(int_out == N'(1) << s, "pin of granted source");
      chk(fwd_valid && fwd_idx == 3'(s) && fwd_data == 8'h30 + 8'(s) && fwd_ts == 16'h1000 + 16'(s),
          "forwarded data and timestamp");
      while (int_out != 0 && width < 10) begin @(negedge clk); width++; end
      chk(width == 1, $sformatf("edge pulse width %0d", width));
      chk(ready, "ready after pulse");
    end
    // level
    @(negedge clk) begin grant = 1; gidx = 3'd5; gsens = SENS_LEVEL; end
    @(negedge clk) grant = 0;
    repeat (10) @(negedge clk);
    chk(int_out == 8'b0010_0000 && !ready, "level held, unit busy");
    isr_rise = 1; @(negedge clk) isr_rise = 0;
    chk(int_out == 0 && ready, "level released on ISR entry");
    // back-to-back: grant whenever ready; pulses must be 3 clocks apart
    begin
      int last, gaps_ok, n;
      last = -1; gaps_ok = 1; n = 0;
      for (int t = 0; t < 40; t++) begin
        @(negedge clk);
        if (int_out != 0) begin
          if (last >= 0 && t - last != 3) gaps_ok = 0;
          last = t; n++;
        end
        grant = ready; gidx = 3'(t % N); gsens = SENS_EDGE;
      end
      grant = 0;
      chk(gaps_ok && n >= 12, $sformatf("back-to-back forwards every 3 clocks (%0d seen)", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
