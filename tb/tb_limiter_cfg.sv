// One configuration of the limiter under a fixed scenario, used by
// tb_table1 (not a testbench on its own).
// All N sources get priority (37*i) mod NP, the MCU starts and idles at
// task priority 0, and every source fires in the same clock with its own
// data. A small MCU model runs a 16-clock ISR per forwarded INT. The
// expected forward order is falling priority, ties by source index; sources
// with priority above 0 are released by the priority condition, those with
// priority 0 by the window while fewer than 4 forwards have been made, and
// the rest stall until MON_SLACK is raised. Also checks the five-clock
// latency from INT line to MCU pin. Reports its check and failure counts.
module tb_limiter_cfg
  import lim_pkg::*;
#(
  parameter int N  = 4,
  parameter int NP = 4
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int PW = (NP > 1) ? $clog2(NP) : 1;
  localparam int IW = (N > 1) ? $clog2(N) : 1;
  localparam int DW = 16, K = 4;
  logic rst_n;
  logic [N-1:0] int_in; logic [N-1:0][DW-1:0] int_data;
  logic cfg_we; logic [IW-1:0] cfg_idx; logic [PW-1:0] cfg_pri; sens_e cfg_sens;
  mon_t mon_pin; logic [PW-1:0] mon_pri_pin;
  logic [N-1:0] int_out; logic fwd_valid; logic [IW-1:0] fwd_idx;
  logic [DW-1:0] fwd_data; logic [31:0] fwd_ts;
  logic started, stall; logic [2:0] fwd_cond; logic [N-1:0] ovf;
  logic [N-1:0][3:0] pend; logic [2:0] in_win; logic [31:0] tick_cnt, tick_per;
  logic isr_fwd;
  int got_src[$]; logic [DW-1:0] got_data[$]; logic [2:0] got_cond[$];

  int_limiter #(.N_INT(N), .NUM_PRI(NP), .DATA_W(DW), .WIN_MAX(K)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (n=%0d m=%0d): %s", N, NP, what); end
  endtask

  function automatic int pri_of(input int i);
    return (37 * i) % NP;
  endfunction

  initial begin
    isr_fwd = 0;
    forever begin
      @(posedge clk);
      if (|int_out) begin
        repeat (3) @(negedge clk);
        isr_fwd = 1;
        repeat (16) @(negedge clk);
        isr_fwd = 0;
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (fwd_cond != 0) got_cond.push_back(fwd_cond);
    if (fwd_valid) begin got_src.push_back(int'(fwd_idx)); got_data.push_back(fwd_data); end
  end

  initial begin
    int lat, quiet, nzero, k;
    int order[$];
    done = 0; checks = 0; failures = 0; rst_n = 0;
    int_in = '0; int_data = '0; cfg_we = 0; cfg_idx = 0; cfg_pri = 0; cfg_sens = SENS_EDGE;
    mon_pin = '0; mon_pri_pin = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N; i++)
      @(negedge clk) begin cfg_we = 1; cfg_idx = IW'(i); cfg_pri = PW'(pri_of(i)); end
    @(negedge clk) cfg_we = 0;
    @(negedge clk) mon_pin = '{isr:1, tick:1, ctx:1, slack:1};
    @(negedge clk) mon_pin = '0;
    repeat (10) @(negedge clk);
    chk(started, "started");
    @(negedge clk) for (int i = 0; i < N; i++) begin int_in[i] = 1; int_data[i] = DW'(i + 1000); end
    lat = 0;
    while (int_out == 0 && lat < 20) begin @(posedge clk); #1; lat++; end
    chk(lat == 5, $sformatf("first forward latency %0d, expected 5", lat));
    @(negedge clk) int_in = '0;
    // wait until forwarding stops, then raise slack for the rest
    quiet = 0;
    while (quiet < 300) begin @(negedge clk); quiet = (fwd_valid || int_out != 0) ? 0 : quiet + 1; end
    nzero = 0;
    for (int i = 0; i < N; i++) if (pri_of(i) == 0) nzero++;
    if (got_src.size() < N) chk(stall, "stall while priority-0 sources wait");
    @(negedge clk) mon_pin.slack = 1;
    quiet = 0;
    while (quiet < 300) begin @(negedge clk); quiet = (fwd_valid || int_out != 0) ? 0 : quiet + 1; end
    // expected order
    for (int p = NP - 1; p >= 0; p--)
      for (int i = 0; i < N; i++) if (pri_of(i) == p) order.push_back(i);
    chk(got_src.size() == N && got_cond.size() == N,
        $sformatf("%0d forwards, %0d grants", got_src.size(), got_cond.size()));
    k = 0;
    foreach (order[j]) if (j < got_src.size() && j < got_cond.size()) begin
      logic [2:0] ec;
      ec = (pri_of(order[j]) > 0) ? 3'b001 : (j < K) ? 3'b010 : 3'b100;
      if (got_src[j] != order[j] || got_data[j] != DW'(order[j] + 1000) || got_cond[j] != ec) k++;
    end
    chk(k == 0, $sformatf("%0d forwards out of order or with a wrong condition", k));
    $display("n=%0d m=%0d: %0d forwards, %0d with priority 0, latency %0d clocks",
             N, NP, got_src.size(), nzero, lat);
    done = 1;
  end
endmodule
