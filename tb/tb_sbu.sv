// Self-checking testbench of sbu, the stall buffer.
// Random parallel writes into all banks (never into a full one) and random
// pops from non-empty banks are checked against one reference queue per
// bank: the popped entry (data and timestamp) must appear one clock after
// the pop and be the oldest entry of that bank.
module tb_sbu;
  localparam int N = 5, D = 4, DW = 8, TW = 16;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] wr; logic [N-1:0][DW-1:0] wdata; logic [TW-1:0] ts;
  logic rd; logic [2:0] ridx; logic [DW-1:0] rdata; logic [TW-1:0] rts;
  int checks = 0, failures = 0;
  logic [DW+TW-1:0] q[N][$];

  sbu #(.N(N), .DEPTH(D), .DATA_W(DW), .TS_W(TW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit pend_chk; logic [DW+TW-1:0] exp_e;
    wr = '0; wdata = '0; ts = '0; rd = 0; ridx = '0; pend_chk = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      if (pend_chk) begin
        checks++;
        if ({rdata, rts} !== exp_e) begin
          failures++;
          $display("FAIL: t=%0d read %h/%h expected %h", t, rdata, rts, exp_e);
        end
      end
      ts = TW'($urandom);
      for (int b = 0; b < N; b++) begin
        wdata[b] = DW'($urandom);
        wr[b] = (q[b].size() < D) && ($urandom_range(0, 2) == 0);
      end
      rd = 0; pend_chk = 0;
      ridx = 3'($urandom_range(0, N - 1));
      if (q[ridx].size() > 0 && $urandom_range(0, 1)) begin
        rd = 1; pend_chk = 1; exp_e = q[ridx].pop_front();
      end
      for (int b = 0; b < N; b++) if (wr[b]) q[b].push_back({wdata[b], ts});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
