// Self-checking testbench of ceu, the condition evaluation unit.
// Every clock the ready mask, the priorities, the monitoring lines, MON_PRI,
// `started` and the forward unit's readiness are randomised. A reference
// model picks the highest-priority ready INT, evaluates the priority,
// underload (floating window over its own past grants) and slack conditions
// and the forwarding gate, and predicts grant, granted index, the releasing
// condition and the stall flag. Counts how often each condition released a
// grant and fails if one never did.
module tb_ceu;
  import lim_pkg::*;
  localparam int N = 6, PW = 3, K = 2, W = 30;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] rdy; logic [N-1:0][PW-1:0] pri;
  mon_t mon; logic [PW-1:0] mon_pri; logic started, ifu_ready;
  logic grant; logic [2:0] gidx; logic [2:0] cond; logic stall; logic [1:0] in_win;
  int checks = 0, failures = 0;
  int n_cond[3] = '{0, 0, 0};
  int times[$];
  int now = 0;

  ceu #(.N(N), .PRI_W(PW), .WIN_MAX(K), .WIN_CYC(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rdy = '0; pri = '0; mon = '0; mon_pri = '0; started = 0; ifu_ready = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 20000; t++) begin
      bit any, cp, cl, cs, gate, eg; int bi, bp, cnt; logic [2:0] ec;
      @(negedge clk);
      rdy = N'($urandom) & N'($urandom);
      for (int i = 0; i < N; i++) pri[i] = PW'($urandom);
      mon.isr   = ($urandom_range(0, 4) == 0);
      mon.ctx   = ($urandom_range(0, 6) == 0);
      mon.tick  = $urandom_range(0, 1);
      mon.slack = ($urandom_range(0, 5) == 0);
      mon_pri   = PW'($urandom);
      started   = (t > 20);
      ifu_ready = ($urandom_range(0, 3) != 0);
      #1;
      any = 0; bi = 0; bp = -1;
      for (int i = 0; i < N; i++)
        if (rdy[i] && int'(pri[i]) > bp) begin any = 1; bi = i; bp = pri[i]; end
      cnt = 0;
      foreach (times[i]) if (now - times[i] < W) cnt++;
      cp = any && (bp > int'(mon_pri));
      cl = (cnt < K);
      cs = mon.slack;
      gate = started && !mon.isr && !mon.ctx && ifu_ready;
      eg = any && gate && (cp || cl || cs);
      ec = !eg ? 3'b000 : cp ? 3'b001 : cl ? 3'b010 : 3'b100;
      checks++;
      if (grant !== eg || (eg && (int'(gidx) != bi || cond != ec)) || stall !== (any && !eg)) begin
        failures++;
        $display("FAIL: t=%0d grant=%0b/%0b idx=%0d/%0d cond=%b/%b stall=%0b",
                 t, grant, eg, gidx, bi, cond, ec, stall);
      end
      if (eg) begin
        if (ec[0]) n_cond[0]++;
        if (ec[1]) n_cond[1]++;
        if (ec[2]) n_cond[2]++;
      end
      @(posedge clk);
      now++;
      if (eg) times.push_back(now);
    end
    $display("grants released by priority=%0d underload=%0d slack=%0d",
             n_cond[0], n_cond[1], n_cond[2]);
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (n_cond[c] == 0) begin failures++; $display("FAIL: condition %0d never released a grant", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
