// Self-checking testbench of max_pri_sel.
// Random ready masks and priorities (with many ties) are compared against a
// reference scan: highest priority wins, ties to the lowest index.
module tb_max_pri_sel;
  localparam int N = 13, PW = 3;
  logic [N-1:0] rdy; logic [N-1:0][PW-1:0] pri;
  logic any; logic [3:0] idx; logic [PW-1:0] max_pri;
  int checks = 0, failures = 0;

  max_pri_sel #(.N(N), .PRI_W(PW)) dut (.*);

  initial begin
    #1000000;
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      bit ra; int ri; int rp;
      rdy = N'($urandom);
      if (t % 7 == 0) rdy = '0;
      for (int i = 0; i < N; i++) pri[i] = PW'($urandom);
      #1;
      ra = 0; ri = 0; rp = -1;
      for (int i = 0; i < N; i++)
        if (rdy[i] && int'(pri[i]) > rp) begin ra = 1; ri = i; rp = pri[i]; end
      checks++;
      if (any !== ra || (ra && (idx != 4'(ri) || max_pri != PW'(rp)))) begin
        failures++;
        $display("FAIL: rdy=%b got any=%0b idx=%0d pri=%0d, expected %0b %0d %0d",
                 rdy, any, idx, max_pri, ra, ri, rp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
