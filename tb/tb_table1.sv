// Runs the fixed forwarding scenario of tb_limiter_cfg on the nine
// configurations of sources (n) and joint priority levels (m) in
// {4, 64, 256} x {4, 64, 256}, side by side, and sums their results.
module tb_table1;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int NC = 9;
  logic [NC-1:0] done;
  int c[NC], f[NC];

  tb_limiter_cfg #(.N(4),   .NP(4))   u0 (.clk(clk), .done(done[0]), .checks(c[0]), .failures(f[0]));
  tb_limiter_cfg #(.N(4),   .NP(64))  u1 (.clk(clk), .done(done[1]), .checks(c[1]), .failures(f[1]));
  tb_limiter_cfg #(.N(4),   .NP(256)) u2 (.clk(clk), .done(done[2]), .checks(c[2]), .failures(f[2]));
  tb_limiter_cfg #(.N(64),  .NP(4))   u3 (.clk(clk), .done(done[3]), .checks(c[3]), .failures(f[3]));
  tb_limiter_cfg #(.N(64),  .NP(64))  u4 (.clk(clk), .done(done[4]), .checks(c[4]), .failures(f[4]));
  tb_limiter_cfg #(.N(64),  .NP(256)) u5 (.clk(clk), .done(done[5]), .checks(c[5]), .failures(f[5]));
  tb_limiter_cfg #(.N(256), .NP(4))   u6 (.clk(clk), .done(done[6]), .checks(c[6]), .failures(f[6]));
  tb_limiter_cfg #(.N(256), .NP(64))  u7 (.clk(clk), .done(done[7]), .checks(c[7]), .failures(f[7]));
  tb_limiter_cfg #(.N(256), .NP(256)) u8 (.clk(clk), .done(done[8]), .checks(c[8]), .failures(f[8]));

  function automatic void report(input int extra_fail);
    int checks, failures;
    checks = 0; failures = extra_fail;
    for (int i = 0; i < NC; i++) begin checks += c[i]; failures += f[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog");
    report(1);
    $finish;
  end

  initial begin
    #1;
    wait (&done);
    report(0);
    $finish;
  end
endmodule
