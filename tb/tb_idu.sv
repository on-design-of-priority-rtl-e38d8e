// Self-checking testbench of idu, the per-source INT detection unit.
// Checks: INT_iRDY rises exactly two clocks after the line (edge mode);
// every rising edge is one stored request with the data sampled with it;
// acknowledges take requests away one at a time; catches beyond DEPTH raise
// `ovf` and are not stored; a held edge-mode line is caught once; a level
// source is caught again at ISR end while its line stays high; the setup port
// writes priority and sensitivity.
module tb_idu;
  import lim_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic cfg_we; logic [5:0] cfg_pri; sens_e cfg_sens;
  logic int_in; logic [7:0] int_data; logic isr_end, ack;
  logic rdy; logic [5:0] pri; sens_e sens; logic [2:0] pend;
  logic wr; logic [7:0] data_q; logic ovf;
  int checks = 0, failures = 0, n_wr = 0, n_ovf = 0;
  logic [7:0] wr_log[$];

  idu #(.PRI_W(6), .DATA_W(8), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (wr) begin n_wr++; wr_log.push_back(data_q); end
    if (ovf) n_ovf++;
  end

  task automatic pulse(input logic [7:0] d);
    @(negedge clk) begin int_in = 1; int_data = d; end
    @(negedge clk) int_in = 0;
    @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    cfg_we = 0; cfg_pri = 0; cfg_sens = SENS_EDGE; int_in = 0; int_data = 0;
    isr_end = 0; ack = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(pri == 0 && sens == SENS_EDGE && !rdy, "reset state");
    // setup write
    @(negedge clk) begin cfg_we = 1; cfg_pri = 6'd42; cfg_sens = SENS_EDGE; end
    @(negedge clk) cfg_we = 0;
    chk(pri == 6'd42 && sens == SENS_EDGE, "setup write");
    // latency
    @(negedge clk) begin int_in = 1; int_data = 8'hA5; end
    lat = 0;
    for (int k = 1; k <= 5; k++) begin
      @(posedge clk); #1;
      if (rdy && lat == 0) lat = k;
    end
    chk(lat == 2, $sformatf("rdy latency %0d, expected 2", lat));
    // line held high: still one request
    repeat (5) @(negedge clk);
    chk(pend == 1, $sformatf("held edge line caught once, pend=%0d", pend));
    int_in = 0;
    @(negedge clk);
    // three more requests -> 4 (full)
    pulse(8'h01); pulse(8'h02); pulse(8'h03);
    chk(pend == 4, $sformatf("pend=%0d, expected 4", pend));
    chk(n_wr == 4 && n_ovf == 0, "four writes, no overflow");
    chk(wr_log.size() == 4 && wr_log[0] == 8'hA5 && wr_log[3] == 8'h03, "stored data");
    // overflow
    pulse(8'h04);
    chk(pend == 4 && n_ovf == 1 && n_wr == 4, "overflow dropped and flagged");
    // acknowledge one at a time
    for (int k = 3; k >= 0; k--) begin
      @(negedge clk) ack = 1;
      @(negedge clk) ack = 0;
      chk(pend == 3'(k), $sformatf("pend after ack %0d", pend));
    end
    chk(!rdy, "rdy low when empty");
    // catch and ack in the same clock keeps the count
    pulse(8'h10);
    @(negedge clk) int_in = 1;
    @(negedge clk) int_in = 0;     // catch lands on the next edge
    ack = 1;
    @(negedge clk) ack = 0;
    chk(pend == 1, $sformatf("simultaneous catch and ack, pend=%0d", pend));
    @(negedge clk) ack = 1; @(negedge clk) ack = 0;
    // level sensitivity
    @(negedge clk) begin cfg_we = 1; cfg_pri = 6'd5; cfg_sens = SENS_LEVEL; end
    @(negedge clk) cfg_we = 0;
    chk(sens == SENS_LEVEL && pri == 6'd5, "level setup");
    @(negedge clk) int_in = 1;
    repeat (3) @(negedge clk);
    chk(pend == 1, "level caught");
    @(negedge clk) ack = 1; @(negedge clk) ack = 0;
    chk(pend == 0, "level acknowledged");
    repeat (3) @(negedge clk);
    chk(pend == 0, "no re-catch before ISR end");
    @(negedge clk) isr_end = 1; @(negedge clk) isr_end = 0;
    chk(pend == 1, "level re-caught at ISR end while line high");
    @(negedge clk) ack = 1; @(negedge clk) ack = 0;
    int_in = 0; @(negedge clk); @(negedge clk);
    @(negedge clk) isr_end = 1; @(negedge clk) isr_end = 0;
    chk(pend == 0, "no re-catch when line low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
