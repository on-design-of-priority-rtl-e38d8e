// Monitoring-interface receiver.
//
// The MCU drives four single-bit lines (MON_INT, MON_TICK, MON_CTX,
// MON_SLACK) and a PRI_W-bit priority bus (MON_PRI) from its software: ISR
// prologue/epilogue, OS tick ISR and context switch. This block brings them
// into the limiter's clock domain through a two-flop synchroniser and derives
// what the rest of the limiter uses:
//   * started   - set once the MCU has announced that its kernel is ready by a
//                 HIGH pulse seen on all four single lines in the same clock;
//                 stays set until reset.
//   * isr_rise / isr_fall - one-clock strobes at ISR entry and exit (MON_INT).
//                 The end of the start pulse itself gives one isr_fall.
//   * tick_cnt  - number of OS ticks seen since start (OS time).
//   * tick_per  - clocks between the last two OS ticks, for jitter observation.
// The strobes and counters are only produced after start; the start pulse
// itself is not counted as an ISR or tick.
// Timing: every output lags the pins by the two synchroniser flops plus one
// clock for edge detection.
// The start handshake and the meaning of the lines follow the monitoring
// interface as described; the synchroniser, the counters and their widths are
// this design's choices.
module mon_if
  import lim_pkg::*;
#(
  parameter int unsigned PRI_W = 6,
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  mon_t             mon_pin,
  input  logic [PRI_W-1:0] pri_pin,
  output mon_t             mon,       // synchronised single lines
  output logic [PRI_W-1:0] pri,       // synchronised MON_PRI
  output logic             started,
  output logic             isr_rise,
  output logic             isr_fall,
  output logic [CNT_W-1:0] tick_cnt,
  output logic [CNT_W-1:0] tick_per
);
  mon_t             mon_s1, mon_prev;
  logic [PRI_W-1:0] pri_s1;
  logic [CNT_W-1:0] since_tick;
  logic             all_high;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mon_s1   <= '0;
      mon      <= '0;
      mon_prev <= '0;
      pri_s1   <= '0;
      pri      <= '0;
    end else begin
      mon_s1   <= mon_pin;
      mon      <= mon_s1;
      mon_prev <= mon;
      pri_s1   <= pri_pin;
      pri      <= pri_s1;
    end
  end

  assign all_high = mon.isr & mon.tick & mon.ctx & mon.slack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started    <= 1'b0;
      isr_rise   <= 1'b0;
      isr_fall   <= 1'b0;
      tick_cnt   <= '0;
      tick_per   <= '0;
      since_tick <= '0;
    end else begin
      isr_rise  <= 1'b0;
      isr_fall  <= 1'b0;
      if (!started) begin
        started <= all_high;
      end else begin
        isr_rise  <= mon.isr & ~mon_prev.isr;
        isr_fall  <= ~mon.isr & mon_prev.isr;
        if (mon.tick & ~mon_prev.tick) begin
          tick_cnt   <= tick_cnt + 1'b1;
          tick_per   <= since_tick;
          since_tick <= CNT_W'(1);
        end else if (since_tick != '1) begin
          since_tick <= since_tick + 1'b1;
        end
      end
    end
  end
endmodule
