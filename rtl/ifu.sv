// INT Forward Unit.
//
// Takes the grant of the condition evaluation unit and drives the granted
// INT onto the MCU's interrupt pins, together with the request's data and
// capture timestamp read from the stall buffer.
// Pipeline (edges counted from the clock in which `grant` is high):
//   edge 1: grant, source index and sensitivity are registered; the stall
//           buffer pop issued with the grant returns the entry (CEU delay).
//   edge 2: the entry is taken into the forward register.
//   edge 3: the INT pin and fwd_valid/fwd_idx/fwd_data/fwd_ts are driven.
// Edges 2 and 3 are the forward unit's own 2 Tclk; together with the 2 Tclk
// of detection and the 1 Tclk of condition evaluation an INT reaches the pin
// five clocks after its line rose when no data wait is needed (the buffer is
// on-chip with a single-clock read, which hides in edge 1).
// An EDGE source gets a one-clock pulse on its pin. A LEVEL source's pin
// stays high until the MCU is seen entering an ISR (isr_rise); meanwhile
// `ready` stays low, so only one level request is outstanding. `ready` is
// also low while the pipeline holds a grant.
// The pin shapes and the release on ISR entry are this design's choices; the
// architecture only requires the stimulus to follow each source's sensitivity.
// The handshake assertions use rst_n as their disable condition; a linter
// may report that as a reset used both synchronously and asynchronously,
// but every flop here is reset asynchronously only.
module ifu
  import lim_pkg::*;
#(
  parameter int unsigned N      = 64,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned TS_W   = 32,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              grant,
  input  logic [IW-1:0]     gidx,
  input  sens_e             gsens,
  input  logic [DATA_W-1:0] sb_data,
  input  logic [TS_W-1:0]   sb_ts,
  input  logic              isr_rise,
  output logic              ready,
  output logic [N-1:0]      int_out,
  output logic              fwd_valid,
  output logic [IW-1:0]     fwd_idx,
  output logic [DATA_W-1:0] fwd_data,
  output logic [TS_W-1:0]   fwd_ts
);
  logic              v1, v2, lvl_wait;
  logic [IW-1:0]     idx1, idx2;
  sens_e             sens1, sens2;
  logic [DATA_W-1:0] data2;
  logic [TS_W-1:0]   ts2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0;
      idx1 <= '0; idx2 <= '0;
      sens1 <= SENS_EDGE; sens2 <= SENS_EDGE;
      data2 <= '0; ts2 <= '0;
    end else begin
      v1    <= grant;
      idx1  <= gidx;
      sens1 <= gsens;
      v2    <= v1;
      idx2  <= idx1;
      sens2 <= sens1;
      if (v1) begin
        data2 <= sb_data;
        ts2   <= sb_ts;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_out   <= '0;
      lvl_wait  <= 1'b0;
      fwd_valid <= 1'b0;
      fwd_idx   <= '0;
      fwd_data  <= '0;
      fwd_ts    <= '0;
    end else begin
      fwd_valid <= v2;
      if (v2) begin
        int_out       <= '0;
        int_out[idx2] <= 1'b1;
        lvl_wait      <= (sens2 == SENS_LEVEL);
        fwd_idx       <= idx2;
        fwd_data      <= data2;
        fwd_ts        <= ts2;
      end else if (!lvl_wait || isr_rise) begin
        int_out  <= '0;
        lvl_wait <= 1'b0;
      end
    end
  end

  assign ready = ~v1 & ~v2 & ~lvl_wait;

  // handshake rules: a grant is only given to a ready unit, and at most one
  // MCU pin is driven at a time
  a_grant_ready: assert property (@(posedge clk) disable iff (!rst_n) grant |-> ready);
  a_one_pin:     assert property (@(posedge clk) disable iff (!rst_n) $onehot0(int_out));
endmodule
