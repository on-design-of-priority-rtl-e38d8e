// INT Detection Unit (one per interrupt source).
//
// Holds the source's run-time configuration (priority in the joint INT/task
// priority space and edge/level sensitivity, both written over the setup
// port) and detects requests on the raw INT line. Every caught request is
// counted in `pend`; `rdy` (INT_iRDY) is high while at least one caught request
// has not yet been forwarded. The condition evaluation unit acknowledges one
// request with `ack` when it grants this source.
//
// Detection: the line passes one synchroniser flop (stage 1); the detector
// compares it with its previous value and updates the count on the next edge
// (stage 2), so `rdy` rises two clocks after the INT line - the IDU delay of
// 2 Tclk. An EDGE source is caught on each rising edge. A LEVEL source is
// caught on its rising edge and caught again at the end of an ISR (isr_end)
// if its line is still high and nothing of it is pending, i.e. a level
// request persists until the peripheral is serviced.
// With each catch the IDU raises `wr` for one clock so the stall buffer
// stores the data sampled with the line (`data_q`). A catch that finds DEPTH
// requests already pending is dropped and reported on `ovf` for one clock.
// Reset values (priority 0, edge sensitivity) are this design's choice.
// The handshake assertions use rst_n as their disable condition; a linter
// may report that as a reset used both synchronously and asynchronously,
// but every flop here is reset asynchronously only.
module idu
  import lim_pkg::*;
#(
  parameter int unsigned PRI_W  = 6,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned DEPTH  = 8,
  localparam int unsigned CW    = $clog2(DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // setup
  input  logic              cfg_we,
  input  logic [PRI_W-1:0]  cfg_pri,
  input  sens_e             cfg_sens,
  // interrupt line and its data
  input  logic              int_in,
  input  logic [DATA_W-1:0] int_data,
  input  logic              isr_end,
  // to the condition evaluation unit
  input  logic              ack,
  output logic              rdy,
  output logic [PRI_W-1:0]  pri,
  output sens_e             sens,
  output logic [CW-1:0]     pend,
  // to the stall buffer
  output logic              wr,
  output logic [DATA_W-1:0] data_q,
  output logic              ovf
);
  logic line_q, line_prev, catch_ev, full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pri  <= '0;
      sens <= SENS_EDGE;
    end else if (cfg_we) begin
      pri  <= cfg_pri;
      sens <= cfg_sens;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_q    <= 1'b0;
      line_prev <= 1'b0;
      data_q    <= '0;
    end else begin
      line_q    <= int_in;
      line_prev <= line_q;
      data_q    <= int_data;
    end
  end

  assign full = (pend == CW'(DEPTH));

  always_comb begin
    catch_ev = line_q & ~line_prev;
    if (sens == SENS_LEVEL && line_q && isr_end && pend == '0) catch_ev = 1'b1;
  end

  assign wr  = catch_ev & ~full;
  assign ovf = catch_ev & full;
  assign rdy = (pend != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0;
    end else begin
      unique case ({wr, ack & rdy})
        2'b10:   pend <= pend + 1'b1;
        2'b01:   pend <= pend - 1'b1;
        default: pend <= pend;
      endcase
    end
  end

  // an acknowledge is only given for a pending request
  a_ack_pending: assert property (@(posedge clk) disable iff (!rst_n) ack |-> rdy);
endmodule
