// Condition Evaluation Unit with its INT forward signal unit.
//
// Combinational decision made once per clock for the highest-priority caught
// INT (chosen by max_pri_sel). The INT is granted if any of three conditions
// holds, checked in this order:
//   priority  - its priority is strictly above MON_PRI, the running task's;
//   underload - the floating window (load_det) still admits a forward;
//   slack     - MON_SLACK is high (the MCU runs below its hard-priority level
//               or idles);
// and otherwise it stays stalled in the buffer. `cond` tells which condition
// released the grant (one-hot, first match). A grant is further gated by the
// forward signal unit: monitoring must have started, no ISR may be running
// (MON_INT low), no context switch may be in progress (MON_CTX low, as
// MON_PRI is only settled after it), and the forward unit must be ready.
// `grant`/`gidx` go to the IDU (acknowledge) and to the forward unit, which
// registers them: that register is the CEU's single clock of delay.
// The three conditions and their order follow the described algorithm; the
// gating by MON_CTX and by forward-unit readiness is this design's choice.
module ceu
  import lim_pkg::*;
#(
  parameter int unsigned N       = 64,
  parameter int unsigned PRI_W   = 6,
  parameter int unsigned WIN_MAX = 4,
  parameter int unsigned WIN_CYC = 100000,
  localparam int unsigned IW     = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned NW     = $clog2(WIN_MAX + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [N-1:0]            rdy,
  input  logic [N-1:0][PRI_W-1:0] pri,
  input  mon_t                    mon,
  input  logic [PRI_W-1:0]        mon_pri,
  input  logic                    started,
  input  logic                    ifu_ready,
  output logic                    grant,
  output logic [IW-1:0]           gidx,
  output logic [2:0]              cond,     // {slack, underload, priority}
  output logic                    stall,    // something is caught but nothing is granted
  output logic [NW-1:0]           in_win
);
  logic             any, c_pri, c_load, c_slack, gate;
  logic [PRI_W-1:0] top_pri;

  max_pri_sel #(.N(N), .PRI_W(PRI_W)) u_sel (
    .rdy(rdy), .pri(pri), .any(any), .idx(gidx), .max_pri(top_pri)
  );

  load_det #(.WIN_MAX(WIN_MAX), .WIN_CYC(WIN_CYC)) u_load (
    .clk(clk), .rst_n(rst_n), .fwd(grant), .underload(c_load), .in_win(in_win)
  );

  // priority compare unit and slack detect unit
  assign c_pri   = top_pri > mon_pri;
  assign c_slack = mon.slack;

  // INT forward signal unit
  assign gate  = started & ~mon.isr & ~mon.ctx & ifu_ready;
  assign grant = any & gate & (c_pri | c_load | c_slack);
  assign stall = any & ~grant;

  always_comb begin
    cond = 3'b000;
    if (grant) begin
      if (c_pri)       cond = 3'b001;
      else if (c_load) cond = 3'b010;
      else             cond = 3'b100;
    end
  end
endmodule
