// Monitor-based, priority-driven, load-adaptive interrupt limiter (top).
//
// Sits between N_INT interrupt sources and an MCU. Every interrupt is caught
// here first; it is passed to the MCU only when the MCU can take it without
// harm, judged from monitoring lines the MCU's software drives (MON_INT
// during ISRs, MON_TICK per OS tick, MON_CTX during context switches,
// MON_PRI = priority of the running task, MON_SLACK = running below the
// hard-priority level). The highest-priority caught INT is forwarded if its
// priority is above MON_PRI, or the floating window still has room, or
// MON_SLACK is high; otherwise it waits, with its data and capture time, in
// the stall buffer. No INT is forwarded while an ISR runs.
//
// Structure: one idu per source, then ceu (max-priority select, priority
// compare, slack detect, load detect and forward signal unit), sbu (stall
// buffer) and ifu (forward unit), fed by mon_if (monitoring receiver).
// A free-running TS_W-bit clock counter stamps every caught request.
// Timing: a request reaches its int_out pin five clocks after its int_in line
// rose (2 detect + 1 evaluate + 2 forward) when the conditions already hold.
// Setup: cfg_we writes priority cfg_pri and sensitivity cfg_sens of source
// cfg_idx. Priorities are in the joint INT/task space, a larger number being
// more urgent and 0 the idle task's level.
// The unit structure, the three conditions and the latency split follow the
// described architecture; widths, buffer depth and window size are this
// design's defaults.
module int_limiter
  import lim_pkg::*;
#(
  parameter int unsigned N_INT   = 64,
  parameter int unsigned NUM_PRI = 64,
  parameter int unsigned DEPTH   = 8,
  parameter int unsigned DATA_W  = 8,
  parameter int unsigned TS_W    = 32,
  parameter int unsigned WIN_MAX = 4,
  parameter int unsigned WIN_CYC = 100000,
  localparam int unsigned PRI_W  = (NUM_PRI > 1) ? $clog2(NUM_PRI) : 1,
  localparam int unsigned IW     = (N_INT > 1) ? $clog2(N_INT) : 1,
  localparam int unsigned CW     = $clog2(DEPTH + 1),
  localparam int unsigned NW     = $clog2(WIN_MAX + 1)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // interrupt sources
  input  logic [N_INT-1:0]             int_in,
  input  logic [N_INT-1:0][DATA_W-1:0] int_data,
  // setup
  input  logic                         cfg_we,
  input  logic [IW-1:0]                cfg_idx,
  input  logic [PRI_W-1:0]             cfg_pri,
  input  sens_e                        cfg_sens,
  // monitoring lines from the MCU
  input  mon_t                         mon_pin,
  input  logic [PRI_W-1:0]             mon_pri_pin,
  // to the MCU
  output logic [N_INT-1:0]             int_out,
  output logic                         fwd_valid,
  output logic [IW-1:0]                fwd_idx,
  output logic [DATA_W-1:0]            fwd_data,
  output logic [TS_W-1:0]              fwd_ts,
  // status
  output logic                         started,
  output logic                         stall,
  output logic [2:0]                   fwd_cond,
  output logic [N_INT-1:0]             ovf,
  output logic [N_INT-1:0][CW-1:0]     pend,
  output logic [NW-1:0]                in_win,
  output logic [31:0]                  tick_cnt,
  output logic [31:0]                  tick_per
);
  mon_t                         mon;
  logic [PRI_W-1:0]             mon_pri;
  logic                         isr_rise, isr_fall;
  logic [N_INT-1:0]             rdy, ack, wr;
  logic [N_INT-1:0][PRI_W-1:0]  pri;
  sens_e [N_INT-1:0]            sens;
  logic [N_INT-1:0][DATA_W-1:0] data_q;
  logic                         grant, ifu_ready;
  logic [IW-1:0]                gidx;
  logic [DATA_W-1:0]            sb_data;
  logic [TS_W-1:0]              sb_ts, now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) now <= '0;
    else        now <= now + 1'b1;
  end

  mon_if #(.PRI_W(PRI_W), .CNT_W(32)) u_mon (
    .clk(clk), .rst_n(rst_n), .mon_pin(mon_pin), .pri_pin(mon_pri_pin),
    .mon(mon), .pri(mon_pri), .started(started),
    .isr_rise(isr_rise), .isr_fall(isr_fall),
    .tick_cnt(tick_cnt), .tick_per(tick_per)
  );

  for (genvar i = 0; i < N_INT; i++) begin : g_idu
    assign ack[i] = grant && (gidx == IW'(i));
    idu #(.PRI_W(PRI_W), .DATA_W(DATA_W), .DEPTH(DEPTH)) u_idu (
      .clk(clk), .rst_n(rst_n),
      .cfg_we(cfg_we && (cfg_idx == IW'(i))), .cfg_pri(cfg_pri), .cfg_sens(cfg_sens),
      .int_in(int_in[i]), .int_data(int_data[i]), .isr_end(isr_fall),
      .ack(ack[i]), .rdy(rdy[i]), .pri(pri[i]), .sens(sens[i]), .pend(pend[i]),
      .wr(wr[i]), .data_q(data_q[i]), .ovf(ovf[i])
    );
  end

  ceu #(.N(N_INT), .PRI_W(PRI_W), .WIN_MAX(WIN_MAX), .WIN_CYC(WIN_CYC)) u_ceu (
    .clk(clk), .rst_n(rst_n), .rdy(rdy), .pri(pri), .mon(mon), .mon_pri(mon_pri),
    .started(started), .ifu_ready(ifu_ready), .grant(grant), .gidx(gidx),
    .cond(fwd_cond), .stall(stall), .in_win(in_win)
  );

  sbu #(.N(N_INT), .DEPTH(DEPTH), .DATA_W(DATA_W), .TS_W(TS_W)) u_sbu (
    .clk(clk), .rst_n(rst_n), .wr(wr), .wdata(data_q), .ts(now),
    .rd(grant), .ridx(gidx), .rdata(sb_data), .rts(sb_ts)
  );

  ifu #(.N(N_INT), .DATA_W(DATA_W), .TS_W(TS_W)) u_ifu (
    .clk(clk), .rst_n(rst_n), .grant(grant), .gidx(gidx), .gsens(sens[gidx]),
    .sb_data(sb_data), .sb_ts(sb_ts), .isr_rise(isr_rise), .ready(ifu_ready),
    .int_out(int_out), .fwd_valid(fwd_valid), .fwd_idx(fwd_idx),
    .fwd_data(fwd_data), .fwd_ts(fwd_ts)
  );
endmodule
