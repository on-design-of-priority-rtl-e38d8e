// Stall-INT Buffer Unit.
//
// Memory shared by all detection units and the forward unit. It holds, for
// each of the N sources, a FIFO of DEPTH entries; an entry is one caught INT
// request with its DATA_W-bit data and the TS_W-bit timestamp of its capture,
// so several requests of one source can wait at the same time.
// Each bank has its own write port (the detection units write in parallel,
// `wr[i]` with `wdata[i]` and the common `ts`), and there is one read port for
// the forward unit: `rd` with `ridx` pops the oldest entry of bank `ridx`; the
// entry appears on `rdata`/`rts` on the next clock edge (registered read).
// Each bank is a separate DEPTH-word array.
// Flow control is the caller's: the detection unit counts what it stored and
// never writes a full bank, and the forward unit only pops a bank its
// detection unit reports as non-empty. Bank organisation, depth and widths
// are this design's choices; the buffer's role (requests, data, timestamps,
// read by the forward unit) follows the original architecture.
module sbu #(
  parameter int unsigned N      = 64,
  parameter int unsigned DEPTH  = 8,
  parameter int unsigned DATA_W = 8,
  parameter int unsigned TS_W   = 32,
  localparam int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned EW    = DATA_W + TS_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [N-1:0]             wr,
  input  logic [N-1:0][DATA_W-1:0] wdata,
  input  logic [TS_W-1:0]          ts,
  input  logic                     rd,
  input  logic [IW-1:0]            ridx,
  output logic [DATA_W-1:0]        rdata,
  output logic [TS_W-1:0]          rts
);
  logic [N-1:0][EW-1:0] bank_q;   // registered read word of each bank
  logic [IW-1:0]        ridx_q;

  for (genvar b = 0; b < N; b++) begin : g_bank
    logic [EW-1:0] mem [DEPTH];
    logic [AW-1:0] wp, rp;
    logic          pop;

    assign pop = rd && (ridx == IW'(b));

    always_ff @(posedge clk) begin
      if (wr[b]) mem[wp] <= {wdata[b], ts};
      if (pop)   bank_q[b] <= mem[rp];
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wp <= '0;
        rp <= '0;
      end else begin
        if (wr[b]) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        if (pop)   rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ridx_q <= '0;
    else if (rd) ridx_q <= ridx;
  end

  assign {rdata, rts} = bank_q[ridx_q];
endmodule
