// Load detect unit: the floating-window INT limiter.
//
// The underload condition holds while fewer than WIN_MAX interrupts have
// been forwarded to the MCU within the last WIN_CYC clocks (a window that
// slides with time, not a fixed frame). The unit keeps one age counter per
// allowed forward, used as a ring: `fwd` restarts the counter at the write
// pointer and advances the pointer, every counter counts up and saturates at
// WIN_CYC. The counter at the write pointer always belongs to the oldest of
// the last WIN_MAX forwards, so `underload` is simply "that counter has
// reached WIN_CYC". Counters start saturated after reset (no history).
// `in_win` reports how many of the last WIN_MAX forwards are younger than
// WIN_CYC. Both outputs are combinational from the counters, so a forward
// registered on one edge is reflected in the very next cycle.
// The floating window itself follows the original limiter rule; measuring it in
// clocks and the default sizes are this design's choices.
module load_det #(
  parameter int unsigned WIN_MAX = 4,
  parameter int unsigned WIN_CYC = 100000,
  localparam int unsigned AW     = $clog2(WIN_CYC + 1),
  localparam int unsigned PW     = (WIN_MAX > 1) ? $clog2(WIN_MAX) : 1,
  localparam int unsigned NW     = $clog2(WIN_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          fwd,
  output logic          underload,
  output logic [NW-1:0] in_win
);
  logic [WIN_MAX-1:0][AW-1:0] age;
  logic [PW-1:0]              wp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      age <= {WIN_MAX{AW'(WIN_CYC)}};
      wp  <= '0;
    end else begin
      for (int unsigned i = 0; i < WIN_MAX; i++)
        if (age[i] != AW'(WIN_CYC)) age[i] <= age[i] + 1'b1;
      if (fwd) begin
        age[wp] <= '0;
        wp      <= (wp == PW'(WIN_MAX - 1)) ? '0 : wp + 1'b1;
      end
    end
  end

  assign underload = (age[wp] == AW'(WIN_CYC));

  always_comb begin
    in_win = '0;
    for (int unsigned i = 0; i < WIN_MAX; i++)
      if (age[i] != AW'(WIN_CYC)) in_win = in_win + 1'b1;
  end
endmodule
