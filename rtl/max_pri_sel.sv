// Maximum INT-priority select unit.
//
// Purely combinational: among the sources whose INT_iRDY is high it returns
// the one with the numerically largest priority (a larger number is a higher
// priority in the joint INT/task priority space; 0 is the idle level). Ties go
// to the lowest source index. `any` is low when nothing is ready.
// The scan is written as a binary reduction tree of depth log2(N); the
// original architecture identifies this unit as the main part of the delay of
// the condition evaluation. The tree and the tie rule are this design's choices.
module max_pri_sel #(
  parameter int unsigned N     = 64,
  parameter int unsigned PRI_W = 6,
  localparam int unsigned IW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]            rdy,
  input  logic [N-1:0][PRI_W-1:0] pri,
  output logic                    any,
  output logic [IW-1:0]           idx,
  output logic [PRI_W-1:0]        max_pri
);
  localparam int unsigned L = 1 << IW;   // leaves, padded to a power of two

  logic [2*L-1:1]           v;
  logic [2*L-1:1][IW-1:0]   ix;
  logic [2*L-1:1][PRI_W-1:0] pr;

  always_comb begin
    for (int unsigned i = 0; i < L; i++) begin
      v[L+i]  = (i < N) ? rdy[i] : 1'b0;
      ix[L+i] = IW'(i);
      pr[L+i] = (i < N) ? pri[i] : '0;
    end
    for (int unsigned k = L - 1; k >= 1; k--) begin
      // right child wins only if valid and strictly higher (or left invalid)
      if (v[2*k+1] && (!v[2*k] || pr[2*k+1] > pr[2*k])) begin
        v[k] = 1'b1; ix[k] = ix[2*k+1]; pr[k] = pr[2*k+1];
      end else begin
        v[k] = v[2*k]; ix[k] = ix[2*k]; pr[k] = pr[2*k];
      end
    end
  end

  assign any     = v[1];
  assign idx     = ix[1];
  assign max_pri = pr[1];
endmodule
