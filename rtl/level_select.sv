// level_select: resolution level for a slice, from the convolution area size.
//
// The document bounds the convolution by reading, at distance k from the base
// plane, the resolution level L = floor(log2 M) with M = 1 + k/k0, k0 being
// the distance from the eye to the base plane (its equations 2 and 6). Since
// L >= l exactly when k >= k0 * (2**l - 1), the level is found with LMAX
// comparators and no division. The unit also returns the first slice of the
// next level, k0 * (2**(L+1) - 1), where the sequencer starts a new segment.
// For parallel projection (persp = 0) M = 1 and the level is always 0.
// The level is capped at LMAX, the coarsest level stored.
//
// Combinational. k0 is an integer number of slices (this design's choice).
module level_select
  import ppc_pkg::*;
#(
  parameter int unsigned V    = 256,
  parameter int unsigned NP   = 4,
  parameter int unsigned LMAX = $clog2(V / NP),
  parameter int unsigned KW   = 16
) (
  input  logic                   persp,
  input  logic [KW-1:0]          k0,
  input  logic [CRD_W-1:0]       k,
  output logic [LVL_W-1:0]       lvl,
  output logic [KW+LMAX+1:0]     k_next    // first slice of level lvl+1, or V
);
  localparam int unsigned TW = KW + LMAX + 2;

  logic [TW-1:0] thr [LMAX+2];   // thr[l] = k0 * (2**l - 1)

  always_comb begin
    for (int l = 0; l <= LMAX + 1; l++)
      thr[l] = (TW'(k0) << l) - TW'(k0);
    lvl = '0;
    if (persp) begin
      for (int l = 1; l <= LMAX; l++)
        if (TW'(k) >= thr[l]) lvl = LVL_W'(l);
    end
    if (!persp || int'(lvl) == LMAX)
      k_next = TW'(V);
    else
      k_next = thr[lvl + 1] < TW'(V) ? thr[lvl + 1] : TW'(V);
  end

endmodule
