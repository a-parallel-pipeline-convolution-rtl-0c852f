// shear_unit: the "Shear" block: positions for every voxel in the stream.
//
// For each pipeline's voxel it forms the two positions the weights need
// (section 4.2 of the document):
//  * the sheared and scaled voxel position (i+, j+, k+). The document's
//    shear-shrink matrix maps a voxel at slice distance k onto the base plane
//    with scale 1/M = k0/(k0 + k), M = 1 + k/k0, centred on the foot of the
//    eye (EI, EJ); a parallel shear of (SI, SJ) per slice is added. For a
//    voxel of level L at (i', j', k') the original coordinates are
//    (i'D, j'D, k'D), D = 2**L, so
//        i+ = EI + (i'D + k'D*SI - EI) * r,   r = k0/(k0 + k'D)
//    and likewise j+. In k the position is kept in slices of the current
//    level: k+ = k'.
//  * the sample point (i^, j^, k^): the compositing grid point at or below
//    the sheared position of the window centre (i'+1, j'+1, k'+1), i.e.
//    i^ = floor(i+(i'+1)), j^ = floor(j+(j'+1)), k^ = k'+1. The centre's
//    position is taken with the scale r of the window-origin slice.
// With persp = 0 the scale is 1 (parallel projection).
//
// The document says the shearing is done with a DDA rather than a matrix
// product; here the per-slice scale r comes from a divider and each position
// from one multiply, which is what a DDA accumulates step by step. This and
// the fixed-point formats are this design's own choices.
//
// The voxel's logical coordinates follow from the skewed stream: pipeline p
// in slot s of row j' of slice k' holds skewed position m = s*NP + p, so
// i' = (m - j' - k') mod V'. Flags: row_last when m = V'-1; in_slab when the
// window's j' + 2 < V' and k' + 2 <= k_last (last slice read in the slab).
//
// Timing: all outputs registered, one cycle after the inputs, which lines
// them up with the voxel memory's read data.
module shear_unit
  import ppc_pkg::*;
#(
  parameter int unsigned NP = 4,
  parameter int unsigned V  = 256,
  parameter int unsigned KW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // frame parameters
  input  logic                 persp,
  input  logic [KW-1:0]        k0,
  input  pos_t                 ei,
  input  pos_t                 ej,
  input  pos_t                 si,
  input  pos_t                 sj,
  // stream position from the sequencer
  input  logic                 s_valid,
  input  logic [LVL_W-1:0]     s_lvl,
  input  logic [CRD_W-1:0]     s_slot,
  input  logic [CRD_W-1:0]     s_j,
  input  logic [CRD_W-1:0]     s_k,
  input  logic [CRD_W-1:0]     s_klast,
  output col_t                 col_out [NP]
);
  localparam int unsigned LV  = $clog2(V);
  localparam int unsigned RF  = 16;                 // fraction bits of r
  localparam int unsigned MW  = POS_W + RF + 2;     // product width

  logic [LV:0]        vp;        // V'
  logic [CRD_W+LV:0]  korig;     // k'D
  logic [RF:0]        r;         // scale, RF fraction bits, <= 1.0
  logic [KW+RF-1:0]   num;
  logic [KW+CRD_W+LV:0] den;

  always_comb begin
    vp    = (LV+1)'(V >> s_lvl);
    korig = (CRD_W+LV+1)'(s_k) << s_lvl;
    num   = (KW+RF)'(k0) << RF;
    den   = (KW+CRD_W+LV+1)'(k0) + (KW+CRD_W+LV+1)'(korig);
    if (!persp || den == 0)
      r = (RF+1)'(1) << RF;
    else
      r = (RF+1)'(num / den);
  end

  // position along i or j of original coordinate x*D on slice k'D
  function automatic pos_t place(input logic [CRD_W:0] x, input pos_t e,
                                 input pos_t sh);
    logic signed [MW-1:0] term, prod;
    term = (MW'(signed'({1'b0, x})) <<< (int'(s_lvl) + POS_F))
         + MW'(signed'({1'b0, korig})) * MW'(sh) - MW'(e);
    prod = term * MW'(signed'({1'b0, r}));
    return e + pos_t'(prod >>> RF);
  endfunction

  function automatic pos_t floor_pos(input pos_t x);
    return (x >>> POS_F) <<< POS_F;
  endfunction

  for (genvar p = 0; p < NP; p++) begin : g_pipe
    logic [CRD_W-1:0] m, iv;
    col_t             c;
    always_comb begin
      m  = CRD_W'(s_slot) * CRD_W'(NP) + CRD_W'(p);
      iv = (m - s_j - s_k) & CRD_W'(vp - 1'b1);
      c.f.valid    = s_valid;
      c.f.row_last = (m == CRD_W'(vp - 1'b1));
      c.f.in_slab  = (CRD_W'(s_j) + 2 < CRD_W'(vp)) && (s_k + 2 <= s_klast);
      c.c.l = s_lvl;
      c.c.i = iv;
      c.c.j = s_j;
      c.c.k = s_k;
      c.p.i = place({1'b0, iv}, ei, si);
      c.p.j = place({1'b0, s_j}, ej, sj);
      c.p.k = pos_t'(s_k) <<< POS_F;
      c.a.i = floor_pos(place({1'b0, iv} + 1'b1, ei, si));
      c.a.j = floor_pos(place({1'b0, s_j} + 1'b1, ej, sj));
      c.a.k = (pos_t'(s_k) + pos_t'(1)) <<< POS_F;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) col_out[p] <= '0;
      else        col_out[p] <= c;
    end
  end

endmodule
