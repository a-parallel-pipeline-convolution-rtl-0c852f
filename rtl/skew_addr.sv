// skew_addr: address mapping of the multi-resolution skewed voxel memory.
//
// Implements the document's addressing scheme (its equations 7 to 9). A voxel
// of resolution level L, at logical coordinates (i', j', k') of that level's
// V' x V' x V' volume (V' = V / 2**L), has the skewed position
// m = (i' + j' + k') mod V'. It is stored in memory module n_p = m mod NP at
// index i_p = m / NP + j' * V'/NP + k' * V'^2/NP within that level's region.
// Because every slice row of NP consecutive skewed positions lands in NP
// different modules, the NP pipelines read a row without conflict whatever
// the viewing axis.
//
// The inputs are the level and its coordinates (i', j', k'), already divided
// by D = 2**L. V and NP must be powers of two, with V / 2**L >= NP.
// Purely combinational.
module skew_addr
  import ppc_pkg::*;
#(
  parameter int unsigned NP = 4,
  parameter int unsigned V  = 256
) (
  input  logic [LVL_W-1:0]               lvl,
  input  logic [CRD_W-1:0]               i,
  input  logic [CRD_W-1:0]               j,
  input  logic [CRD_W-1:0]               k,
  output logic [$clog2(NP)-1:0]          np,
  output logic [$clog2(V*V*V/NP)-1:0]    ip
);
  localparam int unsigned LV  = $clog2(V);
  localparam int unsigned LNP = $clog2(NP);
  localparam int unsigned IPW = $clog2(V*V*V/NP);

  logic [LV-1:0]       vmask;   // V' - 1
  logic [CRD_W+1:0]    msum;
  logic [LV-1:0]       m;
  logic [LV-1:0]       lv_p;    // log2(V')

  always_comb begin
    lv_p  = LV'(LV - int'(lvl));
    vmask = LV'((32'd1 << lv_p) - 1);
    msum  = (CRD_W+2)'(i) + (CRD_W+2)'(j) + (CRD_W+2)'(k);
    m     = LV'(msum) & vmask;
    np    = m[LNP-1:0];
    ip    = IPW'(m >> LNP)
          + IPW'(((IPW+LNP)'(j) << lv_p) >> LNP)
          + IPW'(((IPW+LNP)'(k) << (2 * lv_p)) >> LNP);
  end

endmodule
