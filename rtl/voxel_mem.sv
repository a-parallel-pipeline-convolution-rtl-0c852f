// voxel_mem: one voxel memory module (a "MEM" of the voxel memory).
//
// Holds this module's share of every resolution level of the skewed
// multi-resolution volume: level L occupies (V/2**L)^3 / NP words starting at
// base(L) = sum over l < L of (V/2**l)^3 / NP, levels 0..LMAX. The document
// builds these modules from SDRAM chips with burst access and double
// buffering; here a module is a plain synchronous memory with one write and
// one read port, which is what the pipeline needs from it (one voxel per
// cycle, in a fixed order).
//
// Interface: write (we, wlvl, waddr, wdata) and read (rlvl, raddr) by level
// and index i_p within the level. Read data appear one cycle after the
// address. LMAX is the coarsest level with at least NP voxels per edge.
module voxel_mem
  import ppc_pkg::*;
#(
  parameter int unsigned NP   = 4,
  parameter int unsigned V    = 256,
  parameter int unsigned LMAX = $clog2(V / NP)
) (
  input  logic                          clk,
  input  logic                          we,
  input  logic [LVL_W-1:0]              wlvl,
  input  logic [$clog2(V*V*V/NP)-1:0]   waddr,
  input  vox_t                          wdata,
  input  logic [LVL_W-1:0]              rlvl,
  input  logic [$clog2(V*V*V/NP)-1:0]   raddr,
  output vox_t                          rdata
);
  function automatic longint unsigned level_base(input int unsigned lv);
    longint unsigned b = 0;
    for (int unsigned l = 0; l < lv; l++)
      b += ((longint'(V) >> l) * (longint'(V) >> l) * (longint'(V) >> l)) / longint'(NP);
    return b;
  endfunction

  localparam longint unsigned DEPTH = level_base(LMAX + 1);
  localparam int unsigned     AW    = $clog2(DEPTH);

  vox_t mem [DEPTH];

  logic [AW-1:0] wa, ra;

  // base(L) for every level, as constants
  logic [AW-1:0] base [LMAX+1];
  for (genvar l = 0; l <= LMAX; l++) begin : g_base
    assign base[l] = AW'(level_base(l));
  end

  assign wa = base[wlvl <= LVL_W'(LMAX) ? wlvl : LVL_W'(LMAX)] + AW'(waddr);
  assign ra = base[rlvl <= LVL_W'(LMAX) ? rlvl : LVL_W'(LMAX)] + AW'(raddr);

  always_ff @(posedge clk) begin
    if (we) mem[wa] <= wdata;
    rdata <= mem[ra];
  end

endmodule
