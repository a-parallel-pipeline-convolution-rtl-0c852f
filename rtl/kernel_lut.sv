// kernel_lut: the weight function W(delta) of one convolution direction.
//
// The document defines each 1D weight as a function of the distance between
// the sample point and the sheared voxel position, w = W(i^ - i+), and uses
// several kernels (nearest neighbour, box, Lagrange). Here that function is a
// programmable table so that any separable kernel can be loaded: KSIZE
// entries indexed by the distance quantised to 1/2**KIDX_F over [-4, 4).
// Distances outside the table give weight zero. The table form, its range
// and its resolution are this design's choices.
//
// Interface: a write port (wr_en, wr_addr, wr_data), accepted when wr_dir
// equals the DIR parameter; a combinational read from `delta` to `w`.
// The table resets to all zeros.
module kernel_lut
  import ppc_pkg::*;
#(
  parameter dir_e DIR = DIR_I
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  dir_e              wr_dir,
  input  logic [KIDX_W-1:0] wr_addr,
  input  wgt_t              wr_data,
  input  pos_t              delta,
  output wgt_t              w
);
  wgt_t             tbl [KSIZE];
  logic [KIDX_W:0]  idx;

  assign idx = kernel_index(delta);
  assign w   = idx[KIDX_W] ? tbl[idx[KIDX_W-1:0]] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < KSIZE; n++) tbl[n] <= '0;
    end else if (wr_en && wr_dir == DIR) begin
      tbl[wr_addr] <= wr_data;
    end
  end

endmodule
