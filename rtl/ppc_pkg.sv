// ppc_pkg: types and number formats shared by the perspective-projection
// resampling module (parallel pipelined 3x3x3 convolution).
//
// Number formats are this design's own choice; the document leaves them open
// (fixed-point analysis is listed there as future work):
//   voxels          unsigned VOX_W bits
//   samples         signed SMP_W bits, SMP_F fraction bits (voxel << SMP_F)
//   weights         signed WGT_W bits, WGT_F fraction bits
//   positions       signed POS_W bits, POS_F fraction bits, in compositing
//                   (base-plane pixel) units for i and j, and in slices of
//                   the current resolution level for k
//   kernel index    the distance between sample point and voxel position,
//                   quantised to 1/2**KIDX_F and covering [-4, 4)
package ppc_pkg;

  localparam int VOX_W  = 8;
  localparam int SMP_W  = 24;
  localparam int SMP_F  = 8;
  localparam int WGT_W  = 12;
  localparam int WGT_F  = 10;
  localparam int POS_W  = 24;
  localparam int POS_F  = 8;
  localparam int KIDX_F = 4;
  localparam int KIDX_W = 7;
  localparam int KSIZE  = 1 << KIDX_W;
  localparam int CRD_W  = 10;   // logical voxel coordinate width (V up to 1024)
  localparam int LVL_W  = 3;    // resolution level width

  typedef logic signed [POS_W-1:0] pos_t;
  typedef logic signed [SMP_W-1:0] smp_t;
  typedef logic signed [WGT_W-1:0] wgt_t;
  typedef logic [VOX_W-1:0]        vox_t;

  // Direction of a 1D convolver; also selects which kernel table a write
  // goes to (the document gives separate weight functions W_l, W_m, W_n).
  typedef enum logic [1:0] {DIR_I = 2'd0, DIR_J = 2'd1, DIR_K = 2'd2} dir_e;

  typedef struct packed {
    pos_t i;
    pos_t j;
    pos_t k;
  } pos3_t;

  // Logical address of a voxel of the multi-resolution volume.
  typedef struct packed {
    logic [LVL_W-1:0] l;
    logic [CRD_W-1:0] i;
    logic [CRD_W-1:0] j;
    logic [CRD_W-1:0] k;
  } coord_t;

  typedef struct packed {
    logic valid;     // a voxel of the current segment occupies this slot
    logic row_last;  // skewed position m == V'-1: last slot of its row
    logic in_slab;   // the 3x3x3 window starting here lies inside the slab
  } flags_t;

  // Everything that travels down a pipeline column with a partial sum.
  typedef struct packed {
    flags_t f;
    coord_t c;   // window-origin voxel
    pos3_t  a;   // sample point (i^, j^, k^): floored, compositing grid
    pos3_t  p;   // sheared position (i+, j+, k+) of the window-origin voxel
  } col_t;

  // Operand passed sideways between pipelines: a value and its position.
  typedef struct packed {
    smp_t  v;
    pos3_t b;
  } opd_t;

  // Kernel table index for a distance delta = sample - voxel position.
  // Returns valid = 0 when delta lies outside the table's range.
  function automatic logic [KIDX_W:0] kernel_index(input pos_t delta);
    pos_t q;
    q = delta >>> (POS_F - KIDX_F);
    if (q >= -pos_t'(KSIZE / 2) && q < pos_t'(KSIZE / 2))
      return {1'b1, q[KIDX_W-1:0]};
    else
      return '0;
  endfunction

endpackage
