// ppc_top: the resampling side of a sample-parallel volume renderer for
// parallel and perspective projection (shear-warp), with NP pipelines.
//
// Structure (the document's block diagram and its general-case convolver):
//   host port -> skew_addr -> NP voxel_mem modules (skewed, all levels)
//   seq_ctrl (with level_select) -> read index to all modules, and the stream
//                                   position to shear_unit
//   voxel_mem read data + shear_unit payload -> resampler (i, j, k 1D
//                                   convolvers) -> samples out
// The samples, each with its sample point (i^, j^, k^), leave on the smp_*
// ports, where the rendering pipelines (compositing), the pixel memory and
// the warp unit would connect; the document does not describe those.
//
// Use: load every resolution level of the volume through the vw_* port
// (logical level and coordinates; the skewed placement is done here), load
// the three kernel tables through kw_*, set the frame parameters and pulse
// `start`. While busy the design reads NP voxels per cycle and, after the
// pipeline latency, delivers NP samples per cycle; `frame_done` pulses at the
// end. The voxel memory must not be written while busy (this design's own
// rule; the document proposes double buffering, which is not built here).
// Outputs for observation: the current level, the flush/clear pulse and the
// folding selector activity per direction.
module ppc_top
  import ppc_pkg::*;
#(
  parameter int unsigned NP   = 4,
  parameter int unsigned V    = 256,
  parameter int unsigned TAPS = 3,
  parameter int unsigned KW   = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // voxel load (host)
  input  logic                   vw_en,
  input  coord_t                 vw_addr,
  input  vox_t                   vw_data,
  // kernel tables (host)
  input  logic                   kw_en,
  input  dir_e                   kw_dir,
  input  logic [KIDX_W-1:0]      kw_addr,
  input  wgt_t                   kw_data,
  // frame parameters
  input  logic                   persp,
  input  logic [KW-1:0]          k0,
  input  pos_t                   ei,
  input  pos_t                   ej,
  input  pos_t                   si,
  input  pos_t                   sj,
  input  logic                   start,
  output logic                   busy,
  output logic                   frame_done,
  // samples towards the rendering pipelines
  output smp_t                   smp_out [NP],
  output col_t                   smp_col [NP],
  // observation
  output logic [LVL_W-1:0]       cur_lvl,
  output logic                   seg_clr,
  output logic [2:0]             fold_sel
);
  localparam int unsigned LMAX = $clog2(V / NP);
  localparam int unsigned IPW  = $clog2(V*V*V/NP);

  // host write path
  logic [$clog2(NP)-1:0] w_np;
  logic [IPW-1:0]        w_ip;

  skew_addr #(.NP(NP), .V(V)) u_skew (
    .lvl(vw_addr.l), .i(vw_addr.i), .j(vw_addr.j), .k(vw_addr.k),
    .np(w_np), .ip(w_ip)
  );

  // sequencer
  logic                         clr, s_valid;
  logic [LVL_W-1:0]             lvl;
  logic [$clog2(V/NP+1)-1:0]    vdiv;
  logic [$clog2(V*V/NP+1)-1:0]  vsq;
  logic [CRD_W-1:0]             s_slot, s_j, s_k, s_klast;
  logic [IPW-1:0]               raddr;

  seq_ctrl #(.NP(NP), .V(V), .TAPS(TAPS), .KW(KW), .LMAX(LMAX)) u_seq (
    .clk, .rst_n, .start, .persp, .k0, .busy, .frame_done, .clr,
    .lvl, .vdiv, .vsq, .s_valid, .s_slot, .s_j, .s_k, .s_klast, .raddr
  );

  // voxel memory
  vox_t vox [NP];
  for (genvar p = 0; p < NP; p++) begin : g_mem
    voxel_mem #(.NP(NP), .V(V), .LMAX(LMAX)) u_mem (
      .clk,
      .we(vw_en && w_np == p), .wlvl(vw_addr.l), .waddr(w_ip), .wdata(vw_data),
      .rlvl(lvl), .raddr, .rdata(vox[p])
    );
  end

  // shear block
  col_t col [NP];
  shear_unit #(.NP(NP), .V(V), .KW(KW)) u_shear (
    .clk, .rst_n, .persp, .k0, .ei, .ej, .si, .sj,
    .s_valid, .s_lvl(lvl), .s_slot, .s_j, .s_k, .s_klast, .col_out(col)
  );

  // resampling module
  resampler #(.NP(NP), .V(V), .TAPS(TAPS)) u_rs (
    .clk, .rst_n, .clr, .vdiv, .vsq,
    .kw_en, .kw_dir, .kw_addr, .kw_data,
    .vox_in(vox), .col_in(col), .smp_out, .col_out(smp_col), .sel_wrap(fold_sel)
  );

  assign cur_lvl = lvl;
  assign seg_clr = clr;

endmodule
