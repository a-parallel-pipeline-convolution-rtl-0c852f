// resampler: the resampling module between voxel memory and rendering
// pipelines: a separable TAPS x TAPS x TAPS convolution on NP pipelines.
//
// Equation (4) of the document splits the 3D convolution into three 1D
// convolutions, each with its own weight function: first along i (units
// W0..W2), then along j over the i-results (W3..W5), then along k over the
// j-results (W6..W8). Each is a conv1d_array; they differ only in the line
// delay on their partial-sum path: none for i, the j-delay V'/NP for j and
// the k-delay V'^2/NP for k, where V' = V / 2**L is the edge length of the
// resolution level being processed. The left folding delay is V'/NP in all
// three. Voxels enter as unsigned integers and become fixed-point samples
// (vox << SMP_F) in front of unit W0.
//
// Interface: every cycle one voxel and its column payload (flags, logical
// coordinates, sample point, sheared position) per pipeline. One sample per
// pipeline leaves every cycle, LATENCY = 3*TAPS + (TAPS-1)*(vdiv + vsq)
// cycles after its window-origin voxel entered; its payload says which
// window it is. `clr` must be pulsed, with no valid voxel in flight, whenever
// vdiv/vsq change.
module resampler
  import ppc_pkg::*;
#(
  parameter int unsigned NP   = 4,
  parameter int unsigned V    = 256,
  parameter int unsigned TAPS = 3
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                clr,
  input  logic [$clog2(V/NP+1)-1:0]           vdiv,   // V'/NP
  input  logic [$clog2(V*V/NP+1)-1:0]         vsq,    // V'^2/NP
  input  logic                                kw_en,
  input  dir_e                                kw_dir,
  input  logic [KIDX_W-1:0]                   kw_addr,
  input  wgt_t                                kw_data,
  input  vox_t                                vox_in [NP],
  input  col_t                                col_in [NP],
  output smp_t                                smp_out[NP],
  output col_t                                col_out[NP],
  output logic [2:0]                          sel_wrap   // per direction i, j, k
);
  localparam int unsigned LDJ_W = $clog2(V/NP + 2);
  localparam int unsigned LDK_W = $clog2(V*V/NP + 2);

  smp_t x_i [NP], y_i [NP], y_j [NP];
  logic [LDJ_W-1:0] ld_j;
  logic [LDK_W-1:0] ld_k;

  assign ld_j = LDJ_W'(vdiv);
  assign ld_k = LDK_W'(vsq);
  col_t c_i [NP], c_j [NP];

  for (genvar p = 0; p < NP; p++) begin : g_cvt
    assign x_i[p] = smp_t'({1'b0, vox_in[p]}) <<< SMP_F;
  end

  conv1d_array #(.NP(NP), .TAPS(TAPS), .DIR(DIR_I), .LD_MAX(0), .LF_MAX(V/NP)) u_i (
    .clk, .rst_n, .clr, .ld_len(1'b0), .lf_len(vdiv),
    .kw_en, .kw_dir, .kw_addr, .kw_data,
    .x_in(x_i), .col_in(col_in), .y_out(y_i), .col_out(c_i), .sel_wrap(sel_wrap[0])
  );

  conv1d_array #(.NP(NP), .TAPS(TAPS), .DIR(DIR_J), .LD_MAX(V/NP), .LF_MAX(V/NP)) u_j (
    .clk, .rst_n, .clr, .ld_len(ld_j), .lf_len(vdiv),
    .kw_en, .kw_dir, .kw_addr, .kw_data,
    .x_in(y_i), .col_in(c_i), .y_out(y_j), .col_out(c_j), .sel_wrap(sel_wrap[1])
  );

  conv1d_array #(.NP(NP), .TAPS(TAPS), .DIR(DIR_K), .LD_MAX(V*V/NP), .LF_MAX(V/NP)) u_k (
    .clk, .rst_n, .clr, .ld_len(ld_k), .lf_len(vdiv),
    .kw_en, .kw_dir, .kw_addr, .kw_data,
    .x_in(y_j), .col_in(c_j), .y_out(smp_out), .col_out(col_out), .sel_wrap(sel_wrap[2])
  );

endmodule
