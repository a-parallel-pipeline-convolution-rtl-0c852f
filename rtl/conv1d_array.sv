// conv1d_array: NP parallel pipelines of a TAPS-tap 1D convolution along one
// direction (i, j or k), with folding for volumes wider than NP.
//
// The volume streams in skewed order: in a row of V' voxels the skewed
// position m = (i + j + k) mod V' goes to pipeline m mod NP in time slot
// m / NP, so pipeline p sees one voxel (or one partial result of an earlier
// direction) per cycle. Unit l of pipeline p adds the l-th neighbour of the
// window that started in its unit 0. As in the document, the neighbour is not
// read again from memory: each unit takes the operand that unit l-1 of
// pipeline p+1 used, through that unit's d/b register. The partial sum and
// its column payload go from unit l to unit l+1 of the same pipeline through
// the unit register plus a line delay of `ld_len` cycles: none for i, the
// j-delay V'/NP for j and the k-delay V'^2/NP for k (Table 2 of the document).
//
// Folding: pipeline NP-1 has no right-hand neighbour. Its next operand is the
// one pipeline 0 uses one slot later, taken straight from pipeline 0's unit
// l-1 input, except when the window crosses the end of a skewed row (flag
// row_last, m = V'-1). Then the operand is the one pipeline 0 used at the
// start of the row, V'/NP slots earlier, taken through the left folding
// delay of `lf_len` = V'/NP cycles; a selector picks between the two paths.
// In this derivation the one-unit folding delay of the document is the d/b
// register on every sideways path: the straight path from pipeline 0 is one
// cycle shorter than the others, as the document's delays require.
//
// Timing: unit l of an element works LAT_UNIT*l cycles after unit 0, with
// LAT_UNIT = 1 + ld_len; results leave TAPS + (TAPS-1)*ld_len cycles after
// the element entered. No stalls: a new element enters every cycle.
// `clr` restarts the delays when ld_len or lf_len change (new level).
module conv1d_array
  import ppc_pkg::*;
#(
  parameter int unsigned NP     = 4,
  parameter int unsigned TAPS   = 3,
  parameter dir_e        DIR    = DIR_I,
  parameter int unsigned LD_MAX = 0,     // 0: no line delay (i-direction)
  parameter int unsigned LF_MAX = 64     // largest left folding delay, V/NP
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            clr,
  input  logic [$clog2(LD_MAX+2)-1:0]     ld_len,
  input  logic [$clog2(LF_MAX+1)-1:0]     lf_len,
  input  logic                            kw_en,
  input  dir_e                            kw_dir,
  input  logic [KIDX_W-1:0]               kw_addr,
  input  wgt_t                            kw_data,
  input  smp_t                            x_in   [NP],
  input  col_t                            col_in [NP],
  output smp_t                            y_out  [NP],
  output col_t                            col_out[NP],
  output logic                            sel_wrap   // selector took the left folding path
);
  // per pipeline p and unit l
  smp_t c_u   [NP][TAPS];   // partial sum into unit
  col_t col_u [NP][TAPS];
  opd_t opd_u [NP][TAPS];   // operand into unit
  smp_t c_r   [NP][TAPS];   // registered outputs of unit
  col_t col_r [NP][TAPS];
  opd_t opd_r [NP][TAPS];
  opd_t opd0  [TAPS];       // pipeline 0 operands (copy, feeds pipeline NP-1)
  opd_t lfd   [TAPS];       // the same through the left folding delay

  logic [TAPS-1:0] wrap_used;

  for (genvar p = 0; p < NP; p++) begin : g_pipe
    for (genvar l = 0; l < TAPS; l++) begin : g_unit
      if (l == 0) begin : g_first
        assign c_u[p][0]   = '0;
        assign col_u[p][0] = col_in[p];
        assign opd_u[p][0] = '{v: x_in[p], b: col_in[p].p};
      end else begin : g_next
        // partial-sum path: unit register plus the line delay
        if (LD_MAX == 0) begin : g_nold
          assign c_u[p][l]   = c_r[p][l-1];
          assign col_u[p][l] = col_r[p][l-1];
        end else begin : g_ld
          logic [SMP_W+$bits(col_t)-1:0] ld_out;
          var_delay #(.W(SMP_W + $bits(col_t)), .MAX_DEPTH(LD_MAX)) u_ld (
            .clk, .rst_n, .clr, .len(ld_len),
            .din({c_r[p][l-1], col_r[p][l-1]}), .dout(ld_out)
          );
          assign {c_u[p][l], col_u[p][l]} = ld_out;
        end
        // operand path: sideways from the right-hand neighbour
        if (p < NP - 1) begin : g_side
          assign opd_u[p][l] = opd_r[p+1][l-1];
        end else begin : g_fold
          assign opd_u[p][l] = col_u[p][l].f.row_last ? lfd[l] : opd0[l-1];
        end
      end

      arith_unit #(.DIR(DIR)) u_au (
        .clk, .rst_n,
        .kw_en, .kw_dir, .kw_addr, .kw_data,
        .c_in(c_u[p][l]), .col_in(col_u[p][l]), .opd_in(opd_u[p][l]),
        .c_out(c_r[p][l]), .col_out(col_r[p][l]), .opd_out(opd_r[p][l])
      );
    end
    assign y_out[p]   = c_r[p][TAPS-1];
    assign col_out[p] = col_r[p][TAPS-1];
  end

  // left folding delays: on pipeline 0's operands of units 0..TAPS-2
  assign opd0[0] = '{v: x_in[0], b: col_in[0].p};
  for (genvar l = 1; l < TAPS; l++) begin : g_opd0
    if (NP > 1) begin : g_n
      assign opd0[l] = opd_r[1][l-1];
    end else begin : g_1
      assign opd0[l] = opd_u[0][l];
    end
  end
  assign lfd[0] = '0;
  assign wrap_used[0] = 1'b0;
  for (genvar l = 1; l < TAPS; l++) begin : g_lfd
    var_delay #(.W($bits(opd_t)), .MAX_DEPTH(LF_MAX)) u_lfd (
      .clk, .rst_n, .clr, .len(lf_len),
      .din(opd0[l-1]), .dout(lfd[l])
    );
    assign wrap_used[l] = col_u[NP-1][l].f.valid && col_u[NP-1][l].f.row_last;
  end
  assign sel_wrap = |wrap_used;

endmodule
