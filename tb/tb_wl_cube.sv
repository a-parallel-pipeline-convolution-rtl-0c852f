// tb_wl_cube: the opaque-cube experiment, run through the whole design.
// A 64^3 volume holding a solid cube (value 255, edge 48, centred) is
// loaded with all its resolution levels (coarser levels are 2x2x2 means,
// as the host would prepare them). All three directions use the 2-point
// Lagrange (linear interpolation) kernel, which a 3-tap table holds with
// its third weight zero. One perspective frame is rendered with the eye
// above the cube centre at k0 = 16, which uses levels 0 to 2. Every
// in-slab sample is checked against the nested-sum reference; the frame
// length, sample count and levels are checked against an independent plan.
// Properties of the workload: with non-negative weights and data no sample
// may be negative; samples deep in the cube at level 0, where positions are
// whole pixels, must reach full scale (255 << 8) exactly; the left folding selectors and level
// changes must occur. The cube size and kernel follow the published
// experiment; the cube's placement and the eye position are chosen here.

module tb_wl_cube;
  import ppc_pkg::*;
  import tb_ref_pkg::*;
  localparam int NP = 4, V = 64, KW = 16, TAPS = 3;
  localparam int LMAX = $clog2(V / NP);
  localparam smp_t FULL = smp_t'(255) <<< SMP_F;

  logic clk = 0, rst_n = 0;
  logic vw_en = 0; coord_t vw_addr; vox_t vw_data;
  logic kw_en = 0; dir_e kw_dir; logic [KIDX_W-1:0] kw_addr; wgt_t kw_data;
  logic persp = 0; logic [KW-1:0] k0 = 1; pos_t ei = 0, ej = 0, si = 0, sj = 0;
  logic start = 0, busy, frame_done;
  smp_t smp_out [NP]; col_t smp_col [NP];
  logic [LVL_W-1:0] cur_lvl; logic seg_clr; logic [2:0] fold_sel;

  int checks = 0, failures = 0;
  longint n_valid, n_slab, n_clr, n_full, n_over;
  longint n_fold [3];
  longint n_lvl [8];
  real s_sum, s_sq;
  bit checking = 0;

  ppc_top #(.V(V)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (checking) begin
    if (seg_clr) n_clr++;
    for (int d = 0; d < 3; d++) if (fold_sel[d]) n_fold[d]++;
    for (int p = 0; p < NP; p++) if (smp_col[p].f.valid) begin
      int l, i, j, k;
      l = smp_col[p].c.l; i = smp_col[p].c.i; j = smp_col[p].c.j; k = smp_col[p].c.k;
      n_valid++;
      n_lvl[l]++;
      if (smp_col[p].f.in_slab) begin
        smp_t e;
        n_slab++;
        e = ref_s(l, V >> l, i, j, k);
        checks++;
        if (smp_out[p] !== e) begin
          failures++;
          if (failures < 10) $display("L%0d (%0d,%0d,%0d): got %0d want %0d", l, i, j, k, smp_out[p], e);
        end
        if (smp_out[p] == FULL) n_full++;
        if (smp_out[p] < 0) n_over++;
        s_sum += real'(smp_out[p]);
        s_sq += real'(smp_out[p]) * real'(smp_out[p]);
      end
    end
  end

  // independent plan of a frame: segments, slots, in-slab windows, cycles
  longint exp_cycles, exp_slots, exp_slab;
  int exp_levels;
  task automatic plan(input bit pp, input int kz);
    int kcur;
    bit seen [int];
    kcur = 0; exp_cycles = 0; exp_slots = 0; exp_slab = 0; exp_levels = 0;
    while (kcur < V) begin
      int l, khi, vp, clo, chi, ka, kb;
      real mm;
      l = 0;
      if (pp) begin
        mm = 1.0 + real'(kcur) / real'(kz);
        while (l < LMAX && mm >= 2.0 ** (l + 1)) l++;
      end
      khi = (!pp || l == LMAX) ? V : kz * ((1 << (l + 1)) - 1);
      if (khi > V) khi = V;
      vp = V >> l;
      clo = kcur >> l; chi = (khi - 1) >> l;
      ka = (clo == 0) ? 0 : clo - 1;
      kb = (chi + 1 > vp - 1) ? vp - 1 : chi + 1;
      exp_slots += longint'(kb - ka + 1) * vp * vp / NP;
      if (kb - ka >= 2) exp_slab += longint'(kb - ka - 1) * vp * (vp - 2);
      exp_cycles += 1 + longint'(kb - ka + 1) * vp * vp / NP
                  + 3 * TAPS + 4 + (TAPS - 1) * (vp / NP + vp * vp / NP) + 1;
      if (!seen.exists(l)) exp_levels++;
      seen[l] = 1;
      kcur = khi;
    end
  endtask

  task automatic kernels(input int shape);
    for (int d = 0; d < 3; d++)
      for (int n = 0; n < KSIZE; n++) begin
        @(negedge clk);
        kw_en = 1; kw_dir = dir_e'(d); kw_addr = KIDX_W'(n);
        kw_data = kshape(shape, n);
        ktab[d][n] = kw_data;
      end
    @(negedge clk); kw_en = 0;
  endtask

  // renders one frame and returns the variance of its in-slab samples
  task automatic frame(input int kz, input pos_t e_i, input pos_t e_j, output real var_out);
    longint cyc = 0, v0, s0, c0;
    int lv_seen;
    plan(1, kz);
    ref_mode = 1; ref_persp = 1; ref_k0 = kz; ref_ei = e_i; ref_ej = e_j; ref_si = 0; ref_sj = 0;
    @(negedge clk);
    persp = 1; k0 = KW'(kz); ei = e_i; ej = e_j; si = 0; sj = 0;
    for (int l = 0; l < 8; l++) n_lvl[l] = 0;
    v0 = n_valid; s0 = n_slab; c0 = n_clr; s_sum = 0; s_sq = 0;
    start = 1; checking = 1;
    @(negedge clk); start = 0;
    while (!frame_done) begin cyc++; @(negedge clk); end
    checking = 0;
    lv_seen = 0;
    for (int l = 0; l < 8; l++) if (n_lvl[l] != 0) lv_seen++;
    checks += 4;
    if (cyc != exp_cycles) begin failures++; $display("frame: %0d cycles, expected %0d", cyc, exp_cycles); end
    if (n_valid - v0 != exp_slots * NP) begin failures++; $display("frame: %0d samples, expected %0d", n_valid - v0, exp_slots * NP); end
    if (n_slab - s0 != exp_slab) begin failures++; $display("frame: %0d in-slab samples, expected %0d", n_slab - s0, exp_slab); end
    if (lv_seen != exp_levels || n_clr - c0 == 0) begin failures++; $display("frame: %0d levels, expected %0d", lv_seen, exp_levels); end
    var_out = s_sq / real'(n_slab - s0) - (s_sum / real'(n_slab - s0)) ** 2;
    $display("frame k0=%0d: %0d cycles, %0d levels, %0d samples, variance %0.1f", kz, cyc, lv_seen, n_valid - v0, var_out);
  endtask

  initial begin
    real var_a, var_b;
    vw_addr = '0; vw_data = 0; kw_dir = DIR_I; kw_addr = 0; kw_data = 0;
    vol_build(V, LMAX, 0);
    repeat (2) @(posedge clk); rst_n = 1;
    for (int l = 0; l <= LMAX; l++)
      for (int k = 0; k < (V >> l); k++)
        for (int j = 0; j < (V >> l); j++)
          for (int i = 0; i < (V >> l); i++) begin
            @(negedge clk);
            vw_en = 1; vw_addr.l = LVL_W'(l); vw_addr.i = CRD_W'(i); vw_addr.j = CRD_W'(j);
            vw_addr.k = CRD_W'(k); vw_data = vox_at(l, i, j, k);
          end
    @(negedge clk); vw_en = 0;
    kernels(1);
    frame(16, pos_t'(V / 2 * 256), pos_t'(V / 2 * 256), var_a);
    checks += 2;
    if (n_over != 0) begin failures++; $display("%0d negative samples", n_over); end
    if (n_full == 0) begin failures++; $display("no sample reached full scale"); end
    $display("cube: %0d samples at full scale", n_full);
    var_b = var_a;
    for (int d = 0; d < 3; d++) begin
      checks++;
      if (n_fold[d] == 0) begin failures++; $display("left folding selector %0d never used", d); end
    end
    $display("mechanisms: segment clears %0d, selector uses i/j/k %0d/%0d/%0d",
             n_clr, n_fold[0], n_fold[1], n_fold[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
