// tb_ref_pkg: reference arithmetic shared by the testbenches.
//
// Holds the testbench copy of the three kernel tables, a voxel value
// function, simple synthetic positions for testing the convolvers without
// the shear block, and a reference for the shear block's positions. A
// volume may also be stored here, every resolution level with the coarser
// ones built by averaging 2x2x2 blocks as a host would before loading; the
// references then read it instead of the hash function. The
// reference convolution is written as the plain nested sums of the
// separable convolution, without any of the systolic timing.
package tb_ref_pkg;
  import ppc_pkg::*;

  wgt_t ktab [3][KSIZE];

  function automatic wgt_t kw(input int dir, input pos_t delta);
    longint q;
    q = longint'(delta) >>> (POS_F - KIDX_F);
    if (q < -(KSIZE / 2) || q >= KSIZE / 2) return '0;
    return ktab[dir][int'(q) & (KSIZE - 1)];
  endfunction

  // one product term as the unit computes it
  function automatic smp_t term(input wgt_t w, input smp_t x);
    longint p;
    p = longint'(w) * longint'(x);
    return smp_t'(p >>> WGT_F);
  endfunction

  function automatic vox_t vox_hash(input int l, input int i, input int j, input int k);
    int unsigned h;
    h = (l * 131 + i * 7919 + j * 104729 + k * 15485863) ^ 32'h5bd1e995;
    h = h ^ (h >> 13);
    h = h * 32'h27d4eb2d;
    return vox_t'(h >> 11);
  endfunction

  // optional stored volume: vol_use selects it over vox_hash
  bit   vol_use = 0;
  int   vol_v = 0;
  vox_t vol [];

  function automatic longint vol_base(input int l);
    longint b = 0;
    for (int m = 0; m < l; m++) b += longint'(vol_v >> m) ** 3;
    return b;
  endfunction
  function automatic longint vol_idx(input int l, input int i, input int j, input int k);
    longint vp = longint'(vol_v >> l);
    return vol_base(l) + (longint'(k) * vp + longint'(j)) * vp + longint'(i);
  endfunction
  function automatic vox_t vox_at(input int l, input int i, input int j, input int k);
    return vol_use ? vol[vol_idx(l, i, j, k)] : vox_hash(l, i, j, k);
  endfunction

  // Fill every level of a v^3 volume: level 0 from shape (0: solid cube of
  // edge v*3/4 in the middle, 1: checker-board alternating every voxel),
  // level l as the rounded mean of the 2x2x2 blocks of level l-1.
  function automatic void vol_build(input int v, input int lmax, input int shape);
    vol_v = v; vol_use = 1;
    vol = new[vol_base(lmax + 1)];
    for (int k = 0; k < v; k++)
      for (int j = 0; j < v; j++)
        for (int i = 0; i < v; i++) begin
          bit on;
          if (shape == 0) on = i >= v / 8 && i < v - v / 8 && j >= v / 8 && j < v - v / 8
                               && k >= v / 8 && k < v - v / 8;
          else on = ((i + j + k) & 1) != 0;
          vol[vol_idx(0, i, j, k)] = on ? 8'd255 : 8'd0;
        end
    for (int l = 1; l <= lmax; l++)
      for (int k = 0; k < (v >> l); k++)
        for (int j = 0; j < (v >> l); j++)
          for (int i = 0; i < (v >> l); i++) begin
            int sum = 0;
            for (int d = 0; d < 8; d++)
              sum += int'(vol[vol_idx(l - 1, 2 * i + (d & 1), 2 * j + ((d >> 1) & 1), 2 * k + (d >> 2))]);
            vol[vol_idx(l, i, j, k)] = vox_t'((sum + 4) >> 3);
          end
  endfunction

  // Kernel shapes as tables (entry n holds the weight of distance q/16,
  // q = n taken as a signed 7-bit number, Q.10):
  // 0: nearest neighbour, 1: 2-point Lagrange (linear), 2: 3-point box,
  // 3: 3-point Lagrange (quadratic).
  function automatic wgt_t kshape(input int shape, input int n);
    real d = real'(n < KSIZE / 2 ? n : n - KSIZE) / real'(1 << KIDX_F);
    real a = d < 0 ? -d : d;
    real w = 0.0;
    case (shape)
      0: w = (d > -0.5 && d <= 0.5) ? 1.0 : 0.0;
      1: w = a < 1.0 ? 1.0 - a : 0.0;
      2: w = a < 1.5 ? 1.0 / 3.0 : 0.0;
      default: w = a <= 0.5 ? 1.0 - a * a : (a < 1.5 ? (a - 1.0) * (a - 2.0) / 2.0 : 0.0);
    endcase
    return wgt_t'($rtoi(w * real'(1 << WGT_F) + (w < 0 ? -0.5 : 0.5)));
  endfunction

  // synthetic positions used by the convolver testbenches
  function automatic pos_t syn_pi(input int i, input int k);
    return pos_t'(i * 200 + k * 13);
  endfunction
  function automatic pos_t syn_pj(input int j, input int k);
    return pos_t'(j * 230 + k * 7);
  endfunction
  function automatic col_t syn_col(input int l, input int i, input int j, input int k,
                                   input int vp, input int klast, input bit valid,
                                   input bit row_last);
    col_t c;
    c.f.valid    = valid;
    c.f.row_last = row_last;
    c.f.in_slab  = (j + 2 < vp) && (k + 2 <= klast);
    c.c.l = LVL_W'(l); c.c.i = CRD_W'(i); c.c.j = CRD_W'(j); c.c.k = CRD_W'(k);
    c.p.i = syn_pi(i, k);
    c.p.j = syn_pj(j, k);
    c.p.k = pos_t'(k) <<< POS_F;
    c.a.i = (syn_pi(i + 1, k) >>> POS_F) <<< POS_F;
    c.a.j = (syn_pj(j + 1, k) >>> POS_F) <<< POS_F;
    c.a.k = pos_t'(k + 1) <<< POS_F;
    return c;
  endfunction

  // shear block reference: position along i or j
  function automatic pos_t ref_place(input int x, input int l, input int kp,
                                     input bit persp, input int k0,
                                     input pos_t e, input pos_t sh);
    longint korig, r, t;
    korig = longint'(kp) << l;
    if (!persp || (k0 + korig) == 0) r = 65536;
    else r = (longint'(k0) * 65536) / (longint'(k0) + korig);
    t = (longint'(x) << (l + POS_F)) + korig * longint'(sh) - longint'(e);
    return pos_t'(longint'(e) + ((t * r) >>> 16));
  endfunction

  // Reference separable convolution over an arbitrary position model.
  // pi/pj/ai/aj are supplied through these function pointers' results:
  // mode 0 = synthetic positions, mode 1 = shear-block positions.
  int   ref_mode;
  bit   ref_persp;
  int   ref_k0;
  pos_t ref_ei, ref_ej, ref_si, ref_sj;

  function automatic pos_t pos_i(input int l, input int i, input int k);
    if (ref_mode == 0) return syn_pi(i, k);
    return ref_place(i, l, k, ref_persp, ref_k0, ref_ei, ref_si);
  endfunction
  function automatic pos_t pos_j(input int l, input int j, input int k);
    if (ref_mode == 0) return syn_pj(j, k);
    return ref_place(j, l, k, ref_persp, ref_k0, ref_ej, ref_sj);
  endfunction
  function automatic pos_t flr(input pos_t x);
    return (x >>> POS_F) <<< POS_F;
  endfunction

  // i-direction result of the window starting at (i, j, k)
  function automatic smp_t ref_a(input int l, input int vp, input int i, input int j, input int k);
    smp_t s = 0;
    pos_t ai = flr(pos_i(l, i + 1, k));
    for (int t = 0; t < 3; t++) begin
      int ii = (i + t) % vp;
      s += term(kw(0, ai - pos_i(l, ii, k)), smp_t'(vox_at(l, ii, j, k)) <<< SMP_F);
    end
    return s;
  endfunction
  function automatic smp_t ref_b(input int l, input int vp, input int i, input int j, input int k);
    smp_t s = 0;
    pos_t aj = flr(pos_j(l, j + 1, k));
    for (int t = 0; t < 3; t++)
      s += term(kw(1, aj - pos_j(l, j + t, k)), ref_a(l, vp, i, j + t, k));
    return s;
  endfunction
  function automatic smp_t ref_s(input int l, input int vp, input int i, input int j, input int k);
    smp_t s = 0;
    for (int t = 0; t < 3; t++)
      s += term(kw(2, (pos_t'(k + 1) <<< POS_F) - (pos_t'(k + t) <<< POS_F)),
                ref_b(l, vp, i, j, k + t));
    return s;
  endfunction

endpackage
