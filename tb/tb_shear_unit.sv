// tb_shear_unit: drives stream positions (levels 0..2 of V = 16, perspective
// and parallel, several eye positions and shears) and checks, one cycle
// later, each pipeline's logical coordinates (i' from the skew), flags,
// sheared position and sample point against an independent reference.
module tb_shear_unit;
  import ppc_pkg::*;
  import tb_ref_pkg::*;
  localparam int NP = 4, V = 16, KW = 16;
  logic clk = 0, rst_n = 0;
  logic persp; logic [KW-1:0] k0; pos_t ei, ej, si, sj;
  logic s_valid; logic [LVL_W-1:0] s_lvl; logic [CRD_W-1:0] s_slot, s_j, s_k, s_klast;
  col_t col_out [NP];
  int checks = 0, failures = 0;

  shear_unit #(.NP(NP), .V(V), .KW(KW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    persp = 0; k0 = 1; ei = 0; ej = 0; si = 0; sj = 0;
    s_valid = 0; s_lvl = 0; s_slot = 0; s_j = 0; s_k = 0; s_klast = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int l, vp, slot, jj, kk, kl;
      l = $urandom_range(0, 2); vp = V >> l;
      slot = $urandom_range(0, vp / NP - 1); jj = $urandom_range(0, vp - 1);
      kk = $urandom_range(0, vp - 1); kl = $urandom_range(0, vp - 1);
      @(negedge clk);
      persp = 1'($urandom); k0 = KW'($urandom_range(1, 40));
      ei = pos_t'($urandom_range(0, 4096)); ej = pos_t'($urandom_range(0, 4096));
      si = pos_t'(int'($urandom_range(0, 200)) - 100); sj = pos_t'(int'($urandom_range(0, 200)) - 100);
      s_valid = 1'($urandom); s_lvl = LVL_W'(l); s_slot = CRD_W'(slot);
      s_j = CRD_W'(jj); s_k = CRD_W'(kk); s_klast = CRD_W'(kl);
      ref_mode = 1; ref_persp = persp; ref_k0 = k0; ref_ei = ei; ref_ej = ej; ref_si = si; ref_sj = sj;
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        int m, ii;
        col_t e;
        m = slot * NP + p;
        ii = ((m - jj - kk) % vp + vp) % vp;
        e.f.valid = s_valid; e.f.row_last = (m == vp - 1);
        e.f.in_slab = (jj + 2 < vp) && (kk + 2 <= kl);
        e.c.l = LVL_W'(l); e.c.i = CRD_W'(ii); e.c.j = CRD_W'(jj); e.c.k = CRD_W'(kk);
        e.p.i = pos_i(l, ii, kk); e.p.j = pos_j(l, jj, kk); e.p.k = pos_t'(kk * 256);
        e.a.i = flr(pos_i(l, ii + 1, kk)); e.a.j = flr(pos_j(l, jj + 1, kk));
        e.a.k = pos_t'((kk + 1) * 256);
        checks++;
        if (col_out[p] !== e) begin
          failures++;
          if (failures < 10) $display("n %0d p %0d: got %p want %p", n, p, col_out[p], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
