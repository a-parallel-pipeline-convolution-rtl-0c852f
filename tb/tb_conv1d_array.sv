// tb_conv1d_array: one i-direction and one j-direction 1D convolver on 4
// pipelines, both fed the same skewed stream of random operands with
// synthetic positions, for row lengths V' = 32, 8 and 4. Checks each result
// against the 3-tap sum, the latency (3, and 3 + 2 V'/NP with the j-delay),
// and that the folding selector took the left folding path.
module tb_conv1d_array;
  import ppc_pkg::*;
  import tb_ref_pkg::*;
  localparam int NP = 4, V = 32;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [$clog2(V/NP+1)-1:0] vdiv;
  logic [$clog2(V/NP+2)-1:0] ldj;
  logic kw_en = 0; dir_e kw_dir; logic [KIDX_W-1:0] kw_addr; wgt_t kw_data;
  smp_t x_in [NP]; col_t col_in [NP];
  smp_t yi [NP], yj [NP]; col_t ci [NP], cj [NP];
  logic wi, wj;
  int checks = 0, failures = 0, cycle = 0, cur_vp, nwi = 0, nwj = 0;
  int entry [string];

  conv1d_array #(.NP(NP), .DIR(DIR_I), .LD_MAX(0), .LF_MAX(V/NP)) dut_i (
    .clk, .rst_n, .clr, .ld_len(1'b0), .lf_len(vdiv), .kw_en, .kw_dir, .kw_addr, .kw_data,
    .x_in, .col_in, .y_out(yi), .col_out(ci), .sel_wrap(wi));
  conv1d_array #(.NP(NP), .DIR(DIR_J), .LD_MAX(V/NP), .LF_MAX(V/NP)) dut_j (
    .clk, .rst_n, .clr, .ld_len(ldj), .lf_len(vdiv), .kw_en, .kw_dir, .kw_addr, .kw_data,
    .x_in, .col_in, .y_out(yj), .col_out(cj), .sel_wrap(wj));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic smp_t xval(int i, int j, int k);
    return smp_t'(vox_hash(0, i, j, k)) <<< SMP_F;
  endfunction

  initial begin
    #5000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n) begin
    if (wi) nwi++;
    if (wj) nwj++;
    for (int p = 0; p < NP; p++) begin
      if (ci[p].f.valid) begin
        int i, j, k;
        smp_t e;
        i = ci[p].c.i; j = ci[p].c.j; k = ci[p].c.k; e = 0;
        for (int t = 0; t < 3; t++) begin
          int ii;
          ii = (i + t) % cur_vp;
          e += term(kw(0, ci[p].a.i - syn_pi(ii, k)), xval(ii, j, k));
        end
        checks += 2;
        if (yi[p] !== e) begin failures++; if (failures < 10) $display("I (%0d,%0d,%0d): got %0d want %0d", i, j, k, yi[p], e); end
        if (cycle - entry[$sformatf("%0d_%0d_%0d", i, j, k)] != 3) failures++;
      end
      if (cj[p].f.valid && cj[p].c.j + 2 < cur_vp) begin
        int i, j, k;
        smp_t e;
        i = cj[p].c.i; j = cj[p].c.j; k = cj[p].c.k; e = 0;
        for (int t = 0; t < 3; t++)
          e += term(kw(1, cj[p].a.j - syn_pj(j + t, k)), xval(i, j + t, k));
        checks += 2;
        if (yj[p] !== e) begin failures++; if (failures < 10) $display("J (%0d,%0d,%0d): got %0d want %0d", i, j, k, yj[p], e); end
        if (cycle - entry[$sformatf("%0d_%0d_%0d", i, j, k)] != 3 + 2 * (cur_vp / NP)) failures++;
      end
    end
  end

  task automatic run(input int vp, input int nk);
    cur_vp = vp;
    @(negedge clk);
    vdiv = $bits(vdiv)'(vp / NP); ldj = $bits(ldj)'(vp / NP); clr = 1;
    @(negedge clk); clr = 0;
    for (int k = 0; k < nk; k++)
      for (int j = 0; j < vp; j++)
        for (int s = 0; s < vp / NP; s++) begin
          for (int p = 0; p < NP; p++) begin
            int m = s * NP + p;
            int i = ((m - j - k) % vp + vp) % vp;
            x_in[p] = xval(i, j, k);
            col_in[p] = syn_col(0, i, j, k, vp, nk - 1, 1'b1, m == vp - 1);
            entry[$sformatf("%0d_%0d_%0d", i, j, k)] = cycle;
          end
          @(negedge clk);
        end
    for (int p = 0; p < NP; p++) begin col_in[p] = '0; x_in[p] = 0; end
    repeat (8 + 2 * (vp / NP)) @(negedge clk);
  endtask

  initial begin
    kw_dir = DIR_I; kw_addr = 0; kw_data = 0; vdiv = 1; ldj = 1;
    for (int p = 0; p < NP; p++) begin col_in[p] = '0; x_in[p] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int d = 0; d < 2; d++)
      for (int n = 0; n < KSIZE; n++) begin
        @(negedge clk);
        kw_en = 1; kw_dir = dir_e'(d); kw_addr = KIDX_W'(n);
        kw_data = wgt_t'(int'($urandom_range(0, 2047)) - 1024);
        ktab[d][n] = kw_data;
      end
    @(negedge clk); kw_en = 0;
    run(32, 3);
    run(8, 3);
    run(4, 3);
    checks += 2;
    if (nwi == 0) begin failures++; $display("i selector never used"); end
    if (nwj == 0) begin failures++; $display("j selector never used"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
