// tb_resampler: the full 3x3x3 convolver on 4 pipelines, V = 16.
// Streams whole volumes in skewed order at three levels (V' = 16, 8 and 4,
// i.e. 4, 2 and 1 slots per row, the last being the unfolded special case)
// with random kernels, and checks every sample whose window lies inside the
// volume in j and k against the nested-sum reference (i wraps around the
// row as in the design). Also checks the latency 9 + 2 V'/NP + 2 V'^2/NP
// and that the left folding selector was used in every direction.
module tb_resampler;
  import ppc_pkg::*;
  import tb_ref_pkg::*;
  localparam int NP = 4, V = 16;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [$clog2(V/NP+1)-1:0] vdiv;
  logic [$clog2(V*V/NP+1)-1:0] vsq;
  logic kw_en = 0; dir_e kw_dir; logic [KIDX_W-1:0] kw_addr; wgt_t kw_data;
  vox_t vox_in [NP]; col_t col_in [NP];
  smp_t smp_out [NP]; col_t col_out [NP];
  logic [2:0] sel_wrap;
  int checks = 0, failures = 0, cycle = 0;
  int entry [string];
  int cur_l, cur_vp, n_out, wraps [3];

  resampler #(.NP(NP), .V(V)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output checker
  always @(negedge clk) if (rst_n) begin
    for (int d = 0; d < 3; d++) if (sel_wrap[d]) wraps[d]++;
    for (int p = 0; p < NP; p++) begin
      if (col_out[p].f.valid && col_out[p].f.in_slab) begin
        int l, i, j, k, lat;
        smp_t e;
        string key;
        l = col_out[p].c.l; i = col_out[p].c.i; j = col_out[p].c.j; k = col_out[p].c.k;
        e = ref_s(l, cur_vp, i, j, k);
        checks++; n_out++;
        if (smp_out[p] !== e) begin
          failures++;
          if (failures < 10) $display("L%0d (%0d,%0d,%0d) pipe %0d: got %0d want %0d", l, i, j, k, p, smp_out[p], e);
        end
        key = $sformatf("%0d_%0d_%0d_%0d", l, i, j, k);
        lat = 9 + 2 * (cur_vp / NP) + 2 * (cur_vp * cur_vp / NP);
        checks++;
        if (!entry.exists(key) || cycle - entry[key] != lat) begin
          failures++;
          if (failures < 10) $display("latency of %s wrong", key);
        end
      end
    end
  end

  task automatic run_level(input int l);
    int vp = V >> l;
    cur_l = l; cur_vp = vp;
    @(negedge clk);
    vdiv = $bits(vdiv)'(vp / NP); vsq = $bits(vsq)'(vp * vp / NP); clr = 1;
    @(negedge clk); clr = 0;
    for (int k = 0; k < vp; k++)
      for (int j = 0; j < vp; j++)
        for (int s = 0; s < vp / NP; s++) begin
          for (int p = 0; p < NP; p++) begin
            int m = s * NP + p;
            int i = ((m - j - k) % vp + vp) % vp;
            vox_in[p] = vox_hash(l, i, j, k);
            col_in[p] = syn_col(l, i, j, k, vp, vp - 1, 1'b1, m == vp - 1);
            entry[$sformatf("%0d_%0d_%0d_%0d", l, i, j, k)] = cycle;
          end
          @(negedge clk);
        end
    for (int p = 0; p < NP; p++) begin col_in[p] = '0; vox_in[p] = 0; end
    repeat (12 + 2 * (vp / NP) + 2 * (vp * vp / NP)) @(negedge clk);
  endtask

  initial begin
    ref_mode = 0;
    kw_dir = DIR_I; kw_addr = 0; kw_data = 0; vdiv = 1; vsq = 1;
    for (int p = 0; p < NP; p++) begin col_in[p] = '0; vox_in[p] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int d = 0; d < 3; d++)
      for (int n = 0; n < KSIZE; n++) begin
        @(negedge clk);
        kw_en = 1; kw_dir = dir_e'(d); kw_addr = KIDX_W'(n);
        kw_data = wgt_t'(int'($urandom_range(0, 1023)) - 512);
        ktab[d][n] = kw_data;
      end
    @(negedge clk); kw_en = 0;
    run_level(0);
    run_level(1);
    run_level(2);
    for (int d = 0; d < 3; d++) begin
      checks++;
      if (wraps[d] == 0) begin failures++; $display("selector %0d never used", d); end
    end
    $display("samples checked %0d, selector uses %0d %0d %0d", n_out, wraps[0], wraps[1], wraps[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
