// tb_level_select: for many eye distances k0 and all slices k of a V = 256
// volume, checks L = floor(log2(1 + k/k0)) (capped at LMAX = 6) computed
// with real arithmetic, the start of the next level, and parallel mode.
module tb_level_select;
  import ppc_pkg::*;
  localparam int V = 256, NP = 4, LMAX = 6, KW = 16;
  logic persp; logic [KW-1:0] k0; logic [CRD_W-1:0] k;
  logic [LVL_W-1:0] lvl; logic [KW+LMAX+1:0] k_next;
  int checks = 0, failures = 0;

  level_select #(.V(V), .NP(NP), .LMAX(LMAX), .KW(KW)) dut (.*);

  initial begin
    #100000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k0s [8] = '{1, 2, 3, 7, 16, 50, 255, 1000};
    foreach (k0s[n]) begin
      for (int kk = 0; kk < V; kk++) begin
        int el, en;
        real mm;
        persp = 1; k0 = KW'(k0s[n]); k = CRD_W'(kk);
        #1;
        mm = 1.0 + real'(kk) / real'(k0s[n]);
        el = 0;
        while (el < LMAX && mm >= 2.0 ** (el + 1)) el++;
        en = (el == LMAX) ? V : k0s[n] * ((1 << (el + 1)) - 1);
        if (en > V) en = V;
        checks += 2;
        if (lvl != el) begin failures++; if (failures < 10) $display("k0 %0d k %0d: L %0d want %0d", k0s[n], kk, lvl, el); end
        if (k_next != en) begin failures++; if (failures < 10) $display("k0 %0d k %0d: next %0d want %0d", k0s[n], kk, k_next, en); end
        persp = 0;
        #1;
        checks++;
        if (lvl != 0 || k_next != V) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
