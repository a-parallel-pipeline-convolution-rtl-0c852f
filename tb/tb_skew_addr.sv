// tb_skew_addr: checks the skewed multi-resolution address map for V = 16,
// NP = 4 at every level: each (L, i, j, k) against the closed formula, and
// that the map is a bijection of each level onto NP modules x V'^3/NP words.
module tb_skew_addr;
  import ppc_pkg::*;
  localparam int NP = 4, V = 16;
  logic [LVL_W-1:0] lvl; logic [CRD_W-1:0] i, j, k;
  logic [$clog2(NP)-1:0] np; logic [$clog2(V*V*V/NP)-1:0] ip;
  int checks = 0, failures = 0;

  skew_addr #(.NP(NP), .V(V)) dut (.*);

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l <= 2; l++) begin
      int vp;
      bit seen [int];
      vp = V >> l;
      seen.delete();
      for (int kk = 0; kk < vp; kk++)
        for (int jj = 0; jj < vp; jj++)
          for (int ii = 0; ii < vp; ii++) begin
            int m, enp, eip, key;
            lvl = LVL_W'(l); i = CRD_W'(ii); j = CRD_W'(jj); k = CRD_W'(kk);
            #1;
            m = (ii + jj + kk) % vp;
            enp = m % NP;
            eip = m / NP + jj * vp / NP + kk * vp * vp / NP;
            checks++;
            if (np != enp || ip != eip) begin
              failures++;
              if (failures < 10) $display("L%0d (%0d,%0d,%0d): got %0d/%0d want %0d/%0d", l, ii, jj, kk, np, ip, enp, eip);
            end
            key = int'(np) * 100000 + int'(ip);
            checks++;
            if (seen.exists(key) || ip >= vp * vp * vp / NP) failures++;
            seen[key] = 1;
          end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
