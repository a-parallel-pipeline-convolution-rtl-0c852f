// tb_seq_ctrl: runs frames of a V = 16, NP = 4 volume (perspective with
// k0 = 1, 3 and 20, and parallel) and checks the stream the sequencer issues
// against an independent plan of the segments: level per segment, slices
// read, row/slot order, memory index, delay lengths, one clear per segment,
// and the frame length in cycles.
module tb_seq_ctrl;
  import ppc_pkg::*;
  localparam int NP = 4, V = 16, KW = 16, TAPS = 3;
  logic clk = 0, rst_n = 0, start = 0, persp; logic [KW-1:0] k0;
  logic busy, frame_done, clr, s_valid;
  logic [LVL_W-1:0] lvl;
  logic [$clog2(V/NP+1)-1:0] vdiv; logic [$clog2(V*V/NP+1)-1:0] vsq;
  logic [CRD_W-1:0] s_slot, s_j, s_k, s_klast;
  logic [$clog2(V*V*V/NP)-1:0] raddr;
  int checks = 0, failures = 0;

  seq_ctrl #(.NP(NP), .V(V), .TAPS(TAPS), .KW(KW)) dut (.*);
  always #5 clk = ~clk;

  typedef struct { int l, slot, j, k, klast, addr; } slot_t;
  slot_t plan [$];
  int exp_cycles, nseg;

  initial begin
    #50000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_plan(input bit pp, input int kz);
    int kcur;
    plan.delete(); exp_cycles = 0; nseg = 0; kcur = 0;
    while (kcur < V) begin
      int l, khi, vp, clo, chi, ka, kb, f;
      real mm;
      l = 0;
      if (pp) begin
        mm = 1.0 + real'(kcur) / real'(kz);
        while (l < 2 && mm >= 2.0 ** (l + 1)) l++;
      end
      khi = (!pp || l == 2) ? V : kz * ((1 << (l + 1)) - 1);
      if (khi > V) khi = V;
      vp = V >> l;
      clo = kcur >> l; chi = (khi - 1) >> l;
      ka = (clo == 0) ? 0 : clo - 1;
      kb = (chi + 1 > vp - 1) ? vp - 1 : chi + 1;
      for (int k = ka; k <= kb; k++)
        for (int j = 0; j < vp; j++)
          for (int s = 0; s < vp / NP; s++)
            plan.push_back('{l, s, j, k, kb, s + j * vp / NP + k * vp * vp / NP});
      f = 3 * TAPS + 4 + (TAPS - 1) * (vp / NP + vp * vp / NP);
      exp_cycles += 1 + (kb - ka + 1) * vp * vp / NP + f + 1;
      nseg++;
      kcur = khi;
    end
  endtask

  task automatic frame(input bit pp, input int kz);
    int cyc = 0, nclr = 0, idx = 0;
    make_plan(pp, kz);
    @(negedge clk); persp = pp; k0 = KW'(kz); start = 1;
    @(negedge clk); start = 0;
    while (!frame_done) begin
      cyc++;
      if (clr) nclr++;
      if (s_valid) begin
        checks++;
        if (idx >= plan.size() || lvl != plan[idx].l || s_slot != plan[idx].slot || s_j != plan[idx].j ||
            s_k != plan[idx].k || s_klast != plan[idx].klast || raddr != plan[idx].addr ||
            vdiv != (V >> lvl) / NP || vsq != (V >> lvl) * (V >> lvl) / NP) begin
          failures++;
          if (failures < 10) $display("slot %0d: L%0d s%0d j%0d k%0d a%0d", idx, lvl, s_slot, s_j, s_k, raddr);
        end
        idx++;
      end
      @(negedge clk);
    end
    checks += 3;
    if (idx != plan.size()) begin failures++; $display("issued %0d of %0d slots", idx, plan.size()); end
    if (nclr != nseg) begin failures++; $display("%0d clears for %0d segments", nclr, nseg); end
    if (cyc != exp_cycles) begin failures++; $display("frame took %0d cycles, expected %0d", cyc, exp_cycles); end
    $display("persp %0d k0 %0d: %0d segments, %0d cycles", pp, kz, nseg, cyc);
  endtask

  initial begin
    persp = 0; k0 = 1;
    repeat (2) @(posedge clk); rst_n = 1;
    frame(1, 1);
    frame(1, 3);
    frame(1, 20);
    frame(0, 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
