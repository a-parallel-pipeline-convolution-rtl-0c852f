// tb_voxel_mem: one voxel memory module (V = 16, NP = 4, levels 0..2).
// Writes a distinct value to every word of every level, then reads all back
// (one-cycle read latency) and checks that levels do not overlap.
module tb_voxel_mem;
  import ppc_pkg::*;
  localparam int NP = 4, V = 16;
  localparam int AW = $clog2(V*V*V/NP);
  logic clk = 0, we = 0;
  logic [LVL_W-1:0] wlvl, rlvl; logic [AW-1:0] waddr, raddr;
  vox_t wdata, rdata;
  int checks = 0, failures = 0;

  voxel_mem #(.NP(NP), .V(V)) dut (.*);
  always #5 clk = ~clk;

  function automatic vox_t val(int l, int a);
    return vox_t'(a * 37 + l * 101 + (a >> 3));
  endfunction

  initial begin
    #10000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wlvl = 0; rlvl = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int l = 0; l <= 2; l++) begin
      int n;
      n = (V >> l) * (V >> l) * (V >> l) / NP;
      for (int a = 0; a < n; a++) begin
        @(negedge clk); we = 1; wlvl = LVL_W'(l); waddr = AW'(a); wdata = val(l, a);
      end
    end
    @(negedge clk); we = 0;
    for (int l = 0; l <= 2; l++) begin
      int n;
      n = (V >> l) * (V >> l) * (V >> l) / NP;
      for (int a = 0; a < n; a++) begin
        rlvl = LVL_W'(l); raddr = AW'(a);
        @(negedge clk);
        checks++;
        if (rdata !== val(l, a)) begin
          failures++;
          if (failures < 10) $display("L%0d a%0d: got %0d want %0d", l, a, rdata, val(l, a));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
