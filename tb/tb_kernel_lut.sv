// tb_kernel_lut: loads random weights into the three direction tables and
// checks the weight read back for random distances, including distances
// outside [-4, 4) (weight zero) and writes meant for another direction.
module tb_kernel_lut;
  import ppc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0; dir_e wr_dir; logic [KIDX_W-1:0] wr_addr; wgt_t wr_data;
  pos_t delta; wgt_t w;
  wgt_t model [KSIZE];
  int checks = 0, failures = 0;

  kernel_lut #(.DIR(DIR_J)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_dir = DIR_I; wr_addr = 0; wr_data = 0; delta = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < KSIZE; n++) model[n] = '0;
    // writes to J land, writes to I and K are ignored
    for (int n = 0; n < 3 * KSIZE; n++) begin
      @(negedge clk);
      wr_en = 1; wr_dir = dir_e'(n % 3); wr_addr = KIDX_W'($urandom); wr_data = wgt_t'($urandom);
      if (wr_dir == DIR_J) model[wr_addr] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      int d, q; wgt_t exp;
      d = int'($urandom_range(0, 5000)) - 2500;   // about -9.8 .. +9.8
      delta = pos_t'(d);
      #1;
      q = (d >= 0) ? d / 16 : -((-d + 15) / 16);  // floor(d / 16)
      exp = (q >= -64 && q < 64) ? model[q & 127] : '0;
      checks++;
      if (w !== exp) begin failures++; $display("delta %0d: got %0d want %0d", d, w, exp); end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
