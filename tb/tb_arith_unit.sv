// tb_arith_unit: drives random partial sums, operands and positions into an
// i-direction unit with a random kernel and checks c = C + W(A-B)*D and the
// registered pass-through of A (column payload), B and D one cycle later.
module tb_arith_unit;
  import ppc_pkg::*;
  import tb_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  logic kw_en = 0; dir_e kw_dir; logic [KIDX_W-1:0] kw_addr; wgt_t kw_data;
  smp_t c_in, c_out; col_t col_in, col_out; opd_t opd_in, opd_out;
  int checks = 0, failures = 0;

  arith_unit #(.DIR(DIR_I)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #500000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    kw_dir = DIR_I; kw_addr = 0; kw_data = 0; c_in = 0; col_in = '0; opd_in = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < KSIZE; n++) begin
      @(negedge clk);
      kw_en = 1; kw_addr = KIDX_W'(n); kw_data = wgt_t'(int'($urandom_range(0, 2047)) - 1024);
      ktab[0][n] = kw_data;
    end
    @(negedge clk); kw_en = 0;
    for (int n = 0; n < 1000; n++) begin
      smp_t exp_c; col_t exp_col; opd_t exp_opd;
      c_in = smp_t'($urandom);
      col_in = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      opd_in = {$urandom, $urandom, $urandom};
      col_in.a.i = pos_t'(int'($urandom_range(0, 3000)) - 1500);
      opd_in.b.i = pos_t'(int'($urandom_range(0, 2000)) - 1000);
      exp_c   = c_in + term(kw(0, col_in.a.i - opd_in.b.i), opd_in.v);
      exp_col = col_in;
      exp_opd = opd_in;
      @(negedge clk);
      checks += 3;
      if (c_out !== exp_c) begin failures++; $display("c: got %0d want %0d", c_out, exp_c); end
      if (col_out !== exp_col) begin failures++; $display("col mismatch"); end
      if (opd_out !== exp_opd) begin failures++; $display("opd mismatch"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
