// arith_unit: one arithmetic unit (octagon W0..W8) of the pipelined convolver.
//
// Following the document's unit: the sample point A and the operand position
// B give the weight W = w(A - B) along this unit's direction; the unit adds
// W * D to the incoming partial sum C and registers the result as c. A is
// registered as a (it travels down the column with the sum) and B, D as b, d
// (they travel sideways to the neighbouring pipeline's next unit). The sample
// point travels inside the column payload `col`, together with the flags and
// the window-origin coordinates.
//
// Arithmetic: c = C + ((W * D) >>> WGT_F), truncated to SMP_W bits; W is
// read from this unit's own copy of the direction's kernel table. All four
// outputs are registered: one cycle from inputs to outputs.
module arith_unit
  import ppc_pkg::*;
#(
  parameter dir_e DIR = DIR_I
) (
  input  logic              clk,
  input  logic              rst_n,
  // kernel table write (broadcast)
  input  logic              kw_en,
  input  dir_e              kw_dir,
  input  logic [KIDX_W-1:0] kw_addr,
  input  wgt_t              kw_data,
  // C, A (inside col_in), D and B
  input  smp_t              c_in,
  input  col_t              col_in,
  input  opd_t              opd_in,
  // c, a, and the sideways d/b
  output smp_t              c_out,
  output col_t              col_out,
  output opd_t              opd_out
);
  pos_t delta;
  wgt_t w;
  logic signed [SMP_W+WGT_W-1:0] prod;

  always_comb begin
    unique case (DIR)
      DIR_I:   delta = col_in.a.i - opd_in.b.i;
      DIR_J:   delta = col_in.a.j - opd_in.b.j;
      default: delta = col_in.a.k - opd_in.b.k;
    endcase
  end

  kernel_lut #(.DIR(DIR)) u_lut (
    .clk, .rst_n,
    .wr_en(kw_en), .wr_dir(kw_dir), .wr_addr(kw_addr), .wr_data(kw_data),
    .delta, .w
  );

  assign prod = w * opd_in.v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_out   <= '0;
      col_out <= '0;
      opd_out <= '0;
    end else begin
      c_out   <= c_in + smp_t'(prod >>> WGT_F);
      col_out <= col_in;
      opd_out <= opd_in;
    end
  end

endmodule
