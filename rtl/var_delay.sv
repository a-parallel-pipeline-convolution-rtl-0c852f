// var_delay: variable delay element built from a circular memory.
//
// One pointer addresses the memory for both the read and the write of a
// cycle: the word read is the one written `len` cycles earlier, and the new
// word goes into the same location. The pointer wraps after `len` locations,
// so changing `len` changes the delay without moving any data. This is the
// structure the document proposes for the j-delay, k-delay and left folding
// delay, whose lengths depend on the resolution level being processed.
//
// Interface: `din` enters every cycle; `dout` is `din` from `len` cycles ago.
// `len` may range over 1..MAX_DEPTH and must only change together with `clr`.
// `clr` restarts the pointer; until `len` words have been written after it,
// `dout` reads as zero so that stale contents are never seen (this design's
// own choice: the memory itself is not reset). The read is combinational
// from the memory array.
module var_delay #(
  parameter int unsigned W         = 8,
  parameter int unsigned MAX_DEPTH = 16384
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clr,
  input  logic [$clog2(MAX_DEPTH+1)-1:0] len,
  input  logic [W-1:0]                 din,
  output logic [W-1:0]                 dout
);
  localparam int unsigned AW = (MAX_DEPTH > 1) ? $clog2(MAX_DEPTH) : 1;

  logic [W-1:0]  mem [MAX_DEPTH];
  logic [AW-1:0] ptr;
  logic          primed;

  assign dout = primed ? mem[ptr] : '0;

  always_ff @(posedge clk) begin
    mem[ptr] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr    <= '0;
      primed <= 1'b0;
    end else if (clr) begin
      ptr    <= '0;
      primed <= 1'b0;
    end else if (len <= 1 || ptr == AW'(len - 1'b1)) begin
      ptr    <= '0;
      primed <= 1'b1;
    end else begin
      ptr    <= ptr + 1'b1;
    end
  end

endmodule
