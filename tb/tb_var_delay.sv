// tb_var_delay: checks the variable delay element at several lengths.
// Random words enter every cycle; after each clear the output must be zero
// for `len` cycles and then equal the input of `len` cycles before.
module tb_var_delay;
  localparam int W = 16, MAXD = 32;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [$clog2(MAXD+1)-1:0] len;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;
  logic [W-1:0] hist [$];

  var_delay #(.W(W), .MAX_DEPTH(MAXD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lens [5] = '{1, 2, 5, 16, 32};
    len = 1; din = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (lens[n]) begin
      @(negedge clk); clr = 1; len = lens[n]; din = W'($urandom);
      @(negedge clk); clr = 0;
      hist.delete();
      for (int t = 0; t < 3 * lens[n] + 10; t++) begin
        din = W'($urandom);
        #1;
        checks++;
        if (t < lens[n]) begin
          if (dout !== '0) begin failures++; $display("len %0d t %0d: not zero before primed", lens[n], t); end
        end else if (dout !== hist[t - lens[n]]) begin
          failures++; $display("len %0d t %0d: got %h want %h", lens[n], t, dout, hist[t - lens[n]]);
        end
        hist.push_back(din);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
