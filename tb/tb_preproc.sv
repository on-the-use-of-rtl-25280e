// tb_preproc: the pre-processing module in two configurations: the default
// size (N=1296, 8 reliability units in parallel) and a small serial one
// (N=64, one unit used once per cell). Each instance is driven and checked by
// preproc_check: random cell reads with random gaps, both page layouts, the
// expected word and reliability flags worked out from the leakage order of
// the cell states, the beat count, and holding until acknowledged.
module tb_preproc;
  logic clk = 0, rst_n = 0;
  int c0, f0, c1, f1;
  bit d0, d1;

  always #5 clk = ~clk;

  preproc_check #(.N(1296), .P(8), .WORDS(12)) chk_par (.clk, .rst_n, .checks(c0), .failures(f0), .finished(d0));
  preproc_check #(.N(64),   .P(1), .WORDS(9))  chk_ser (.clk, .rst_n, .checks(c1), .failures(f1), .finished(d1));

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1, f0 + f1 + 1);
    $finish;
  end
endmodule
