// tb_max_finder: random energy vectors at full size (N=1296, 3-bit values),
// including sparse vectors where the maximum appears once, compared with a
// plain loop maximum.
module tb_max_finder;
  localparam int N = 1296, EW = 3;
  logic [N-1:0][EW-1:0] e;
  logic [EW-1:0] e_max;
  int checks = 0, failures = 0;

  max_finder #(.N(N), .EW(EW)) dut (.e, .e_max);

  initial begin
    for (int t = 0; t < 300; t++) begin
      int lim, ref_max, pos;
      lim = t % 6;  // values drawn below lim+1, 0 included
      for (int n = 0; n < N; n++) e[n] = EW'($urandom_range(lim, 0));
      if (t % 3 == 0) begin
        // a single peak somewhere
        for (int n = 0; n < N; n++) e[n] = EW'($urandom_range(1, 0));
        pos = $urandom_range(N - 1, 0);
        e[pos] = EW'($urandom_range(7, 2));
      end
      #1;
      ref_max = 0;
      for (int n = 0; n < N; n++) if (int'(e[n]) > ref_max) ref_max = int'(e[n]);
      checks++;
      if (int'(e_max) != ref_max) begin
        failures++;
        $display("FAIL t=%0d e_max=%0d exp %0d", t, e_max, ref_max);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
