// tb_abf_decoder: end-to-end checks of the adapted bit-flipping decoder at a
// reduced code size (Z=27, N=324, M=81, IT_MAX=60).
//   - GDBF mode: random codewords with random bit errors and a random subset
//     of the correct bits marked reliable (and runs with no reliable bits)
//     are decoded by the RTL and by the reference GDBF model of
//     tb_code_pkg; success, iteration count, final word and the number of
//     clocks (one per iteration, plus the final syndrome check) must match.
//   - PGDBF mode, p = 0: nothing may flip; the decode must run IT_MAX
//     iterations and fail.
//   - PGDBF mode, p = 0.7: any successful result must be a codeword, every
//     reliable bit must keep its read value, and most words must come back
//     exactly.
//   - An error-free word finishes after one clock with zero iterations.
//   - start while busy is ignored.
module tb_abf_decoder;
  import tb_code_pkg::*;
  localparam int Z = 27, DV = 3, DC = 12, IT_MAX = 60, PW = 8;
  localparam int N = Z * DC;
  localparam int KW = $clog2(IT_MAX + 1);
  typedef code_model #(Z, DV, DC) code_t;
  typedef logic [N-1:0] word_t;

  logic clk = 0, rst_n = 0;
  logic start, prob_mode, busy, done, success;
  word_t y, rel, v;
  logic [PW-1:0] p_thr;
  logic [31:0] seed;
  logic [KW-1:0] iters;
  int checks = 0, failures = 0;
  int n_gdbf_ok = 0, n_gdbf_fail = 0, n_pg_ok = 0, n_pg_exact = 0, n_pg_runs = 0;
  code_t code;

  abf_decoder #(.Z(Z), .DV(DV), .DC(DC), .IT_MAX(IT_MAX), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Run one decode; returns the number of clock edges from the load edge
  // until done is seen.
  task automatic run(input word_t yy, input word_t rr, input logic pm,
                     input logic [PW-1:0] pt, output int lat);
    @(negedge clk);
    y = yy; rel = rr; prob_mode = pm; p_thr = pt; seed = $urandom; start = 1;
    @(posedge clk);
    @(negedge clk);
    start = 0;
    lat = 0;
    while (!done) begin
      @(posedge clk); lat++;
      #1;
      if (lat == 1) begin
        // a second start while busy must be ignored
        y = ~yy;
        start = 1;
      end
      if (lat == 2) start = 0;
      if (lat > IT_MAX + 5) break;
    end
    start = 0;
  endtask

  function automatic word_t make_errors(word_t x, int nerr);
    word_t e;
    e = '0;
    for (int i = 0; i < nerr; i++) e[$urandom_range(N - 1, 0)] = 1'b1;
    return x ^ e;
  endfunction

  function automatic word_t make_rel(word_t x, word_t yy, int pct);
    word_t r;
    for (int n = 0; n < N; n++) r[n] = (x[n] == yy[n]) && ($urandom_range(99, 0) < pct);
    return r;
  endfunction

  initial begin
    word_t x, yy, rr, vr;
    int lat, k;
    bit ok;
    code = new();
    start = 0; prob_mode = 0; p_thr = 0; seed = 0; y = '0; rel = '0;
    check(code.syn_weight(code.random_codeword()) == 0, "encoder model produced a non-codeword");
    repeat (3) @(posedge clk);
    rst_n = 1;

    // error-free word
    x = code.random_codeword();
    run(x, '0, 1'b0, '0, lat);
    check(success && iters == 0 && lat == 1 && v == x,
          $sformatf("clean word: success=%0b iters=%0d lat=%0d", success, iters, lat));

    // GDBF against the reference model
    for (int t = 0; t < 60; t++) begin
      x  = code.random_codeword();
      yy = make_errors(x, 1 + t % 8);
      rr = (t % 4 == 3) ? '0 : make_rel(x, yy, 20 + 10 * (t % 6));
      vr = yy;
      k = 0;
      ok = 1;
      while (k < IT_MAX && code.gdbf_step(vr, yy, rr)) k++;
      if (k == IT_MAX && code.syn_weight(vr) != 0) ok = 0;
      run(yy, rr, 1'b0, '0, lat);
      check(success == ok && int'(iters) == k && v == vr && lat == k + 1,
            $sformatf("GDBF t=%0d: dut success=%0b iters=%0d lat=%0d, ref success=%0b iters=%0d, word %s",
                      t, success, iters, lat, ok, k, (v == vr) ? "same" : "differs"));
      if (ok) n_gdbf_ok++; else n_gdbf_fail++;
      // reliable bits never move
      check(((v ^ yy) & rr) == '0, "GDBF flipped a reliable bit");
    end

    // PGDBF with p = 0: no flips at all
    x  = code.random_codeword();
    yy = make_errors(x, 3);
    run(yy, '0, 1'b1, 8'd0, lat);
    check(!success && iters == KW'(IT_MAX) && v == yy && lat == IT_MAX + 1,
          $sformatf("PGDBF p=0: success=%0b iters=%0d lat=%0d", success, iters, lat));

    // PGDBF with p = 0.7
    for (int t = 0; t < 40; t++) begin
      x  = code.random_codeword();
      yy = make_errors(x, 2 + t % 6);
      rr = make_rel(x, yy, 50);
      run(yy, rr, 1'b1, 8'd179, lat);
      n_pg_runs++;
      check(((v ^ yy) & rr) == '0, "PGDBF flipped a reliable bit");
      check(lat == int'(iters) + 1, $sformatf("PGDBF latency %0d for %0d iterations", lat, iters));
      if (success) begin
        n_pg_ok++;
        check(code.syn_weight(v) == 0, "PGDBF reported success on a non-codeword");
        if (v == x) n_pg_exact++;
      end else begin
        check(iters == KW'(IT_MAX), "PGDBF failed before IT_MAX");
      end
    end
    check(n_pg_exact >= n_pg_runs * 3 / 4, $sformatf("PGDBF exact %0d of %0d", n_pg_exact, n_pg_runs));
    check(n_gdbf_ok > 0 && n_gdbf_fail >= 0, "no successful GDBF decode");
    $display("GDBF ok=%0d fail=%0d  PGDBF ok=%0d exact=%0d of %0d",
             n_gdbf_ok, n_gdbf_fail, n_pg_ok, n_pg_exact, n_pg_runs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
