// tb_bernoulli_rng: statistical and structural checks of the per-VN random
// bit generator: the measured rate of ones for several p matches p within a
// tolerance, p = 0 never gives a one, reseeding repeats the sequence exactly,
// different outputs and different seeds give different sequences, and the
// outputs hold while step is low.
module tb_bernoulli_rng;
  localparam int N = 64, PW = 8, STEPS = 2000;
  logic clk = 0, rst_n = 0;
  logic seed_load, step;
  logic [31:0] seed;
  logic [PW-1:0] p_thr;
  logic [N-1:0] r;
  int checks = 0, failures = 0;
  logic [N-1:0] first_run [16];

  bernoulli_rng #(.N(N), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic reseed(input logic [31:0] s);
    @(negedge clk); seed = s; seed_load = 1; step = 0;
    @(negedge clk); seed_load = 0;
  endtask

  initial begin
    seed_load = 0; step = 0; seed = 0; p_thr = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    foreach (p_thr_list[i]) begin
      longint ones;
      real rate, expect_rate, tol;
      p_thr = p_thr_list[i];
      reseed(32'h1234_5678 + i);
      ones = 0;
      step = 1;
      for (int t = 0; t < STEPS; t++) begin
        @(negedge clk);
        ones += $countones(r);
      end
      step = 0;
      rate = real'(ones) / real'(N * STEPS);
      expect_rate = real'(p_thr) / 256.0;
      tol = 0.01;
      check(rate > expect_rate - tol && rate < expect_rate + tol,
            $sformatf("p_thr=%0d rate=%f expected %f", p_thr, rate, expect_rate));
      if (p_thr == 0) check(ones == 0, "p=0 produced ones");
    end
    // reproducibility and hold
    p_thr = 8'd128;
    reseed(32'hCAFE_0001);
    for (int t = 0; t < 16; t++) begin
      first_run[t] = r;
      @(negedge clk); step = 1; @(negedge clk); step = 0;
    end
    begin
      logic [N-1:0] held;
      held = r;
      repeat (3) @(negedge clk);
      check(r == held, "output changed while step low");
    end
    reseed(32'hCAFE_0001);
    for (int t = 0; t < 16; t++) begin
      check(r == first_run[t], $sformatf("reseed did not repeat step %0d", t));
      @(negedge clk); step = 1; @(negedge clk); step = 0;
    end
    begin
      int diff_seed, diff_lane;
      reseed(32'hCAFE_0002);
      diff_seed = 0;
      diff_lane = 0;
      for (int t = 0; t < 16; t++) begin
        diff_seed += $countones(r ^ first_run[t]);
        diff_lane += int'(r[0] != r[1]);
        @(negedge clk); step = 1; @(negedge clk); step = 0;
      end
      check(diff_seed > 16 * N / 4, $sformatf("other seed too similar: %0d", diff_seed));
      check(diff_lane > 2, $sformatf("lanes 0 and 1 too similar: %0d", diff_lane));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [PW-1:0] p_thr_list [5] = '{8'd0, 8'd32, 8'd128, 8'd200, 8'd255};

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
