// tb_vn_unit: random drive of one variable node unit against a reference
// model of the energy (v^y + number of unsatisfied neighbour checks) and of
// the adapted flip rule (flip only if unreliable, energy == E_max and, in
// PGDBF mode, the random bit is 1).
module tb_vn_unit;
  localparam int DV = 3, EW = 3;
  logic clk = 0, rst_n = 0;
  logic load, y_in, rel_in, upd, rnd, prob_mode, v;
  logic [DV-1:0] c;
  logic [EW-1:0] e_max, energy;
  int checks = 0, failures = 0, flips = 0, blocked_rel = 0;
  logic m_v, m_y, m_rel;

  vn_unit #(.DV(DV)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    {load, y_in, rel_in, upd, rnd, prob_mode, c, e_max} = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    m_v = 0; m_y = 0; m_rel = 0;
    for (int t = 0; t < 5000; t++) begin
      int exp_e;
      logic do_flip;
      @(negedge clk);
      load      = ($urandom_range(9, 0) == 0);
      y_in      = 1'($urandom);
      rel_in    = ($urandom_range(3, 0) == 0);
      upd       = 1'($urandom);
      c         = DV'($urandom);
      rnd       = 1'($urandom);
      prob_mode = 1'($urandom);
      exp_e = int'(m_v ^ m_y) + $countones(c);
      e_max = ($urandom_range(1, 0) == 1) ? EW'(exp_e) : EW'($urandom_range(4, 0));
      #1;
      checks++;
      if (int'(energy) != exp_e) begin
        failures++;
        $display("FAIL t=%0d energy=%0d exp %0d", t, energy, exp_e);
      end
      do_flip = upd && !m_rel && (int'(e_max) == exp_e) && (!prob_mode || rnd);
      if (upd && m_rel && int'(e_max) == exp_e) blocked_rel++;
      @(posedge clk);
      if (load) begin
        m_v = y_in; m_y = y_in; m_rel = rel_in;
      end else if (do_flip) begin
        m_v = ~m_v; flips++;
      end
      #1;
      checks++;
      if (v !== m_v) begin
        failures++;
        $display("FAIL t=%0d v=%b exp %b", t, v, m_v);
      end
    end
    checks++;
    if (flips < 100 || blocked_rel < 20) begin
      failures++;
      $display("FAIL coverage flips=%0d blocked_by_reliability=%0d", flips, blocked_rel);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
