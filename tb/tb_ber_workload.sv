// tb_ber_workload: error-rate and decoding-speed run of the MLC read path at
// its default size (N=1296, rate 0.75, IT_MAX=300).
//
// Random codewords are written to both pages of the behavioural MLC flash,
// aged with single-step retention loss and the LSB-page codeword (the harder
// one) is read back and decoded four times from the same cells: A-PGDBF,
// A-GDBF, and the non-adapted PGDBF and GDBF (reliability ignored). Two raw
// LSB bit error rates are run, 2e-3 and 5e-3: with uniformly random states,
// half of the leakage steps change the LSB, so a cell-level step probability
// of 2*alpha gives an LSB error rate of about alpha.
// Per decode it checks that a success is a codeword, that reliable bits are
// unchanged in the adapted modes, and that done comes iters+2 clocks after
// the last beat (one clock per iteration). It prints, per mode, the frame and
// bit errors after decoding and the average clocks per codeword, and checks
// that the adapted GDBF fails on no more frames than plain GDBF on the same
// data and that every mode needs few clocks on average at these error rates.
module tb_ber_workload;
  import tb_code_pkg::*;
  localparam int Z = 108, DV = 3, DC = 12, IT_MAX = 300, PW = 8, P = 8;
  localparam int N = Z * DC;
  localparam int KW = $clog2(IT_MAX + 1);
  localparam int FRAMES = 120;
  typedef code_model #(Z, DV, DC) code_t;
  typedef logic [N-1:0] word_t;

  logic clk = 0, rst_n = 0;
  logic cfg_shared, cfg_sel_msb, cfg_prob, cfg_use_rel;
  logic [PW-1:0] cfg_p;
  logic [31:0] cfg_seed;
  logic cell_valid, cell_ready, busy, dec_done, dec_success;
  logic [P-1:0] cell_msb, cell_lsb;
  logic [KW-1:0] dec_iters;
  word_t dec_word;
  logic fm_prog, fm_age, fm_rd_start, fm_busy;
  logic [15:0] fm_age_thr;
  int fm_cells;
  word_t fm_pmsb, fm_plsb, st_msb, st_lsb;

  int checks = 0, failures = 0;
  longint cycle = 0;
  code_t code;

  mlc_bf_system dut (.*);

  mlc_flash_model #(.N_CELLS(N), .P(P)) flash (
    .clk, .rst_n, .prog(fm_prog), .prog_msb(fm_pmsb), .prog_lsb(fm_plsb),
    .age(fm_age), .age_thr(fm_age_thr), .rd_start(fm_rd_start), .rd_cells(fm_cells),
    .rd_valid(cell_valid), .rd_ready(cell_ready), .rd_msb(cell_msb), .rd_lsb(cell_lsb),
    .rd_busy(fm_busy), .st_msb, .st_lsb
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic word_t lsb_rel(word_t m, word_t l);
    word_t r;
    for (int i = 0; i < N; i++) r[i] = m[i] ^ l[i];  // 01 and 10 keep a correct LSB
    return r;
  endfunction

  // Decode the LSB page in one mode; returns clocks from last beat to done.
  task automatic decode(input bit prob, input bit use_rel, input word_t x,
                        output bit ok, output int bit_err, output int clocks);
    longint t_last;
    word_t rel;
    @(negedge clk);
    cfg_shared = 0; cfg_sel_msb = 0; cfg_prob = prob; cfg_use_rel = use_rel;
    cfg_p = 8'd179; cfg_seed = $urandom;
    fm_cells = N; fm_rd_start = 1;
    @(negedge clk);
    fm_rd_start = 0;
    while (fm_busy) @(negedge clk);
    t_last = cycle;
    while (!dec_done) @(negedge clk);
    clocks = int'(cycle - t_last);
    ok = dec_success && (dec_word == x);
    bit_err = $countones(dec_word ^ x);
    rel = lsb_rel(st_msb, st_lsb);
    check(clocks == int'(dec_iters) + 2, $sformatf("clocks %0d for %0d iterations", clocks, dec_iters));
    if (dec_success) check(code.syn_weight(dec_word) == 0, "success on a non-codeword");
    if (use_rel) check(((dec_word ^ st_lsb) & rel) == '0, "reliable bit flipped");
  endtask

  initial begin
    int thr [2] = '{262, 655};          // cell step probability 2*alpha * 65536
    real alpha [2] = '{2.0e-3, 5.0e-3};
    code = new();
    cfg_shared = 0; cfg_sel_msb = 0; cfg_prob = 0; cfg_use_rel = 1; cfg_p = 0; cfg_seed = 0;
    fm_prog = 0; fm_age = 0; fm_rd_start = 0; fm_age_thr = 0; fm_cells = N; fm_pmsb = '0; fm_plsb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int a = 0; a < 2; a++) begin
      int fe [4], be [4];
      longint clk_sum [4];
      longint raw;
      foreach (fe[k]) begin fe[k] = 0; be[k] = 0; clk_sum[k] = 0; end
      raw = 0;
      for (int f = 0; f < FRAMES; f++) begin
        word_t xm, xl;
        xm = code.random_codeword();
        xl = code.random_codeword();
        @(negedge clk);
        fm_pmsb = xm; fm_plsb = xl; fm_prog = 1;
        @(negedge clk);
        fm_prog = 0; fm_age_thr = 16'(thr[a]); fm_age = 1;
        @(negedge clk);
        fm_age = 0;
        raw += $countones(st_lsb ^ xl);
        for (int k = 0; k < 4; k++) begin
          bit ok; int bits, clocks;
          // k: 0 A-PGDBF, 1 A-GDBF, 2 PGDBF, 3 GDBF
          decode(k % 2 == 0, k < 2, xl, ok, bits, clocks);
          if (!ok) fe[k]++;
          be[k] += bits;
          clk_sum[k] += clocks;
        end
      end
      $display("raw LSB BER target %.1e measured %.2e over %0d frames", alpha[a],
               real'(raw) / real'(FRAMES * N), FRAMES);
      $display("  A-PGDBF: frame err %0d  bit err %0d  avg clocks %.2f", fe[0], be[0], real'(clk_sum[0]) / FRAMES);
      $display("  A-GDBF : frame err %0d  bit err %0d  avg clocks %.2f", fe[1], be[1], real'(clk_sum[1]) / FRAMES);
      $display("  PGDBF  : frame err %0d  bit err %0d  avg clocks %.2f", fe[2], be[2], real'(clk_sum[2]) / FRAMES);
      $display("  GDBF   : frame err %0d  bit err %0d  avg clocks %.2f", fe[3], be[3], real'(clk_sum[3]) / FRAMES);
      check(fe[1] <= fe[3], "A-GDBF failed on more frames than GDBF");
      for (int k = 0; k < 4; k++)
        check(real'(clk_sum[k]) / FRAMES < 30.0, $sformatf("mode %0d needs too many clocks", k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
