// tb_mlc_bf_system: end-to-end test of the MLC flash read path at the
// default size (N=1296, Z=108, IT_MAX=300, 8 cells per beat), with the
// top's parameters left at their defaults.
//
// Random codewords of the code are written into a behavioural MLC flash
// model, aged with single-step retention loss and read back through the
// design. For every codeword the testbench works out, on its own, the hard
// word y and the reliability vector from the aged cell states, and:
//   - in A-GDBF / GDBF mode runs the reference decoder of tb_code_pkg and
//     requires the same success flag, iteration count and output word;
//   - in A-PGDBF mode requires a successful result to be a codeword, and
//     reliable bits never to change;
//   - for codewords decoded by an idle decoder, requires done to come
//     iters+2 clocks after the last beat (one clock per iteration).
// Mechanisms that must each happen at least once: both page layouts, MSB
// and LSB page decodes, A-GDBF, A-PGDBF and the non-adapted decoder,
// successful and failed (IT_MAX) decodes, back-pressure on the cell stream,
// a read streamed while the decoder works, and a codeword that only the
// reliability information makes decodable.
module tb_mlc_bf_system;
  import tb_code_pkg::*;
  localparam int Z = 108, DV = 3, DC = 12, IT_MAX = 300, PW = 8, P = 8;
  localparam int N = Z * DC;
  localparam int KW = $clog2(IT_MAX + 1);
  typedef code_model #(Z, DV, DC) code_t;
  typedef logic [N-1:0] word_t;

  typedef struct {
    word_t x, y, rel;
    bit    prob, use_rel, shared, sel_msb;
    bit    ref_ok;
    int    ref_iters;
    word_t ref_word;
    longint last_beat_cycle;
    bit    idle_at_end;
  } item_t;

  logic clk = 0, rst_n = 0;
  logic cfg_shared, cfg_sel_msb, cfg_prob, cfg_use_rel;
  logic [PW-1:0] cfg_p;
  logic [31:0] cfg_seed;
  logic cell_valid, cell_ready, busy, dec_done, dec_success;
  logic [P-1:0] cell_msb, cell_lsb;
  logic [KW-1:0] dec_iters;
  word_t dec_word;

  // flash model
  logic fm_prog, fm_age, fm_rd_start, fm_busy;
  logic [15:0] fm_age_thr;
  int fm_cells;
  word_t fm_pmsb, fm_plsb, st_msb, st_lsb;

  int checks = 0, failures = 0;
  longint cycle = 0;
  int outstanding = 0;   // codewords fully streamed, not yet decoded
  item_t q[$];
  code_t code;

  // mechanism counters
  int n_sep_lsb = 0, n_sep_msb = 0, n_shared = 0, n_agdbf = 0, n_apgdbf = 0, n_plain = 0;
  int n_ok = 0, n_fail = 0, n_stall = 0, n_overlap = 0, n_rel_gain = 0, n_lat = 0, n_exact = 0;

  mlc_bf_system dut (.*);

  mlc_flash_model #(.N_CELLS(N), .P(P)) flash (
    .clk, .rst_n, .prog(fm_prog), .prog_msb(fm_pmsb), .prog_lsb(fm_plsb),
    .age(fm_age), .age_thr(fm_age_thr), .rd_start(fm_rd_start), .rd_cells(fm_cells),
    .rd_valid(cell_valid), .rd_ready(cell_ready), .rd_msb(cell_msb), .rd_lsb(cell_lsb),
    .rd_busy(fm_busy), .st_msb, .st_lsb
  );

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Charge levels 11 < 10 < 00 < 01; a read bit is reliable when the state
  // one level higher (the only other possible origin) has the same bit.
  function automatic logic [1:0] higher(logic [1:0] s);
    case (s)
      2'b11:   return 2'b10;
      2'b10:   return 2'b00;
      2'b00:   return 2'b01;
      default: return 2'b01;
    endcase
  endfunction

  // stream monitor: back-pressure, overlap, end of each read
  // and the decode monitor, in one process so that cycle is race-free
  always @(posedge clk) begin
    cycle++;
    if (cell_valid && !cell_ready) n_stall++;
    if (cell_valid && cell_ready && outstanding > 0) n_overlap++;
    if (rst_n && dec_done) begin
      item_t it;
      if (q.size() == 0) begin
        check(0, "dec_done with no codeword outstanding");
      end else begin
        it = q.pop_front();
        outstanding--;
        if (dec_success) n_ok++; else n_fail++;
        check((((dec_word ^ it.y) & it.rel & {N{it.use_rel}})) == '0, "a reliable bit was flipped");
        if (!it.prob) begin
          check(dec_success == it.ref_ok && int'(dec_iters) == it.ref_iters && dec_word == it.ref_word,
                $sformatf("GDBF mismatch: dut ok=%0b it=%0d, ref ok=%0b it=%0d, word %s", dec_success,
                          dec_iters, it.ref_ok, it.ref_iters, dec_word == it.ref_word ? "same" : "differs"));
        end else begin
          if (dec_success) check(code.syn_weight(dec_word) == 0, "PGDBF success on a non-codeword");
          else check(dec_iters == KW'(IT_MAX), "PGDBF gave up before IT_MAX");
        end
        if (dec_success && dec_word == it.x) n_exact++;
        // done is set by the edge iters+2 after the last beat's edge and
        // seen here one edge later
        if (it.idle_at_end) begin
          n_lat++;
          check(cycle - it.last_beat_cycle == longint'(dec_iters) + 3,
                $sformatf("latency %0d for %0d iterations", cycle - it.last_beat_cycle, dec_iters));
        end
      end
    end
  end

  // Build the expected item for the current flash contents and start a read.
  task automatic read(input bit shared, input bit sel_msb, input word_t x);
    item_t it;
    word_t vr;
    int k;
    it.x = x; it.shared = shared; it.sel_msb = sel_msb;
    it.prob = cfg_prob; it.use_rel = cfg_use_rel;
    for (int i = 0; i < (shared ? N / 2 : N); i++) begin
      logic [1:0] s, h;
      s = {st_msb[i], st_lsb[i]};
      h = higher(s);
      if (shared) begin
        it.y[2 * i] = s[1];  it.rel[2 * i]     = (s == 2'b01) || (h[1] == s[1]);
        it.y[2 * i + 1] = s[0]; it.rel[2 * i + 1] = (s == 2'b01) || (h[0] == s[0]);
      end else if (sel_msb) begin
        it.y[i] = s[1]; it.rel[i] = (s == 2'b01) || (h[1] == s[1]);
      end else begin
        it.y[i] = s[0]; it.rel[i] = (s == 2'b01) || (h[0] == s[0]);
      end
    end
    // the reliability rule must never mark a wrong bit
    check(((it.y ^ x) & it.rel) == '0, "reference marked an erroneous bit reliable");
    if (!it.prob) begin
      vr = it.y; k = 0;
      while (k < IT_MAX && code.gdbf_step(vr, it.y, cfg_use_rel ? it.rel : '0)) k++;
      it.ref_ok = (code.syn_weight(vr) == 0);
      it.ref_iters = k; it.ref_word = vr;
      if (cfg_use_rel && it.ref_ok) begin
        // would the non-adapted decoder have failed?
        word_t vp; int kp;
        vp = it.y; kp = 0;
        while (kp < IT_MAX && code.gdbf_step(vp, it.y, '0)) kp++;
        if (vp != x && vr == x) n_rel_gain++;
      end
    end
    if (shared) n_shared++; else if (sel_msb) n_sep_msb++; else n_sep_lsb++;
    if (!cfg_use_rel) n_plain++; else if (cfg_prob) n_apgdbf++; else n_agdbf++;
    @(negedge clk);
    cfg_shared = shared; cfg_sel_msb = sel_msb;
    fm_cells = shared ? N / 2 : N;
    fm_rd_start = 1;
    @(negedge clk);
    fm_rd_start = 0;
    while (fm_busy) @(negedge clk);
    it.last_beat_cycle = cycle;
    it.idle_at_end = (outstanding == 0);
    q.push_back(it);
    outstanding++;
  endtask

  task automatic write_flash(input word_t msb_page, input word_t lsb_page, input int thr);
    @(negedge clk);
    fm_pmsb = msb_page; fm_plsb = lsb_page; fm_prog = 1;
    @(negedge clk);
    fm_prog = 0; fm_age_thr = 16'(thr); fm_age = 1;
    @(negedge clk);
    fm_age = 0;
  endtask

  task automatic drain();
    int guard;
    guard = 0;
    while ((q.size() != 0 || busy) && guard < 20 * IT_MAX) begin @(negedge clk); guard++; end
  endtask

  // one round: configure the decoder, program random data, read pages
  task automatic round(input bit shared, input bit prob, input bit use_rel, input int thr,
                       input bit third = 0);
    word_t xm, xl, xs, pm, pl;
    drain();
    cfg_prob = prob; cfg_use_rel = use_rel; cfg_p = 8'd179; cfg_seed = $urandom;
    if (!shared) begin
      xm = code.random_codeword();
      xl = code.random_codeword();
      write_flash(xm, xl, thr);
      read(0, 0, xl);          // LSB page, then at once the MSB page
      read(0, 1, xm);
      if (third) read(0, 0, xl);   // queued behind two codewords: back-pressure
    end else begin
      xs = code.random_codeword();
      pm = $urandom; pl = $urandom;
      for (int i = 0; i < N / 2; i++) begin pm[i] = xs[2 * i]; pl[i] = xs[2 * i + 1]; end
      write_flash(pm, pl, thr);
      read(1, 0, xs);
      read(1, 0, xs);
    end
  endtask

  initial begin
    code = new();
    cfg_shared = 0; cfg_sel_msb = 0; cfg_prob = 0; cfg_use_rel = 1; cfg_p = 0; cfg_seed = 0;
    fm_prog = 0; fm_age = 0; fm_rd_start = 0; fm_age_thr = 0; fm_cells = N; fm_pmsb = '0; fm_plsb = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // moderate retention loss, all modes and layouts
    for (int r = 0; r < 4; r++) begin
      round(0, 0, 1, 700);
      round(0, 1, 1, 700);
      round(0, 0, 0, 700);
      round(1, 0, 1, 700);
      round(1, 1, 1, 700);
    end
    // heavy loss: decoder failures and back-pressure
    for (int r = 0; r < 3; r++) begin
      round(0, 0, 1, 4000, 1);
      round(0, 1, 1, 4000, 1);
    end
    // search for a word only the adapted decoder corrects
    for (int r = 0; r < 12 && n_rel_gain == 0; r++) round(0, 0, 1, 1800);
    drain();
    check(q.size() == 0, "codewords left undecoded");
    $display("code rank %0d (dimension %0d)", code.rank, N - code.rank);
    $display("layouts: sep-LSB=%0d sep-MSB=%0d shared=%0d | modes: A-GDBF=%0d A-PGDBF=%0d plain=%0d",
             n_sep_lsb, n_sep_msb, n_shared, n_agdbf, n_apgdbf, n_plain);
    $display("decodes: ok=%0d exact=%0d failed=%0d | stall cycles=%0d overlap beats=%0d reliability gains=%0d latency checks=%0d",
             n_ok, n_exact, n_fail, n_stall, n_overlap, n_rel_gain, n_lat);
    check(n_sep_lsb > 0 && n_sep_msb > 0 && n_shared > 0, "a layout was never exercised");
    check(n_agdbf > 0 && n_apgdbf > 0 && n_plain > 0, "a decoder mode was never exercised");
    check(n_ok > 0, "no successful decode");
    check(n_fail > 0, "no decode reached IT_MAX");
    check(n_stall > 0, "no back-pressure on the cell stream");
    check(n_overlap > 0, "no read overlapped a decode");
    check(n_rel_gain > 0, "reliability information never made the difference");
    check(n_lat > 0, "latency never checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
