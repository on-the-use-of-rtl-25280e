// preproc_check: stimulus and checker for one preproc instance, used by
// tb_preproc. Random cell reads are streamed in, with random gaps, for the
// separate layout (LSB page and MSB page) and the shared layout. The
// expected word and reliability vector are derived from the retention model
// (states by charge 11 < 10 < 00 < 01; a read bit is reliable when the only
// other possible origin, the state one level up, has the same bit). Also
// checked: the number of beats per codeword, that in_ready stays low and the
// outputs hold while the codeword is not acknowledged, and that out_valid
// drops after out_ack.
module preproc_check #(
  parameter int N = 1296,
  parameter int P = 8,
  parameter int WORDS = 12
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished
);
  logic cfg_shared, cfg_sel_msb, in_valid, in_ready, out_valid, out_ack;
  logic [P-1:0] msb, lsb;
  logic [N-1:0] y, rel;
  int n_hold = 0;

  preproc #(.N(N), .CELLS_PER_BEAT(P)) dut (.*);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [1:0] higher(logic [1:0] s);
    case (s)
      2'b11:   return 2'b10;
      2'b10:   return 2'b00;
      default: return 2'b01;
    endcase
  endfunction

  task automatic one_word(input bit shared, input bit sel);
    logic [N-1:0] ey, er;
    int cells, beats, accepted;
    logic [1:0] s [];
    cells = shared ? N / 2 : N;
    s = new[cells];
    for (int i = 0; i < cells; i++) s[i] = 2'($urandom);
    for (int i = 0; i < cells; i++) begin
      logic [1:0] h;
      logic rm, rl;
      h  = higher(s[i]);
      rm = (s[i] == 2'b01) || (h[1] == s[i][1]);
      rl = (s[i] == 2'b01) || (h[0] == s[i][0]);
      if (shared) begin
        ey[2 * i] = s[i][1]; er[2 * i] = rm;
        ey[2 * i + 1] = s[i][0]; er[2 * i + 1] = rl;
      end else begin
        ey[i] = sel ? s[i][1] : s[i][0];
        er[i] = sel ? rm : rl;
      end
    end
    beats = 0; accepted = 0;
    @(negedge clk);
    cfg_shared = shared; cfg_sel_msb = sel;
    while (accepted < cells) begin
      in_valid = ($urandom_range(3, 0) != 0);
      for (int j = 0; j < P; j++) begin
        msb[j] = s[accepted + j][1];
        lsb[j] = s[accepted + j][0];
      end
      @(posedge clk);
      if (in_valid && in_ready) begin accepted += P; beats++; end
      @(negedge clk);
      // configuration may change after the first beat without effect
      if (beats > 0) begin cfg_shared = $urandom; cfg_sel_msb = $urandom; end
    end
    in_valid = 0;
    check(beats == (shared ? N / (2 * P) : N / P), $sformatf("beats=%0d", beats));
    check(out_valid, "out_valid not raised after the last beat");
    check(y == ey, $sformatf("word mismatch (shared=%0b sel=%0b)", shared, sel));
    check(rel == er, $sformatf("reliability mismatch (shared=%0b sel=%0b)", shared, sel));
    // hold while not acknowledged, with new data offered
    in_valid = 1; msb = '1; lsb = '0;
    repeat (3) begin
      @(posedge clk); #1;
      check(!in_ready && out_valid && y == ey && rel == er, "codeword not held before out_ack");
      n_hold++;
    end
    @(negedge clk);
    in_valid = 0; out_ack = 1;
    @(posedge clk); #1;
    out_ack = 0;
    check(!out_valid && in_ready, "out_valid still high after out_ack");
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    cfg_shared = 0; cfg_sel_msb = 0; in_valid = 0; out_ack = 0; msb = '0; lsb = '0;
    @(posedge rst_n);
    for (int t = 0; t < WORDS; t++) one_word(t % 3 == 2, t % 3 == 1);
    finished = 1;
  end
endmodule
