// abf_decoder: fully parallel adapted bit-flipping LDPC decoder (A-GDBF and
// A-PGDBF) for codewords read from 2-bit MLC NAND flash.
//
// All N variable node units (vn_unit) and M = DV*Z check node units (cn_unit)
// exist in hardware and are hard-wired along the Tanner graph of ldpc_pkg, so
// one decoding iteration takes one clock:
//   1. every check computes the parity of its VNs (syndrome);
//   2. if all checks are satisfied the decode ends with success;
//   3. otherwise every VN computes its energy, the max_finder returns the
//      largest energy E_max, and each VN that is NOT marked reliable and whose
//      energy equals E_max flips; in probabilistic mode (prob_mode = 1, PGDBF)
//      it flips only if its Bernoulli(p) bit from bernoulli_rng is also 1.
// With rel all zero the same hardware runs the plain GDBF / PGDBF decoders.
// E_max is taken over all VNs, reliable ones included.
//
// Interface and timing:
//   start       (while idle) loads y and rel into the VNs, sets v = y,
//               seeds the random generators and latches prob_mode and
//               p_thr; busy rises the next clock.
//   busy        high while iterating; one flip step per clock.
//   done        one-clock pulse at the end, with success and iters valid and
//               held until the next start; v holds the decoded word.
//   A decode that needs k flip steps ends k+1 clocks after the load clock
//   (the last clock only sees a zero syndrome). If the syndrome is still
//   non-zero after IT_MAX flip steps, done rises with success = 0.
// The iteration structure follows the adapted PGDBF algorithm; IT_MAX, the
// probability width PW and the random generator are this design's choices.
module abf_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned Z      = DEF_Z,
  parameter int unsigned DV     = DEF_DV,
  parameter int unsigned DC     = DEF_DC,
  parameter int unsigned IT_MAX = DEF_IT_MAX,
  parameter int unsigned PW     = DEF_PW,
  localparam int unsigned N     = Z * DC,
  localparam int unsigned M     = Z * DV,
  localparam int unsigned EW    = $clog2(DV + 2),
  localparam int unsigned KW    = $clog2(IT_MAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  y,
  input  logic [N-1:0]  rel,
  input  logic          prob_mode,
  input  logic [PW-1:0] p_thr,
  input  logic [31:0]   seed,
  output logic          busy,
  output logic          done,
  output logic          success,
  output logic [KW-1:0] iters,
  output logic [N-1:0]  v
);
  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t state;

  logic                 load, upd;
  logic                 prob_q;
  logic [PW-1:0]        p_q;
  logic [M-1:0]         c;
  logic [N-1:0][EW-1:0] energy;
  logic [EW-1:0]        e_max;
  logic [N-1:0]         rnd;
  logic                 syndrome_nz;

  assign load = (state == S_IDLE) && start;

  // ---- check nodes -------------------------------------------------------
  for (genvar m = 0; m < M; m++) begin : g_cn
    logic [DC-1:0] cv;
    for (genvar k = 0; k < DC; k++) begin : g_e
      assign cv[k] = v[cn_nbr(m, k, Z)];
    end
    cn_unit #(.DC(DC)) u_cn (.v(cv), .c(c[m]));
  end

  assign syndrome_nz = |c;

  // ---- variable nodes ----------------------------------------------------
  for (genvar n = 0; n < N; n++) begin : g_vn
    logic [DV-1:0] vc;
    for (genvar e = 0; e < DV; e++) begin : g_e
      assign vc[e] = c[vn_nbr(n, e, Z)];
    end
    vn_unit #(.DV(DV)) u_vn (
      .clk, .rst_n, .load,
      .y_in(y[n]), .rel_in(rel[n]), .upd,
      .c(vc), .e_max, .rnd(rnd[n]), .prob_mode(prob_q),
      .energy(energy[n]), .v(v[n])
    );
  end

  max_finder #(.N(N), .EW(EW)) u_mf (.e(energy), .e_max);

  bernoulli_rng #(.N(N), .PW(PW)) u_rng (
    .clk, .rst_n, .seed_load(load), .seed, .step(upd), .p_thr(p_q), .r(rnd)
  );

  // ---- control -----------------------------------------------------------
  assign busy = (state == S_RUN);
  assign upd  = busy && syndrome_nz && (iters != KW'(IT_MAX));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      prob_q  <= 1'b0;
      p_q     <= '0;
      iters   <= '0;
      done    <= 1'b0;
      success <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_RUN;
          prob_q  <= prob_mode;
          p_q     <= p_thr;
          iters   <= '0;
          success <= 1'b0;
        end
        S_RUN: begin
          if (!syndrome_nz) begin
            state   <= S_IDLE;
            done    <= 1'b1;
            success <= 1'b1;
          end else if (iters == KW'(IT_MAX)) begin
            state   <= S_IDLE;
            done    <= 1'b1;
            success <= 1'b0;
          end else begin
            iters <= iters + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The iteration counter never passes IT_MAX; done is a one-clock pulse.
  a_iters_bound: assert property (@(posedge clk) disable iff (!rst_n) iters <= KW'(IT_MAX));
  a_done_pulse:  assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
endmodule
