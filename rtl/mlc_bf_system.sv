// mlc_bf_system: hard-decision LDPC read path for 2-bit MLC NAND flash.
//
// Cells read from the flash array with a single (hard) read stream into the
// pre-processing module, which marks every bit that retention charge loss
// cannot have corrupted. The codeword and its reliability vector then go to
// the fully parallel adapted bit-flipping decoder, which never flips a
// reliable bit and needs one clock per iteration. No soft (multi-read)
// information is needed anywhere.
//
// Configuration (sampled with the first beat of a codeword / at decoder start):
//   cfg_shared   page layout, see preproc
//   cfg_sel_msb  which page codeword to decode in the separate layout
//   cfg_prob     1 = A-PGDBF (random flips, probability cfg_p/2^PW), 0 = A-GDBF
//   cfg_use_rel  1 = adapted decoders; 0 = reliability ignored (plain GDBF/PGDBF)
//   cfg_seed     seed of the decoder's random generators
// Flow: cell beats (valid/ready) -> preproc -> decoder. The decoder starts on
// the clock after the preprocessor holds a full codeword and is idle; the
// preprocessor may collect the next codeword while the decoder works.
// dec_done pulses once per codeword with dec_success, dec_iters and dec_word.
// The chaining and the handshakes are this design's choice.
module mlc_bf_system
  import ldpc_pkg::*;
#(
  parameter int unsigned Z              = DEF_Z,
  parameter int unsigned DV             = DEF_DV,
  parameter int unsigned DC             = DEF_DC,
  parameter int unsigned IT_MAX         = DEF_IT_MAX,
  parameter int unsigned PW             = DEF_PW,
  parameter int unsigned CELLS_PER_BEAT = 8,
  localparam int unsigned N             = Z * DC,
  localparam int unsigned KW            = $clog2(IT_MAX + 1)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      cfg_shared,
  input  logic                      cfg_sel_msb,
  input  logic                      cfg_prob,
  input  logic [PW-1:0]             cfg_p,
  input  logic                      cfg_use_rel,
  input  logic [31:0]               cfg_seed,
  input  logic                      cell_valid,
  output logic                      cell_ready,
  input  logic [CELLS_PER_BEAT-1:0] cell_msb,
  input  logic [CELLS_PER_BEAT-1:0] cell_lsb,
  output logic                      busy,
  output logic                      dec_done,
  output logic                      dec_success,
  output logic [KW-1:0]             dec_iters,
  output logic [N-1:0]              dec_word
);
  logic         pp_valid, dec_start, dec_busy;
  logic [N-1:0] pp_y, pp_rel;

  preproc #(.N(N), .CELLS_PER_BEAT(CELLS_PER_BEAT)) u_pre (
    .clk, .rst_n, .cfg_shared, .cfg_sel_msb,
    .in_valid(cell_valid), .in_ready(cell_ready), .msb(cell_msb), .lsb(cell_lsb),
    .out_valid(pp_valid), .out_ack(dec_start), .y(pp_y), .rel(pp_rel)
  );

  assign dec_start = pp_valid && !dec_busy;

  abf_decoder #(.Z(Z), .DV(DV), .DC(DC), .IT_MAX(IT_MAX), .PW(PW)) u_dec (
    .clk, .rst_n, .start(dec_start), .y(pp_y),
    .rel(pp_rel & {N{cfg_use_rel}}),
    .prob_mode(cfg_prob), .p_thr(cfg_p), .seed(cfg_seed),
    .busy(dec_busy), .done(dec_done), .success(dec_success), .iters(dec_iters), .v(dec_word)
  );

  assign busy = dec_busy || pp_valid;
endmodule
